// XOR-free encoding step: 32:1 multiplexer, 8:1 multiplexer, reduced ROM.
//
// Given the eight-cell encoder state d and the information bit u, produces
// the code symbol {c0, c1} that a conventional XOR encoder would give for
// that bit, without any XOR gate:
//   1. the five newest cells d[7:3] select the new row tag z from 32
//      precomputed 2-bit words (isostate_mux32);
//   2. {u, z} selects one of eight ROM addresses built from the column tag
//      d[1:0], with its LSB inverted where the wanted row is the complement
//      of a stored one (restore_mux8);
//   3. the two-row ROM returns the code symbol, registered (reduced_rom).
// The sixth cell d[2] is not tapped by the cdma2000 generators and is not
// used; an elaboration check rejects generators that tap it.
//
// Interface: d[7] is the newest cell, d[0] the oldest. eop is valid one
// clock after d and u are presented with rw = 1 and holds while rw = 0;
// rst clears it (asynchronous, active high).
//
// The three-block chain and its port names follow the design's own
// block diagram. Feeding d[7:3] to the 32:1 select newest-first (sel[0] =
// d[7]) and the 8:1 select as {u, z} are this design's choices.
module xorfree_encoder_core
  import xorfree_pkg::*;
#(
  parameter poly_t G0 = G0_DEFAULT,
  parameter poly_t G1 = G1_DEFAULT
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   rw,
  input  state_t d,
  input  logic   u,
  output sym_t   eop
);

  // The sixth cell is outside both the select and the column tag.
  if (G0[2] || G1[2]) begin : g_bad_poly
    $error("xorfree_encoder_core: generators must not tap state cell 6");
  end

  logic [ISO_BITS-1:0] iso_sel;
  sym_t                z;
  logic [2:0]          adr;

  always_comb
    for (int k = 0; k < ISO_BITS; k++) iso_sel[k] = d[NSTATE-1-k];

  isostate_mux32 #(.G0(G0), .G1(G1)) u1 (
    .sel (iso_sel),
    .z   (z)
  );

  restore_mux8 #(.G0(G0), .G1(G1)) u2 (
    .sl ({u, z}),
    .b  (d[CT_BITS-1:0]),
    .c  (adr)
  );

  reduced_rom #(.G0(G0), .G1(G1)) u3 (
    .clk     (clk),
    .rst     (rst),
    .rw      (rw),
    .address (adr),
    .dout    (eop)
  );

endmodule
