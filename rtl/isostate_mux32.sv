// 32:1 multiplexer for the isomorphic state ("selection of MUX logic").
//
// The five newest state cells select one of 32 constant 2-bit words. Each
// word is the {c0, c1} code word those five cells would give through the
// generator polynomials with the input bit taken as 0, so the XOR tree of
// those taps is replaced by a multiplexer over precomputed constants. The
// output is the "new row tag" handed to the 8:1 restoring multiplexer.
//
// Interface: sel[0] is the newest cell (s[7]), sel[4] the fifth (s[3]).
// Purely combinational.
//
// The multiplexer size (5 select bits, 2-bit words) follows the design
// description; the table contents are not printed there and are computed
// here from the generator parameters. With the default cdma2000 generators
// sel = 5'b10110 gives z = 2'b10, the value shown in the design's own
// simulation of this block.
module isostate_mux32
  import xorfree_pkg::*;
#(
  parameter poly_t G0 = G0_DEFAULT,
  parameter poly_t G1 = G1_DEFAULT
) (
  input  logic [ISO_BITS-1:0] sel,
  output sym_t                z
);

  typedef sym_t [2**ISO_BITS-1:0] iso_table_t;

  function automatic iso_table_t build_table();
    iso_table_t t;
    for (int i = 0; i < 2**ISO_BITS; i++)
      t[i] = iso_entry(G0, G1, ISO_BITS'(i));
    return t;
  endfunction

  localparam iso_table_t TABLE = build_table();

  always_comb z = TABLE[sel];

endmodule
