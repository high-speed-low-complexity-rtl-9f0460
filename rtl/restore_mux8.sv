// 8:1 restoring multiplexer ("XOR free MUX controller").
//
// The full table of code words has four rows, selected by the 2-bit partial
// code word of the input bit and the five newest cells. The rows come in
// complementary pairs, so only two are stored (the reduced ROM). This
// multiplexer maps each of the four cases onto a stored row and, where the
// wanted row is the complement of a stored one, inverts the column-tag LSB:
// the oldest cell is tapped by both generators, so inverting it inverts
// both output bits. The input bit is handled the same way ("restoring":
// an input of 1 inverts every output bit the input is tapped into).
//
// Interface: sl = {u, z}: u is the information bit, z the new row tag from
// the 32:1 multiplexer; b is the column tag {s[1], s[0]}; c is the reduced
// ROM address {row tag, column tag}. Purely combinational; the only logic
// besides the multiplexer is one inverter on b[0].
//
// The 8:1 size and the 3-bit address follow the design description. The
// assignment of the eight inputs is this design's own, derived from the
// generator parameters; with the defaults, z = 01, b = 01 and u = 1 give
// c = 101, the value in the design's own simulation of this block.
module restore_mux8
  import xorfree_pkg::*;
#(
  parameter poly_t G0 = G0_DEFAULT,
  parameter poly_t G1 = G1_DEFAULT
) (
  input  logic [2:0] sl,
  input  logic [1:0] b,
  output logic [2:0] c
);

  // The fold needs the oldest cell tapped by both generators.
  if (!(G0[0] && G1[0])) begin : g_bad_poly
    $error("restore_mux8: both generators must tap the oldest state cell");
  end

  typedef logic [7:0][1:0] restore_table_t;  // per input: {rt, flip}

  function automatic restore_table_t build_table();
    restore_table_t t;
    for (int i = 0; i < 8; i++) t[i] = restore_entry(G0, G1, 3'(i));
    return t;
  endfunction

  localparam restore_table_t TABLE = build_table();

  logic [7:0][2:0] cand;  // the eight multiplexer inputs
  logic            b0_n;

  always_comb begin
    b0_n = ~b[0];
    for (int i = 0; i < 8; i++)
      cand[i] = {TABLE[i][1], b[1], TABLE[i][0] ? b0_n : b[0]};
    c = cand[sl];
  end

endmodule
