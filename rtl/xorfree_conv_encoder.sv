// Serial rate-1/2, constraint-length-9 convolutional encoder without XOR
// gates (top level).
//
// One information bit per clock enters through in_bit with in_valid = 1.
// The code symbol {c0, c1} for that bit, computed from the bit and the
// eight-cell state before it is shifted in, appears on out_sym one clock
// later with out_valid = 1. The state register shifts on the same edge, so
// the encoder accepts a bit every clock. With in_valid = 0 nothing moves
// and out_valid falls. rst (asynchronous, active high) clears the state to
// all zeros and the output to 00.
//
// Default generators are the cdma2000 pair g0 = 753, g1 = 561 (octal); any
// pair of the same length and rate that taps the oldest cell in both and
// not the sixth cell can be given as parameters.
//
// The state register and the XOR-free core follow the design description;
// the valid handshake and the out_valid flip-flop are this design's own.
// Two assertions state the handshake rule. Because they name rst in their
// disable clause, Verilator's lint reports rst as used both synchronously
// and asynchronously; the logic itself uses rst only as an asynchronous
// clear.
module xorfree_conv_encoder
  import xorfree_pkg::*;
#(
  parameter poly_t G0 = G0_DEFAULT,
  parameter poly_t G1 = G1_DEFAULT
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output sym_t out_sym
);

  state_t state;

  state_shift_reg #(.K(K)) u_sr (
    .clk   (clk),
    .rst   (rst),
    .en    (in_valid),
    .din   (in_bit),
    .state (state)
  );

  xorfree_encoder_core #(.G0(G0), .G1(G1)) u_core (
    .clk (clk),
    .rst (rst),
    .rw  (in_valid),
    .d   (state),
    .u   (in_bit),
    .eop (out_sym)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
  end

  // Handshake rule: a symbol is valid exactly one clock after its bit.
  a_symbol_follows_bit : assert property (
    @(posedge clk) disable iff (rst) in_valid |=> out_valid
  );
  a_no_symbol_without_bit : assert property (
    @(posedge clk) disable iff (rst) !in_valid |=> !out_valid
  );

endmodule
