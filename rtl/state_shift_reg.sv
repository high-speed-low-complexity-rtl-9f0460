// Encoder state shift register.
//
// K-1 delay cells. On a rising clock edge with en = 1 the information bit
// enters the MSB cell and every cell moves one place towards the LSB; the
// LSB cell's bit leaves the encoder's memory. rst clears all cells at once
// (asynchronous, active high), the all-zero start state of a convolutional
// encoder.
//
// Interface: state[K-2] is the newest cell, state[0] the oldest.
//
// The cell count and the input entering at the MSB follow the design
// description; the enable and reset are this design's choice.
module state_shift_reg #(
  parameter int unsigned K = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         din,
  output logic [K-2:0] state
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     state <= '0;
    else if (en) state <= {din, state[K-2:1]};
  end

endmodule
