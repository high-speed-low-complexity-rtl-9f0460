// Reduced ROM with registered output ("data compression ROM").
//
// Eight 2-bit words: two rows of four columns. The row is the row tag from
// the 8:1 restoring multiplexer, the column the column tag (the two oldest
// state cells). Row 0 holds the code word of the column-tag cells alone;
// row 1 holds row 0 with c0 inverted. Halving the four-row table of the
// earlier XOR-free encoder is the point of the design.
//
// Interface: address = {row tag, column tag}. dout is registered: it takes
// the word at address on the rising clock edge when rw is 1 and holds
// otherwise; rst clears it to 00 at once (asynchronous, active high). One
// clock of latency.
//
// Contents follow the printed table: ram[0..7] = 00 11 10 01 10 01 00 11.
// They are computed from the generator parameters, which reproduce it by
// default. The two output flip-flops with enable and clear follow the
// design's synthesised netlist; the polarity of rst and rw is this design's
// choice.
module reduced_rom
  import xorfree_pkg::*;
#(
  parameter poly_t G0 = G0_DEFAULT,
  parameter poly_t G1 = G1_DEFAULT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rw,
  input  logic [2:0] address,
  output sym_t       dout
);

  typedef sym_t [7:0] rom_t;

  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < 8; a++) r[a] = rom_entry(G0, G1, 3'(a));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     dout <= '0;
    else if (rw) dout <= ROM[address];
  end

endmodule
