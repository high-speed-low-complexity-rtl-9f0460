// Self-checking testbench for xorfree_encoder_core.
// Presents every one of the 256 states with both input bits and compares
// eop, one clock later, with a conventional XOR encoder worked out from the
// cdma2000 tap lists (c0: input, cells 1 2 3 5 7 8; c1: input, cells 2 3 4
// 8; d[7] is cell 1). Also checks the known vector d = 10101010, u = 1 ->
// eop = 10, and that eop holds while rw = 0.
module tb_xorfree_encoder_core;
  logic       clk = 1'b0;
  logic       rst, rw, u;
  logic [7:0] d;
  logic [1:0] eop;
  int checks = 0, failures = 0;

  xorfree_encoder_core dut (.clk(clk), .rst(rst), .rw(rw), .d(d), .u(u), .eop(eop));

  always #5 clk = ~clk;

  function automatic logic [1:0] xor_encoder(input logic ub, input logic [7:0] s);
    logic [8:1] c;
    for (int i = 1; i <= 8; i++) c[i] = s[8-i];
    return {ub ^ c[1] ^ c[2] ^ c[3] ^ c[5] ^ c[7] ^ c[8],
            ub ^ c[2] ^ c[3] ^ c[4] ^ c[8]};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rw = 1'b0; u = 1'b0; d = '0;
    #12 rst = 1'b0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      d = 8'(i >> 1); u = i[0]; rw = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (eop !== xor_encoder(u, d)) begin
        failures++;
        $display("FAIL d=%b u=%b eop=%b expected %b", d, u, eop, xor_encoder(u, d));
      end
    end
    @(negedge clk);
    d = 8'b10101010; u = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (eop !== 2'b10) begin failures++; $display("FAIL known vector eop=%b", eop); end
    @(negedge clk);
    rw = 1'b0; d = 8'b10101011;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (eop !== 2'b10) begin failures++; $display("FAIL hold eop=%b", eop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
