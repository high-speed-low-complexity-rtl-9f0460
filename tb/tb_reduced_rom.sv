// Self-checking testbench for reduced_rom.
// Reads all eight words and compares them with the printed table
// (00 11 10 01 10 01 00 11), checks the one-clock read latency, that dout
// holds while rw = 0, and that rst clears dout without a clock edge.
module tb_reduced_rom;
  logic       clk = 1'b0;
  logic       rst, rw;
  logic [2:0] address;
  logic [1:0] dout;
  int checks = 0, failures = 0;

  localparam logic [1:0] PRINTED_ROM [8] = '{2'b00, 2'b11, 2'b10, 2'b01,
                                             2'b10, 2'b01, 2'b00, 2'b11};

  reduced_rom dut (.clk(clk), .rst(rst), .rw(rw), .address(address), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(input logic [1:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: dout=%b expected %b", what, dout, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rw = 1'b0; address = '0;
    #12 rst = 1'b0;
    check(2'b00, "after reset");
    for (int a = 0; a < 8; a++) begin
      @(negedge clk);
      address = 3'(a); rw = 1'b1;
      #1 check(a == 0 ? 2'b00 : PRINTED_ROM[a-1], "before edge");
      @(posedge clk); #1;
      check(PRINTED_ROM[a], $sformatf("read %0d", a));
    end
    // hold with rw = 0
    @(negedge clk);
    address = 3'd1; rw = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(PRINTED_ROM[7], "hold with rw=0");
    // asynchronous clear
    @(negedge clk);
    #2 rst = 1'b1;
    #1 check(2'b00, "async clear");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
