// Self-checking testbench for state_shift_reg.
// Shifts 200 random bits with random enable gaps and compares the state
// with a model kept as the last eight accepted bits (newest in the MSB);
// also checks the asynchronous clear.
module tb_state_shift_reg;
  logic       clk = 1'b0;
  logic       rst, en, din;
  logic [7:0] state;
  logic [7:0] model;
  int checks = 0, failures = 0;

  state_shift_reg dut (.clk(clk), .rst(rst), .en(en), .din(din), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; din = 1'b0; model = '0;
    #12 rst = 1'b0;
    checks++;
    if (state !== 8'h00) begin failures++; $display("FAIL reset state %h", state); end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 1'($urandom);
      @(posedge clk);
      if (en) model = {din, model[7:1]};
      #1;
      checks++;
      if (state !== model) begin
        failures++;
        $display("FAIL step %0d state=%b expected %b", i, state, model);
      end
    end
    @(negedge clk);
    #2 rst = 1'b1;
    #1 checks++;
    if (state !== 8'h00) begin failures++; $display("FAIL async clear %h", state); end
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
