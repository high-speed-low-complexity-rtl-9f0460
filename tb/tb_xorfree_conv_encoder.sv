// End-to-end testbench for xorfree_conv_encoder at its default parameters.
//
// Part 1: 2000 random information bits with random idle cycles and one
// reset in mid-stream. Every symbol is compared with a conventional XOR
// shift-register encoder (cdma2000 generators 753/561 as tap lists) and
// must appear exactly one clock after its bit.
// Part 2: one cdma2000 rate-1/2 frame of 192 bits (184 data bits and eight
// zero tail bits), encoded back to back; the 384 code symbols are checked
// and, after the tail, eight zero bits must give eight 00 symbols (the
// encoder is back in the all-zero state).
//
// Each mechanism of the design is counted and must occur at least once:
// each of the four folds of the restoring multiplexer (row 0 or 1, column
// LSB kept or inverted), an input bit of 1 (restoring), an idle cycle
// (stall, output held), and a reset.
module tb_xorfree_conv_encoder;
  logic       clk = 1'b0;
  logic       rst, in_valid, in_bit;
  logic       out_valid;
  logic [1:0] out_sym;
  int checks = 0, failures = 0;
  int n_fold [4];
  int n_input_one = 0, n_stall = 0, n_reset = 0, n_frame_syms = 0;
  logic [8:1] cells;  // reference encoder: cells[1] newest

  xorfree_conv_encoder dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_bit(in_bit),
    .out_valid(out_valid), .out_sym(out_sym)
  );

  always #5 clk = ~clk;

  function automatic logic [1:0] xor_encoder(input logic ub, input logic [8:1] c);
    return {ub ^ c[1] ^ c[2] ^ c[3] ^ c[5] ^ c[7] ^ c[8],
            ub ^ c[2] ^ c[3] ^ c[4] ^ c[8]};
  endfunction

  // Which stored row / column fold a bit needs: the partial symbol of the
  // input bit and cells 1..5, p = {p0, p1}; row = p0 ^ p1, fold = p1.
  function automatic int fold_case(input logic ub, input logic [8:1] c);
    logic p0, p1;
    p0 = ub ^ c[1] ^ c[2] ^ c[3] ^ c[5];
    p1 = ub ^ c[2] ^ c[3] ^ c[4];
    return int'({p0 ^ p1, p1});
  endfunction

  task automatic push(input logic b);
    logic [1:0] exp;
    @(negedge clk);
    in_valid = 1'b1;
    in_bit   = b;
    exp = xor_encoder(b, cells);
    n_fold[fold_case(b, cells)]++;
    if (b) n_input_one++;
    @(posedge clk);
    cells = {cells[7:1], b};
    #1;
    checks++;
    if (out_valid !== 1'b1 || out_sym !== exp) begin
      failures++;
      $display("FAIL t=%0t out_valid=%b out_sym=%b expected %b", $time,
               out_valid, out_sym, exp);
    end
  endtask

  task automatic idle();
    logic [1:0] held;
    @(negedge clk);
    held = out_sym;
    in_valid = 1'b0;
    in_bit   = 1'($urandom);
    n_stall++;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0 || out_sym !== held) begin
      failures++;
      $display("FAIL stall t=%0t out_valid=%b out_sym=%b held %b", $time,
               out_valid, out_sym, held);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_bit = 1'b0; cells = '0;
    #12 rst = 1'b0;

    // Part 1: random stream with stalls and a reset.
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(0, 4) == 0) idle();
      push(1'($urandom));
      if (i == 1000) begin
        @(negedge clk);
        in_valid = 1'b0;
        #2 rst = 1'b1;
        #1 checks++;
        if (out_valid !== 1'b0 || out_sym !== 2'b00) begin
          failures++;
          $display("FAIL reset did not clear the output");
        end
        cells = '0;
        n_reset++;
        @(negedge clk) rst = 1'b0;
      end
    end

    // Part 2: one 192-bit frame, 184 data bits then 8 zero tail bits,
    // starting from the zero state.
    @(negedge clk);
    in_valid = 1'b0;
    #2 rst = 1'b1;
    cells = '0;
    n_reset++;
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < 192; i++) begin
      push(i < 184 ? 1'($urandom) : 1'b0);
      n_frame_syms++;
    end
    checks++;
    if (cells !== 8'h00) begin
      failures++;
      $display("FAIL reference model not in state 0 after the tail");
    end
    // Back in the zero state: eight more zero bits must give eight 00
    // symbols (push compares each with the reference, which expects 00).
    for (int i = 0; i < 8; i++) push(1'b0);

    for (int f = 0; f < 4; f++) begin
      checks++;
      if (n_fold[f] == 0) begin failures++; $display("FAIL fold %0d never used", f); end
    end
    checks++;
    if (n_input_one == 0 || n_stall == 0 || n_reset == 0 || n_frame_syms != 192) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("folds row0/keep=%0d row0/invert=%0d row1/keep=%0d row1/invert=%0d",
             n_fold[0], n_fold[1], n_fold[2], n_fold[3]);
    $display("input ones=%0d stalls=%0d resets=%0d frame symbols=%0d",
             n_input_one, n_stall, n_reset, 2 * n_frame_syms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
