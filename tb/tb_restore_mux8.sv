// Self-checking testbench for restore_mux8.
// For every select {u, z} and column tag b, the address c must land on a
// word of the printed reduced ROM (00 11 10 01 10 01 00 11) that equals the
// wanted symbol: z, inverted in both bits when u = 1, combined with the
// column-tag contribution (cell 7 gives 10, cell 8 gives 11). The MSB of
// the column tag must pass through untouched. Also checks the known vector
// z = 01, b = 01, u = 1 -> c = 101.
module tb_restore_mux8;
  logic [2:0] sl;
  logic [1:0] b;
  logic [2:0] c;
  int checks = 0, failures = 0;

  localparam logic [1:0] PRINTED_ROM [8] = '{2'b00, 2'b11, 2'b10, 2'b01,
                                             2'b10, 2'b01, 2'b00, 2'b11};

  restore_mux8 dut (.sl(sl), .b(b), .c(c));

  function automatic logic [1:0] wanted(input logic [2:0] s, input logic [1:0] ct);
    logic [1:0] w;
    w = s[1:0];
    if (s[2]) w = ~w;
    if (ct[1]) w = {~w[1], w[0]};
    if (ct[0]) w = ~w;
    return w;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 4; j++) begin
        sl = 3'(i);
        b  = 2'(j);
        #1;
        checks++;
        if (PRINTED_ROM[c] !== wanted(sl, b) || c[1] !== b[1]) begin
          failures++;
          $display("FAIL sl=%b b=%b c=%b rom=%b wanted %b", sl, b, c,
                   PRINTED_ROM[c], wanted(sl, b));
        end
      end
    sl = 3'b101;
    b  = 2'b01;
    #1;
    checks++;
    if (c !== 3'b101) begin
      failures++;
      $display("FAIL known vector c=%b expected 101", c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
