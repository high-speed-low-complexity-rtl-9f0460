// Self-checking testbench for isostate_mux32.
// Sweeps all 32 select values and compares z with the {c0, c1} code word of
// the five newest cells worked out from the cdma2000 tap lists
// (c0: cells 1 2 3 5, c1: cells 2 3 4; sel[k] is cell k+1). Also checks the
// known vector sel = 10110 -> z = 10.
module tb_isostate_mux32;
  logic [4:0] sel;
  logic [1:0] z;
  int checks = 0, failures = 0;

  isostate_mux32 dut (.sel(sel), .z(z));

  function automatic logic [1:0] expect_z(input logic [4:0] s);
    logic [8:1] d;
    d = '0;
    d[5:1] = s;
    return {d[1] ^ d[2] ^ d[3] ^ d[5], d[2] ^ d[3] ^ d[4]};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      sel = 5'(i);
      #1;
      checks++;
      if (z !== expect_z(sel)) begin
        failures++;
        $display("FAIL sel=%b z=%b expected %b", sel, z, expect_z(sel));
      end
    end
    sel = 5'b10110;
    #1;
    checks++;
    if (z !== 2'b10) begin
      failures++;
      $display("FAIL known vector sel=10110 z=%b expected 10", z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
