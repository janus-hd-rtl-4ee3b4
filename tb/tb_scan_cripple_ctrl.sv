// tb_scan_cripple_ctrl: self-checking test of the sticky scan-mode detector.
// Checks that 'cripple' is low after power-on reset while scan enable stays
// low, rises in the same cycle scan enable does, stays high after scan enable
// falls, and is cleared only by reset.
module tb_scan_cripple_ctrl;
  logic clk = 0, rst_n = 0, se = 0, cripple;
  int checks = 0, failures = 0;

  scan_cripple_ctrl dut (.clk, .rst_n, .se, .cripple);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int round = 0; round < 20; round++) begin
      int quiet, scan_len, after;
      rst_n = 0; se = 0;
      @(negedge clk); #1;
      check(cripple == 0, "low in reset");
      rst_n = 1;
      quiet = $urandom_range(1, 8);
      repeat (quiet) begin @(negedge clk); check(cripple == 0, "low before scan"); end
      se = 1; #1;
      check(cripple == 1, "high with se");
      scan_len = $urandom_range(1, 4);
      repeat (scan_len) begin @(negedge clk); check(cripple == 1, "high during scan"); end
      se = 0;
      after = $urandom_range(1, 10);
      repeat (after) begin
        @(negedge clk);
        check(cripple == 1, "sticky after scan");
      end
    end
    rst_n = 0; #1;
    check(cripple == 0, "cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
