// tb_reconfig_ff: self-checking test of the reconfigurable scan register.
// Random configuration, NSL value, scan enable and scan input every cycle; a
// reference model computes D loading, T toggling and shifting independently.
// Also checks reset value, q_next and the scan output.
module tb_reconfig_ff;
  import janus_hd_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  ff_cfg_e cfg;
  logic [N-1:0] d, q, q_next, model;
  logic se, si, so;
  int checks = 0, failures = 0;
  int n_d = 0, n_t = 0, n_s = 0;

  reconfig_ff #(.N(N), .RESET_VAL(4'b1010)) dut (
    .clk, .rst_n, .cfg, .d, .se, .si, .so, .q, .q_next);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    cfg = CFG_D; d = '0; se = 0; si = 0;
    #12;
    check(q == 4'b1010, "reset value");
    rst_n = 1;
    model = 4'b1010;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cfg = ff_cfg_e'($urandom_range(1));
      d   = 4'($urandom);
      se  = ($urandom_range(3) == 0);
      si  = 1'($urandom);
      #1;
      if (se)              begin model = {model[N-2:0], si}; n_s++; end
      else if (cfg == CFG_T) begin model = model ^ d;          n_t++; end
      else                 begin model = d;                    n_d++; end
      check(q_next == model, "q_next");
      @(posedge clk); #1;
      check(q == model, "q");
      check(so == model[N-1], "so");
    end
    check(n_d > 0 && n_t > 0 && n_s > 0, "all modes used");
    $display("D loads %0d, T toggles %0d, shifts %0d", n_d, n_t, n_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
