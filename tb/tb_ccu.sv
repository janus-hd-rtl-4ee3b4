// tb_ccu: self-checking test of the configuration control unit.
// Drives random incoming states (biased so that about a third lie at distance
// h from the key) and random scan enable pulses. A reference model keeps the
// expected configuration: it toggles on each incoming on-set state until scan
// enable is first seen, after which the output must be the dummy
// configuration and the stored value must no longer change.
module tb_ccu;
  import janus_hd_pkg::*;
  localparam int N = 6;
  localparam int H = 2;
  logic clk = 0, rst_n = 0, se = 0;
  logic [N-1:0] key, state_next;
  ff_cfg_e cfg;
  logic cripple;
  int checks = 0, failures = 0, flips = 0, holds = 0, frozen = 0;

  ccu #(.N(N), .H(H), .INIT_CFG(CFG_T), .DUMMY_CFG(CFG_D)) dut (
    .clk, .rst_n, .se, .key, .state_next, .cfg, .cripple);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [N-1:0] at_distance(input logic [N-1:0] k, input int dd);
    logic [N-1:0] r;
    int p;
    r = k;
    for (int i = 0; i < dd; i++) begin
      do p = $urandom_range(N - 1); while (r[p] != k[p]);
      r[p] = ~r[p];
    end
    return r;
  endfunction

  initial begin
    ff_cfg_e model;
    logic seen;
    for (int round = 0; round < 10; round++) begin
      @(negedge clk);
      rst_n = 0; se = 0;
      key = N'($urandom);
      state_next = '0;
      #1;
      check(cfg == CFG_T, "reset configuration");
      @(negedge clk);   // hold reset across a clock edge
      rst_n = 1;
      model = CFG_T; seen = 0;
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        state_next = ($urandom_range(2) == 0) ? at_distance(key, H) : N'($urandom);
        se = (i > 250) && ($urandom_range(40) == 0);
        #1;
        if (se) seen = 1;
        check(cripple == seen, "cripple");
        check(cfg == (seen ? CFG_D : model), "cfg output");
        if ($countones(state_next ^ key) == H) begin
          if (!seen) begin model = ff_cfg_e'(~model); flips++; end
          else frozen++;
        end else holds++;
        @(posedge clk); #1;
        if (seen) check(cfg == CFG_D, "dummy after scan");
        else      check(cfg == model, "cfg after edge");
      end
    end
    check(flips > 0 && holds > 0 && frozen > 0, "flip, hold and frozen cases seen");
    $display("flips %0d holds %0d frozen hits %0d", flips, holds, frozen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
