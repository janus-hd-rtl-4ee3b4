// tb_janus_hd_top: end-to-end test of the JANUS-HD obfuscated FSM at its
// default parameters.
// The testbench keeps its own description of the example machine (original
// transitions, transformed states with code, partition and entrance flag) and
// from it an independent reference. Phases:
//   1. correct key 1100: 3000 random inputs; the state code must be exactly
//      the one the transformed machine predicts (entrance copy on crossing
//      moves, internal copy otherwise), so the machine follows the original.
//   2. every wrong key: 300 random inputs each; counts the keys and cycles
//      for which the machine leaves the original behaviour.
//   3. scan: after some functional cycles, scan enable shifts a chosen state
//      in while the old one comes out on so; afterwards the machine must run
//      under the fixed D reading of the NSL (dummy configuration), which the
//      reference predicts, and scan_used must stay high; then 20 structural
//      tests (scan in a random pattern, capture one cycle, scan out) must
//      show the dummy-configuration successor of each pattern.
//   4. a new power-on reset restores correct operation.
// Each mechanism (configuration flip at an entrance state, D and T moves,
// both copies of the duplicated state, wrong-key corruption, scan shifting,
// dummy-configuration moves, scan capture tests, recovery by reset) is counted and must occur.
module tb_janus_hd_top;
  logic       clk = 0, rst_n = 0;
  logic       x = 0, se = 0, si = 0, so, scan_used;
  logic [3:0] key = 4'b1100;
  logic [3:0] state;
  int checks = 0, failures = 0;

  janus_hd_top dut (.clk, .rst_n, .x, .key, .se, .si, .so, .state, .scan_used);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference description of the example machine ----
  int unsigned nxt0 [8] = '{0, 2, 3, 0, 6, 7, 4, 5};
  int unsigned nxt1 [8] = '{1, 1, 4, 5, 2, 6, 7, 0};
  logic [3:0]  code [9] = '{4'b0000, 4'b0001, 4'b0100, 4'b0010, 4'b1000,
                            4'b0011, 4'b1110, 4'b0101, 4'b1101};
  int unsigned orig [9] = '{0, 1, 2, 2, 3, 4, 5, 6, 7};
  bit          is_t [9] = '{0, 0, 1, 1, 0, 1, 1, 1, 0};
  bit          entr [9] = '{0, 0, 1, 0, 1, 0, 1, 0, 1};

  // mechanism counters
  int n_flip = 0, n_dmove = 0, n_tmove = 0, n_s2a = 0, n_s2b = 0;
  int n_bad_keys = 0, n_bad_cycles = 0, n_shift = 0, n_dummy = 0, n_dummy_wrong = 0;
  int n_recover = 0, n_capture = 0;

  function automatic int find(input logic [3:0] c);
    for (int i = 0; i < 9; i++) if (code[i] == c) return i;
    return -1;
  endfunction

  // transformed state entered from transformed state i on input b
  function automatic int xf_next(input int i, input logic b);
    int unsigned o;
    o = b ? nxt1[orig[i]] : nxt0[orig[i]];
    for (int j = 0; j < 9; j++)
      if (orig[j] == o && entr[j] == (is_t[j] != is_t[i])) return j;
    return -1;
  endfunction

  // state reached when the NSL output is always loaded as by D flip-flops
  function automatic logic [3:0] d_reading(input logic [3:0] c, input logic b);
    int i, j;
    i = find(c);
    if (i < 0) return 4'b0000;
    j = xf_next(i, b);
    return is_t[i] ? (c ^ code[j]) : code[j];
  endfunction

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t state=%b", what, $time, state); end
  endtask

  task automatic power_on();
    rst_n = 0; se = 0; x = 0;
    @(negedge clk);
    rst_n = 1;
  endtask

  // one functional cycle under the correct key, checked against the reference
  task automatic good_step(inout int cur);
    int nx;
    x = 1'($urandom);
    nx = xf_next(cur, x);
    @(posedge clk); #1;
    check(state == code[nx], "correct-key transition");
    if (is_t[cur]) n_tmove++; else n_dmove++;
    if (is_t[nx] != is_t[cur]) n_flip++;
    if (nx == 2) n_s2a++;
    if (nx == 3) n_s2b++;
    cur = nx;
    @(negedge clk);
  endtask

  initial begin
    int cur;
    // ---- phase 1: correct key ----
    key = 4'b1100;
    power_on();
    #1;
    check(state == 4'b0000 && scan_used == 0, "reset state");
    cur = 0;
    for (int i = 0; i < 3000; i++) good_step(cur);

    // ---- phase 2: every wrong key ----
    for (int k = 0; k < 16; k++) begin
      int unsigned o;
      int bad;
      if (k == 12) continue;
      key = 4'(k);
      power_on();
      o = 0; bad = 0;
      for (int i = 0; i < 300; i++) begin
        int j;
        x = 1'($urandom);
        o = x ? nxt1[o] : nxt0[o];
        @(posedge clk); #1;
        j = find(state);
        if (j < 0 || orig[j] != o) begin
          bad++;
          // resynchronise the reference to what the machine shows
          if (j >= 0) o = orig[j];
        end
        @(negedge clk);
      end
      if (bad > 0) n_bad_keys++;
      n_bad_cycles += bad;
    end
    check(n_bad_keys > 0, "wrong keys corrupt");

    // ---- phase 3: scan access ----
    key = 4'b1100;
    power_on();
    cur = 0;
    for (int i = 0; i < 37; i++) good_step(cur);
    begin
      logic [3:0] old, chosen;
      old = state;
      chosen = 4'b1000;           // an entrance state (S3)
      se = 1;
      for (int b = 3; b >= 0; b--) begin
        si = chosen[b];
        #1;
        check(so == old[b], "scan out");
        check(scan_used == 1, "scan_used during scan");
        @(posedge clk); #1;
        n_shift++;
        @(negedge clk);
      end
      check(state == chosen, "scanned-in state");
      se = 0;
    end
    for (int i = 0; i < 400; i++) begin
      logic [3:0] exp;
      int j;
      x = 1'($urandom);
      exp = d_reading(state, x);
      @(posedge clk); #1;
      check(state == exp, "dummy-configuration transition");
      check(scan_used == 1, "scan_used sticky");
      n_dummy++;
      @(negedge clk);
    end
    // structural test as a tester runs it: scan in, capture one cycle under
    // the dummy configuration, scan out and compare
    for (int t = 0; t < 20; t++) begin
      logic [3:0] pat, cap, got;
      pat = 4'($urandom);
      se = 1;
      for (int b = 3; b >= 0; b--) begin
        si = pat[b];
        @(posedge clk); #1;
        @(negedge clk);
      end
      se = 0;
      x = 1'($urandom);
      cap = d_reading(pat, x);
      @(posedge clk); #1;
      @(negedge clk);
      se = 1;
      for (int b = 3; b >= 0; b--) begin
        #1;
        got[b] = so;
        si = 1'($urandom);
        @(posedge clk); #1;
        @(negedge clk);
      end
      se = 0;
      check(got == cap, "scan capture");
      n_capture++;
    end
    // how often the fixed reading differs from the original machine
    for (int i = 0; i < 9; i++)
      for (int b = 0; b < 2; b++)
        if (d_reading(code[i], 1'(b)) != code[xf_next(i, 1'(b))]) n_dummy_wrong++;
    check(n_dummy_wrong > 0, "dummy configuration differs from original");

    // ---- phase 4: recovery by power-on reset ----
    power_on();
    #1;
    check(scan_used == 0 && state == 4'b0000, "cleared by power-on reset");
    cur = 0;
    for (int i = 0; i < 200; i++) begin
      int fails_before;
      fails_before = failures;
      good_step(cur);
      if (failures == fails_before) n_recover++;
    end

    $display("config flips %0d, D moves %0d, T moves %0d, S2A %0d, S2B %0d",
             n_flip, n_dmove, n_tmove, n_s2a, n_s2b);
    $display("wrong keys corrupting %0d of 15, corrupted cycles %0d of 4500",
             n_bad_keys, n_bad_cycles);
    $display("scan shifts %0d, dummy moves %0d, transitions changed by dummy reading %0d of 18, recovered %0d",
             n_shift, n_dummy, n_dummy_wrong, n_recover);
    check(n_flip > 0,  "config flip occurred");
    check(n_dmove > 0, "D move occurred");
    check(n_tmove > 0, "T move occurred");
    check(n_s2a > 0,   "entrance copy visited");
    check(n_s2b > 0,   "internal copy visited");
    check(n_shift > 0, "scan shift occurred");
    check(n_dummy > 0, "dummy move occurred");
    check(n_recover > 0, "recovery occurred");
    check(n_capture > 0, "scan capture test occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
