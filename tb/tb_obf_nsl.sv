// tb_obf_nsl: self-checking test of the obfuscated next-state logic.
// Holds its own copy of the example machine: the original transitions, the
// code of every transformed state, its partition and whether it is an
// entrance state. For every used code and input it reads the NSL output the
// way the state's own partition prescribes (D: load, T: toggle) and checks
// that the result is a code of the right original next state, that moves
// across partitions land on entrance (on-set) codes and moves within a
// partition on internal (off-set) codes. Unused codes must give the reset
// code. It also counts how many transitions the wrong reading gets wrong.
module tb_obf_nsl;
  logic [3:0] state, y;
  logic       x;
  int checks = 0, failures = 0, wrong_reading = 0;

  obf_nsl dut (.state, .x, .y);

  // original machine: next state on 0 and on 1
  int unsigned nxt0 [8] = '{0, 2, 3, 0, 6, 7, 4, 5};
  int unsigned nxt1 [8] = '{1, 1, 4, 5, 2, 6, 7, 0};
  // transformed states
  logic [3:0]  code [9] = '{4'b0000, 4'b0001, 4'b0100, 4'b0010, 4'b1000,
                            4'b0011, 4'b1110, 4'b0101, 4'b1101};
  int unsigned orig [9] = '{0, 1, 2, 2, 3, 4, 5, 6, 7};
  bit          is_t [9] = '{0, 0, 1, 1, 0, 1, 1, 1, 0};
  bit          entr [9] = '{0, 0, 1, 0, 1, 0, 1, 0, 1};

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(input logic [3:0] c);
    for (int i = 0; i < 9; i++) if (code[i] == c) return i;
    return -1;
  endfunction

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s state=%b x=%b y=%b", what, state, x, y); end
  endtask

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int xi = 0; xi < 2; xi++) begin
        int i, j, jw;
        int unsigned want;
        logic [3:0] nxt, wrong;
        state = 4'(s); x = 1'(xi);
        #1;
        i = find(state);
        if (i < 0) begin
          check(y == 4'b0000, "unused code goes to reset");
          continue;
        end
        nxt   = is_t[i] ? (state ^ y) : y;
        wrong = is_t[i] ? y : (state ^ y);
        want  = xi ? nxt1[orig[i]] : nxt0[orig[i]];
        j = find(nxt);
        check(j >= 0, "lands on a used code");
        if (j < 0) continue;
        check(orig[j] == want, "right original state");
        check(entr[j] == (is_t[j] != is_t[i]), "entrance copy iff crossing");
        check(($countones(nxt ^ 4'b1100) == 1) == entr[j], "entrance codes in on-set");
        jw = find(wrong);
        if (jw < 0 || orig[jw] != want) wrong_reading++;
      end
    end
    // the static opposite reading must break at least one transition
    check(wrong_reading > 0, "wrong reading corrupts");
    $display("transitions broken by the opposite reading: %0d of 18", wrong_reading);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
