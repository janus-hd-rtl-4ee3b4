// obf_nsl: obfuscated next-state logic of the example JANUS-HD machine.
//
// Combinational. For present state code 'state' and input 'x' it returns the
// value 'y' to feed the reconfigurable state flip-flops. For a state s of
// partition V_D moving to t, y is code(t) (read by D flip-flops); for a state
// of V_T, y is code(s) ^ code(t) (read by T flip-flops). The move targets the
// entrance copy of a duplicated state when it crosses partitions and the
// internal copy otherwise. Unused codes lead to the reset state.
// The rule is the published one; the example machine and its encoding are
// this design's own and are listed in janus_hd_pkg. The table is built at
// elaboration from the formula in janus_hd_pkg::obf_next.
module obf_nsl
  import janus_hd_pkg::*;
(
  input  logic [STATE_W-1:0] state,
  input  logic [IN_W-1:0]    x,
  output logic [STATE_W-1:0] y
);

  localparam int unsigned ROWS = 2 ** (STATE_W + IN_W);

  function automatic logic [STATE_W-1:0] table_row(input int unsigned r);
    return obf_next(STATE_W'(r >> IN_W), IN_W'(r));
  endfunction

  logic [STATE_W-1:0] nsl_rom [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign nsl_rom[r] = table_row(r);
  end

  assign y = nsl_rom[{state, x}];

endmodule
