// janus_hd_pkg: types, constants and the example FSM shared by the JANUS-HD RTL.
//
// A JANUS-HD FSM runs every transition that leaves a state of partition V_D
// with its state flip-flops acting as D flip-flops, and every transition that
// leaves a state of V_T with them acting as T flip-flops. The next-state logic
// (NSL) is synthesised under that constraint, so no single fixed reading of the
// flip-flops recovers the original machine. A T flip-flop (the CCU) tracks the
// active configuration and toggles whenever the machine enters an "entrance
// state" (a state reached from the other partition); those states are encoded
// in the on-set of a key-controlled Hamming distance comparator.
//
// This package holds the example machine the RTL is built for. The example
// machine, its partition and its encoding are this design's own: they were made
// by applying the published flow (balanced bipartition with epsilon = 0.2 that
// minimises entrance states, duplication of mixed entrance states, HD-driven
// encoding) to an 8-state, 1-input FSM. The key 4'b1100 with h = 1 is the
// encoding example of the method; the on-set is then {0100,1000,1110,1101}.
//
// Original machine (state: next on x=0, next on x=1):
//   S0: S0,S1   S1: S2,S1   S2: S3,S4   S3: S0,S5
//   S4: S6,S2   S5: S7,S6   S6: S4,S7   S7: S5,S0
// Partition: V_D = {S0,S1,S3,S7}, V_T = {S2,S4,S5,S6} (4/4, 4 entrance states).
// S2 is entered both from V_D (S1 on 0) and from V_T (S4 on 1), so it is split
// into S2A (entrance, reached from S1) and S2B (internal, reached from S4).
package janus_hd_pkg;

  // Active flip-flop configuration held by the CCU.
  typedef enum logic {
    CFG_D = 1'b0,   // flip-flop loads the NSL output
    CFG_T = 1'b1    // flip-flop toggles where the NSL output is 1
  } ff_cfg_e;

  // Number of state flip-flops and primary inputs of the example machine.
  localparam int unsigned STATE_W = 4;
  localparam int unsigned IN_W    = 1;

  // Original machine.
  localparam int unsigned ORIG_STATES = 8;
  typedef logic [2:0] orig_state_t;
  localparam orig_state_t ORIG_NEXT [ORIG_STATES][2] = '{
    '{3'd0, 3'd1}, '{3'd2, 3'd1}, '{3'd3, 3'd4}, '{3'd0, 3'd5},
    '{3'd6, 3'd2}, '{3'd7, 3'd6}, '{3'd4, 3'd7}, '{3'd5, 3'd0}
  };

  // Transformed machine: 9 states (S2 duplicated), one row each.
  localparam int unsigned XF_STATES = 9;
  typedef struct packed {
    logic [2:0]         orig;      // original state it stands for
    ff_cfg_e            group;     // partition: configuration of its outgoing transitions
    logic               entrance;  // 1: entered only from the other partition
    logic [STATE_W-1:0] code;      // state encoding
  } xf_state_t;

  localparam xf_state_t XF [XF_STATES] = '{
    '{orig: 3'd0, group: CFG_D, entrance: 1'b0, code: 4'b0000},  // S0
    '{orig: 3'd1, group: CFG_D, entrance: 1'b0, code: 4'b0001},  // S1
    '{orig: 3'd2, group: CFG_T, entrance: 1'b1, code: 4'b0100},  // S2A
    '{orig: 3'd2, group: CFG_T, entrance: 1'b0, code: 4'b0010},  // S2B
    '{orig: 3'd3, group: CFG_D, entrance: 1'b1, code: 4'b1000},  // S3
    '{orig: 3'd4, group: CFG_T, entrance: 1'b0, code: 4'b0011},  // S4
    '{orig: 3'd5, group: CFG_T, entrance: 1'b1, code: 4'b1110},  // S5
    '{orig: 3'd6, group: CFG_T, entrance: 1'b0, code: 4'b0101},  // S6
    '{orig: 3'd7, group: CFG_D, entrance: 1'b1, code: 4'b1101}   // S7
  };

  // Reset state of the machine and the configuration its group needs.
  localparam logic [STATE_W-1:0] RESET_CODE = 4'b0000;
  localparam ff_cfg_e            RESET_CFG  = CFG_D;

  // Distance of the example encoding; its correct key is 4'b1100 and is not
  // part of the design (it enters on the key port).
  localparam int unsigned        EXAMPLE_H   = 1;

  // Index of the transformed state that the machine enters when it leaves a
  // state of group 'from_group' towards original state 'o': the entrance copy
  // when the move crosses partitions, the internal copy otherwise.
  function automatic int unsigned xf_target(input logic [2:0] o, input ff_cfg_e from_group);
    int unsigned idx;
    idx = 0;
    for (int unsigned i = 0; i < XF_STATES; i++) begin
      if (XF[i].orig == o) begin
        if ((XF[i].group != from_group) == XF[i].entrance) idx = i;
      end
    end
    return idx;
  endfunction

  // Obfuscated NSL as a formula: for a state s of group g entering state t,
  //   y = code(t)             if g = D
  //   y = code(s) ^ code(t)   if g = T
  // Codes no state uses lead to the reset state under the D reading.
  function automatic logic [STATE_W-1:0] obf_next(input logic [STATE_W-1:0] code,
                                                  input logic [IN_W-1:0]    x);
    logic [STATE_W-1:0] y;
    y = RESET_CODE;
    for (int unsigned i = 0; i < XF_STATES; i++) begin
      if (XF[i].code == code) begin
        logic [STATE_W-1:0] tcode;
        tcode = XF[xf_target(ORIG_NEXT[XF[i].orig][x], XF[i].group)].code;
        y = (XF[i].group == CFG_T) ? (code ^ tcode) : tcode;
      end
    end
    return y;
  endfunction

endpackage
