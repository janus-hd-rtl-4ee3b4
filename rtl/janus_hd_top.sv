// janus_hd_top: a complete JANUS-HD obfuscated FSM.
//
// The obfuscated next-state logic feeds a register of reconfigurable
// flip-flops whose D/T configuration comes from the configuration control
// unit (CCU). The CCU keeps the configuration in a T flip-flop that toggles
// each time the machine enters an entrance state, recognised by a
// key-controlled Hamming distance comparator; with the correct key the machine
// walks exactly the transitions of the original FSM, with a wrong key it
// takes wrong transitions from the first mis-flip on.
// Scan: with se = 1 the state register shifts si -> state[0] -> ... -> so.
// From the first scan cycle until the next power-on reset the CCU is frozen
// and the flip-flops run under the constant DUMMY_CFG configuration.
// Timing: one transition per clock edge; 'state' is the registered present
// state (the machine's output in this example).
// The structure follows the published architecture; the example machine
// (janus_hd_pkg), the single power-on reset and bringing the state out as the
// output are this design's choices.
module janus_hd_top
  import janus_hd_pkg::*;
#(
  parameter int unsigned H         = EXAMPLE_H,
  parameter ff_cfg_e     DUMMY_CFG = CFG_D
) (
  input  logic               clk,
  input  logic               rst_n,   // power-on reset, active low
  input  logic [IN_W-1:0]    x,       // primary input
  input  logic [STATE_W-1:0] key,     // obfuscation key
  input  logic               se,      // scan enable
  input  logic               si,      // scan in
  output logic               so,      // scan out
  output logic [STATE_W-1:0] state,   // present state
  output logic               scan_used // 1: scan mode used since power-up
);

  logic [STATE_W-1:0] nsl_y;
  logic [STATE_W-1:0] state_next;
  ff_cfg_e            cfg;

  obf_nsl u_nsl (
    .state (state),
    .x     (x),
    .y     (nsl_y)
  );

  reconfig_ff #(.N(STATE_W), .RESET_VAL(RESET_CODE)) u_state (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg    (cfg),
    .d      (nsl_y),
    .se     (se),
    .si     (si),
    .so     (so),
    .q      (state),
    .q_next (state_next)
  );

  ccu #(.N(STATE_W), .H(H), .INIT_CFG(RESET_CFG), .DUMMY_CFG(DUMMY_CFG)) u_ccu (
    .clk        (clk),
    .rst_n      (rst_n),
    .se         (se),
    .key        (key),
    .state_next (state_next),
    .cfg        (cfg),
    .cripple    (scan_used)
  );

endmodule
