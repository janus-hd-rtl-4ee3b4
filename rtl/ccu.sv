// ccu: configuration control unit of a JANUS-HD FSM.
//
// A T flip-flop holds the active flip-flop configuration (CFG_D or CFG_T).
// Its T input is the key-controlled Hamming distance comparator, which looks
// at the state the FSM is about to enter ('state_next'): when that state is an
// entrance state (distance H from the key) the configuration flips on the same
// edge the state register loads it, so the state register always sees the
// configuration of the partition its present state belongs to.
// Once scan enable has been seen since power-up, the T flip-flop is frozen and
// 'cfg' is forced to the constant DUMMY_CFG, so scan access only shows the
// obfuscated NSL under one static configuration and nothing of the key.
// The T flip-flop, comparator and dummy override follow the published scheme;
// comparing the incoming state rather than the present one, the reset value
// and the choice of dummy configuration are this design's.
module ccu
  import janus_hd_pkg::*;
#(
  parameter int unsigned N         = STATE_W,
  parameter int unsigned H         = EXAMPLE_H,
  parameter ff_cfg_e     INIT_CFG  = RESET_CFG,
  parameter ff_cfg_e     DUMMY_CFG = CFG_D
) (
  input  logic         clk,
  input  logic         rst_n,       // power-on reset, active low
  input  logic         se,          // scan enable
  input  logic [N-1:0] key,         // obfuscation key
  input  logic [N-1:0] state_next,  // state loaded at the next edge
  output ff_cfg_e      cfg,         // configuration applied to the state flip-flops
  output logic         cripple      // scan mode has been used
);

  logic    hit;
  ff_cfg_e cfg_q;

  hd_comparator #(.N(N), .H(H)) u_hd (
    .value (state_next),
    .key   (key),
    .hit   (hit)
  );

  scan_cripple_ctrl u_cripple (
    .clk     (clk),
    .rst_n   (rst_n),
    .se      (se),
    .cripple (cripple)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cfg_q <= INIT_CFG;
    else if (hit && !cripple) cfg_q <= ff_cfg_e'(~cfg_q);
  end

  assign cfg = cripple ? DUMMY_CFG : cfg_q;

  // After scan use the stored configuration never changes and the output is
  // the dummy configuration.
  a_frozen: assert property (@(posedge clk) disable iff (!rst_n) cripple |=> $stable(cfg_q));
  a_dummy:  assert property (@(posedge clk) disable iff (!rst_n) cripple |-> cfg == DUMMY_CFG);

endmodule
