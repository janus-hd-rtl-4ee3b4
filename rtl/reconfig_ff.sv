// reconfig_ff: N-bit state register of reconfigurable, scannable flip-flops.
//
// In functional mode (se = 0) each flip-flop behaves as a D flip-flop or a T
// flip-flop, chosen for all bits at once by 'cfg' from the configuration
// control unit:
//   cfg = CFG_D : q <= d
//   cfg = CFG_T : q <= q ^ d
// In scan mode (se = 1) the register is a shift chain: bit 0 takes 'si', each
// bit takes the one below it, and 'so' is bit N-1.
// 'q_next' is the value the register will hold after the next rising edge; the
// configuration control unit watches it to see which state is being entered.
// The D/T behaviour follows the published scheme; the shift direction, the
// shared per-register select and the asynchronous active-low reset to
// RESET_VAL are this design's choices.
module reconfig_ff
  import janus_hd_pkg::*;
#(
  parameter int unsigned      N         = STATE_W,
  parameter logic [N-1:0]     RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  ff_cfg_e      cfg,     // active configuration
  input  logic [N-1:0] d,       // next-state logic output
  input  logic         se,      // scan enable
  input  logic         si,      // scan in
  output logic         so,      // scan out
  output logic [N-1:0] q,       // present state
  output logic [N-1:0] q_next   // value loaded at the next edge
);

  always_comb begin
    if (se) begin
      q_next = N'({q, si});   // shift towards the MSB
    end else if (cfg == CFG_T) begin
      q_next = q ^ d;
    end else begin
      q_next = d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VAL;
    else        q <= q_next;
  end

  assign so = q[N-1];

endmodule
