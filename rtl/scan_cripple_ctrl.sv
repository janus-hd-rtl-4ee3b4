// scan_cripple_ctrl: remembers whether scan mode has been used since power-up.
//
// A single sticky flip-flop is set on any clock edge that sees scan enable
// high and is cleared only by the power-on reset. 'cripple' is high while scan
// enable is high and for ever after, so the configuration control unit is cut
// off from the very first scan cycle on. This makes the chip usable as a
// scan-testable part (the chain stays fully accessible) while no scanned-in
// state can reach the key-controlled comparator.
// The sticky flag follows the published scheme; making 'rst_n' the power-on
// reset and the combinational OR with 'se' are this design's choices.
module scan_cripple_ctrl (
  input  logic clk,
  input  logic rst_n,    // power-on reset, active low
  input  logic se,       // scan enable
  output logic cripple   // 1: scan mode is or has been active
);

  logic seen_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  seen_q <= 1'b0;
    else if (se) seen_q <= 1'b1;
  end

  assign cripple = seen_q | se;

  // Once set, the flag stays set until the next power-on reset.
  a_sticky: assert property (@(posedge clk) disable iff (!rst_n) cripple |=> cripple);

endmodule
