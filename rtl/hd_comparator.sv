// hd_comparator: key-controlled Hamming distance point function.
//
// 'hit' is 1 exactly when the Hamming distance between 'value' and 'key' equals
// H, and 0 otherwise. Its on-set therefore holds C(N,H) patterns; in JANUS-HD
// the entrance states of the FSM are encoded in this on-set and every other
// state in the off-set. Purely combinational: an XOR per bit, a population
// count and an equality test. Matching on "distance equal to H" (as in
// SFLL-hd) rather than "at most H" is this design's reading of the scheme.
module hd_comparator
  import janus_hd_pkg::*;
#(
  parameter int unsigned N = STATE_W,
  parameter int unsigned H = EXAMPLE_H
) (
  input  logic [N-1:0] value,
  input  logic [N-1:0] key,
  output logic         hit
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  diff;
  logic [CW-1:0] hdist;

  always_comb begin
    diff = value ^ key;
    hdist = '0;
    for (int unsigned i = 0; i < N; i++) hdist = hdist + CW'(diff[i]);
    hit = (hdist == CW'(H));
  end

endmodule
