// hybrid_cska: datapath of the hybrid variable latency carry skip adder.
//
// It is a CI-CSKA (see ci_cska) whose stage NUCLEUS is a Han-Carlson parallel prefix adder
// (hc_ppa). The prefix adder resolves the nucleus stage in logarithmic time, which shortens
// the carry path through the middle of the adder. The paths that stay long are those on
// which a carry must skip through every stage between the nucleus and the last stage. The
// predictor flags them: pred = AND of the propagate products of stages NUCLEUS+1 .. Q-1.
// When pred is 0 no such path is active and the result settles within the short clock
// period; when it is 1 the variable latency unit (vl_adder) gives the addition a second
// cycle. The sum itself is always the full, exact sum; pred only tells how long it needs.
// The nucleus stage and the variable latency idea follow the source design; the stage
// sizes and the predictor's exact condition are this design's choices.
//
// Ports: a, b, ci in; s, co out; pred out. Purely combinational.
module hybrid_cska
  import cska_pkg::*;
#(
  parameter int unsigned Q         = HYB_Q,
  parameter int unsigned SIZES [Q] = HYB_SIZES,
  parameter int unsigned N         = WIDTH,
  parameter int unsigned NUCLEUS   = HYB_NUCLEUS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co,
  output logic         pred
);
  logic [Q-1:0] stage_p;

  if (NUCLEUS < 1 || NUCLEUS > Q) begin : g_nucleus_check
    $error("hybrid_cska: NUCLEUS = %0d is not a stage of 1..%0d", NUCLEUS, Q);
  end

  ci_cska #(.Q(Q), .SIZES(SIZES), .N(N), .NUCLEUS(NUCLEUS)) u_adder (
    .a(a), .b(b), .ci(ci), .s(s), .co(co), .stage_p(stage_p)
  );

  // Predictor: stages NUCLEUS+1 .. Q-1 (0-based indices NUCLEUS .. Q-2) all propagate.
  always_comb begin
    pred = (NUCLEUS + 1 <= Q - 1);
    for (int unsigned k = NUCLEUS; k + 2 <= Q; k++) pred &= stage_p[k];
  end
endmodule
