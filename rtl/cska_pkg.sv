// cska_pkg: constants and helper functions shared by the carry skip adder modules.
//
// The concatenation-incrementation carry skip adder (CI-CSKA) is described by a list of
// stage sizes, stage 1 (least significant) first. The default configurations below are
// this design's own choice: the stage-size lists are not given by the source design, only
// the 32-bit width and the variable stage size (VSS) style, whose sizes grow towards a
// middle stage and shrink again towards the most significant end.
//
// The skip logic alternates AOI and OAI compound gates, so the skip carry changes
// polarity from stage to stage. stage_out_inv() tells, for a 1-based stage number, whether
// the carry that the stage passes on to the next skip gate is inverted. Stage 1 (a plain
// ripple carry adder) and the nucleus stage of the hybrid adder (a parallel prefix adder)
// always produce a true-polarity carry; every other stage flips the polarity it receives.
package cska_pkg;

  // Width of the main adder (the source design's middle evaluated size).
  localparam int unsigned WIDTH = 32;

  // 32-bit variable stage size CI-CSKA: 7 stages.
  localparam int unsigned VSS_Q = 7;
  localparam int unsigned VSS_SIZES [VSS_Q] = '{2, 3, 4, 5, 6, 7, 5};

  // 32-bit fixed stage size CI-CSKA: 8 stages of 4 bits.
  localparam int unsigned FSS_Q = 8;
  localparam int unsigned FSS_SIZES [FSS_Q] = '{4, 4, 4, 4, 4, 4, 4, 4};

  // 32-bit hybrid variable latency CSKA: stage 4 is the nucleus (parallel prefix) stage.
  localparam int unsigned HYB_Q = 7;
  localparam int unsigned HYB_SIZES [HYB_Q] = '{2, 3, 4, 8, 6, 5, 4};
  localparam int unsigned HYB_NUCLEUS = 4;

  // True when the carry leaving stage k (1-based) toward the next skip gate is inverted.
  // nucleus = 0 means there is no nucleus stage.
  function automatic bit stage_out_inv(int unsigned k, int unsigned nucleus);
    bit inv;
    inv = 1'b0;
    for (int unsigned j = 2; j <= k; j++) begin
      if (j == nucleus) inv = 1'b0;
      else              inv = !inv;
    end
    return inv;
  endfunction

endpackage
