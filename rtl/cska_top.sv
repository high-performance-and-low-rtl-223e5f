// cska_top: the two adders of this design side by side.
//
//  * The main adder: a 32-bit variable stage size concatenation-incrementation carry skip
//    adder (ci_cska, stages 2,3,4,5,6,7,5), purely combinational: a, b, ci -> s, co.
//  * The hybrid variable latency adder unit (vl_adder): a 32-bit CI-CSKA whose middle
//    stage is a Han-Carlson prefix adder, clocked, returning each result after one cycle or,
//    when its predictor flags a long carry path, after two (vl_* ports, see vl_adder).
// The two share no signals. Parameters keep their defaults from cska_pkg. Both adders are
// the source design's proposals; placing them side by side in one top is this design's choice.
module cska_top
  import cska_pkg::*;
(
  // combinational CI-CSKA
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co,
  output logic [VSS_Q-1:0] stage_p,
  // hybrid variable latency unit
  input  logic             clk,
  input  logic             rst_n,
  input  logic             vl_in_valid,
  output logic             vl_in_ready,
  input  logic [WIDTH-1:0] vl_a,
  input  logic [WIDTH-1:0] vl_b,
  input  logic             vl_ci,
  output logic             vl_out_valid,
  output logic [WIDTH-1:0] vl_s,
  output logic             vl_co,
  output logic             vl_out_long
);
  ci_cska u_cska (
    .a(a), .b(b), .ci(ci), .s(s), .co(co), .stage_p(stage_p)
  );

  vl_adder u_vl (
    .clk(clk), .rst_n(rst_n),
    .in_valid(vl_in_valid), .in_ready(vl_in_ready),
    .a(vl_a), .b(vl_b), .ci(vl_ci),
    .out_valid(vl_out_valid), .s(vl_s), .co(vl_co), .out_long(vl_out_long)
  );
endmodule
