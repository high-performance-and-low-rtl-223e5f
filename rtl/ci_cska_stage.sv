// ci_cska_stage: one stage j >= 2 of the concatenation-incrementation carry skip adder.
// The stage's M-bit RCA adds its operand slices with carry in 0 (concatenation), giving the
// intermediate result Z, the stage generate Cj and the propagate product Pj at once, without
// waiting for the lower stages. The skip gate then forms Co,j from Cj, Pj and the previous
// carry Co,j-1, and the incrementation block adds Co,j-1 to Z to give the final sum.
//
// USE_OAI selects the skip gate (see skip_logic): with AOI the previous carry is taken in
// true polarity and the gate output cout_g is ~Co,j; with OAI it is taken inverted and
// cout_g is Co,j. cprev_t is the previous carry in true polarity for the incrementation
// block, and cout_t gives Co,j in true polarity; the inverter that makes it sits outside the
// skip chain. Purely combinational. The stage structure (RCA with carry in 0, compound skip gate,
// incrementation block) follows the source design; carrying the previous carry in both
// polarities is how this design keeps the alternating gates consistent.
module ci_cska_stage #(
  parameter int unsigned M       = 4,
  parameter bit          USE_OAI = 1'b0
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cprev_t,
  input  logic         cprev_g,
  output logic [M-1:0] s,
  output logic         cout_g,
  output logic         cout_t,
  output logic         p_all
);
  logic [M-1:0] z;
  logic         cj;

  rca_block #(.M(M)) u_rca (
    .a(a), .b(b), .ci(1'b0), .s(z), .co(cj), .p_all(p_all)
  );

  if (USE_OAI) begin : g_oai
    skip_logic #(.USE_OAI(1'b1)) u_skip (
      .c_in(~cj), .p_in(~p_all), .cprev_in(cprev_g), .y(cout_g)
    );
    assign cout_t = cout_g;
  end else begin : g_aoi
    skip_logic #(.USE_OAI(1'b0)) u_skip (
      .c_in(cj), .p_in(p_all), .cprev_in(cprev_g), .y(cout_g)
    );
    assign cout_t = ~cout_g;
  end

  incrementation_block #(.M(M)) u_inc (.z(z), .c(cprev_t), .s(s));
endmodule
