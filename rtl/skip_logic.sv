// skip_logic: the carry skip gate of one concatenation-incrementation CSKA stage.
// It computes Co,j = Cj | (Pj & Co,j-1), where Cj is the stage RCA's carry out (computed
// with carry in 0, i.e. the stage generate), Pj the AND of the stage's propagate signals
// and Co,j-1 the carry of the previous stage, as a single compound gate instead of the
// 2:1 multiplexer of a conventional carry skip adder:
//   USE_OAI = 0: AOI21, all inputs in true polarity,     y = ~(Cj | (Pj & Co,j-1)) = ~Co,j
//   USE_OAI = 1: OAI21, all inputs in inverted polarity, y = ~(~Cj & (~Pj | ~Co,j-1)) = Co,j
// Chaining AOI and OAI stages alternately keeps every inverter out of the skip path.
// Which gate each stage uses follows the source design; feeding the OAI with an inverted
// Pj is this design's reading of it. Purely combinational, one gate delay.
module skip_logic #(
  parameter bit USE_OAI = 1'b0
) (
  input  logic c_in,
  input  logic p_in,
  input  logic cprev_in,
  output logic y
);
  if (USE_OAI) begin : g_oai
    assign y = ~(c_in & (p_in | cprev_in));
  end else begin : g_aoi
    assign y = ~(c_in | (p_in & cprev_in));
  end
endmodule
