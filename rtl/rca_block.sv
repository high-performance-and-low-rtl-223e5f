// rca_block: M-bit ripple carry adder made of a chain of full adders, the building block
// of every carry skip adder stage. Besides the sum and the ripple carry out it gives p_all,
// the AND of the M bit-propagate signals: when it is 1 the carry out equals the carry in,
// which is what the skip logic exploits.
// In the concatenation-incrementation adder, stages 2..Q tie ci to 0, so s is the stage's
// intermediate result Z and co its group generate. Purely combinational; the worst delay
// is M full-adder carry delays. The block and its propagate product follow the source design;
// computing the product as a plain AND of the bit propagates is the obvious reading.
module rca_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci,
  output logic [M-1:0] s,
  output logic         co,
  output logic         p_all
);
  logic [M:0]   c;
  logic [M-1:0] p;

  assign c[0] = ci;
  for (genvar i = 0; i < M; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]), .p(p[i]));
  end

  assign co    = c[M];
  assign p_all = &p;
endmodule
