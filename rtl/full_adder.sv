// full_adder: one-bit full adder, the cell of every ripple carry chain in the carry skip
// adders. Besides sum and carry it exports the bit propagate signal p = a ^ b, which the
// stage's skip logic multiplies over the whole stage. Purely combinational.
// The sum/majority equations are the textbook ones; the source design only names the cell.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co,
  output logic p
);
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
