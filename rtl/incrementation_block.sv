// incrementation_block: adds the incoming stage carry c (0 or 1) to the M-bit intermediate
// result z of a concatenation-incrementation CSKA stage, with a chain of half adders.
// Bit i is z[i] ^ k[i] with k[0] = c and k[i+1] = z[i] & k[i]; the most significant bit
// needs only the XOR, because the stage's carry out comes from the skip logic and not from
// this block. Purely combinational; its delay (M-1 AND gates and one XOR) runs in parallel
// with the skip chain of the later stages, as in the source design.
module incrementation_block #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] z,
  input  logic         c,
  output logic [M-1:0] s
);
  logic [M-1:0] k;

  assign k[0] = c;
  for (genvar i = 0; i < M; i++) begin : g_ha
    assign s[i] = z[i] ^ k[i];
    if (i < M - 1) begin : g_carry
      assign k[i+1] = z[i] & k[i];
    end
  end
endmodule
