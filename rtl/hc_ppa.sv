// hc_ppa: M-bit parallel prefix adder with carry in, used as the nucleus stage of the
// hybrid variable latency carry skip adder.
// Preprocessing forms the bit generate g = a & b and propagate p = a ^ b. The carry in is
// placed below bit 0 as an extra generate position, so the prefix network directly yields
// the carry into every bit. The network is Han-Carlson: one Brent-Kung style level combines
// each odd position with its even neighbour, a Kogge-Stone tree (spans 2, 4, 8, ...) runs on
// the odd positions only, and one last level fills in the even positions. Each prefix cell
// is (G, P) = (Gh | Ph & Gl, Ph & Pl). The sum layer is s[i] = p[i] ^ carry_into[i].
// Outputs: the sum, the carry out of the stage, and p_all (AND of the bit propagates),
// which the hybrid adder's predictor uses. Purely combinational, 2 + ceil(log2((M+1)/2))
// prefix levels. That the nucleus is a prefix adder follows the source design; using the
// carry in as a prefix position is this design's choice.
module hc_ppa #(
  parameter int unsigned M = 8
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         ci,
  output logic [M-1:0] s,
  output logic         co,
  output logic         p_all
);
  localparam int unsigned W = M + 1;  // prefix positions: carry in plus M bits

  logic [M-1:0] g, p;
  logic [W-1:0] gx, px;   // extended generate/propagate, position 0 = carry in
  logic [W-1:0] gc;       // group generate from position 0 up to each position

  // Preprocessing
  assign g  = a & b;
  assign p  = a ^ b;
  assign gx = {g, ci};
  assign px = {p, 1'b0};

  // Han-Carlson prefix network
  always_comb begin
    logic [W-1:0] gl, pl, gn, pn;
    gl = gx;
    pl = px;
    // level 1: odd positions absorb their even neighbour
    gn = gl;
    pn = pl;
    for (int unsigned i = 1; i < W; i += 2) begin
      gn[i] = gl[i] | (pl[i] & gl[i-1]);
      pn[i] = pl[i] & pl[i-1];
    end
    gl = gn;
    pl = pn;
    // Kogge-Stone levels on the odd positions
    for (int unsigned d = 2; d < W; d = d * 2) begin
      gn = gl;
      pn = pl;
      for (int unsigned i = 1; i < W; i += 2) begin
        if (i >= d + 1) begin
          gn[i] = gl[i] | (pl[i] & gl[i-d]);
          pn[i] = pl[i] & pl[i-d];
        end
      end
      gl = gn;
      pl = pn;
    end
    // last level: even positions take the prefix of the odd position below them
    gn = gl;
    for (int unsigned i = 2; i < W; i += 2) begin
      gn[i] = gl[i] | (pl[i] & gl[i-1]);
    end
    gc = gn;
  end

  // Sum layer: the carry into bit i is the group generate of positions 0..i
  assign s     = p ^ gc[M-1:0];
  assign co    = gc[M];
  assign p_all = &p;
endmodule
