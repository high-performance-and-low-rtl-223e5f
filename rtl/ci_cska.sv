// ci_cska: N-bit concatenation-incrementation carry skip adder (CI-CSKA).
//
// The N bits are split into Q stages whose sizes are listed in SIZES, stage 1 (the least
// significant) first. Stage 1 is a plain ripple carry adder fed by the carry in ci. Every
// other stage adds its slices with carry in 0, so all stages compute their intermediate
// results Z, generates and propagate products at the same time; the carry then crosses each
// stage through one compound skip gate (AOI and OAI alternately, so no inverters sit in the
// skip chain), and each stage's incrementation block adds the incoming carry to its Z.
// Equal sizes give the fixed stage size (FSS) form, unequal ones the variable stage size
// (VSS) form; the default is the 32-bit VSS adder with stages 2,3,4,5,6,7,5. The stage
// sizes are this design's choice; the stage structure follows the source design.
//
// NUCLEUS (1-based stage number, 0 = none) replaces that stage by a parallel prefix adder
// (hc_ppa) fed by the previous stage's carry; this is how the hybrid variable latency adder
// is built. The stage after a nucleus starts the AOI/OAI alternation again.
//
// Ports: a, b, ci in; s, co out; stage_p gives each stage's propagate product (bit 0 is
// stage 1). Purely combinational. SIZES must add up to N (checked at elaboration).
module ci_cska
  import cska_pkg::*;
#(
  parameter int unsigned Q           = VSS_Q,
  parameter int unsigned SIZES [Q]   = VSS_SIZES,
  parameter int unsigned N           = WIDTH,
  parameter int unsigned NUCLEUS     = 0
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic [N-1:0] s,
  output logic         co,
  output logic [Q-1:0] stage_p
);
  // Bit position of the least significant bit of stage k (0-based)
  function automatic int unsigned offset(int unsigned k);
    int unsigned o;
    o = 0;
    for (int unsigned j = 0; j < k; j++) o += SIZES[j];
    return o;
  endfunction

  if (offset(Q) != N) begin : g_size_check
    $error("ci_cska: stage sizes add up to %0d, not N = %0d", offset(Q), N);
  end

  logic [Q-1:0] cin_t, cin_g;  // carry entering each stage: true / skip-gate polarity
  logic [Q-1:0] ct, cg;        // carry leaving each stage:  true / skip-gate polarity

  assign cin_t[0] = ci;
  assign cin_g[0] = ci;
  if (Q > 1) begin : g_chain
    assign cin_t[Q-1:1] = ct[Q-2:0];
    assign cin_g[Q-1:1] = cg[Q-2:0];
  end

  for (genvar k = 0; k < Q; k++) begin : g_stage
    localparam int unsigned J  = k + 1;
    localparam int unsigned LO = offset(k);
    localparam int unsigned MK = SIZES[k];

    if (J == NUCLEUS) begin : g_nucleus
      hc_ppa #(.M(MK)) u_ppa (
        .a(a[LO +: MK]), .b(b[LO +: MK]), .ci(cin_t[k]),
        .s(s[LO +: MK]), .co(ct[k]), .p_all(stage_p[k])
      );
      assign cg[k] = ct[k];
    end else if (J == 1) begin : g_first
      rca_block #(.M(MK)) u_rca (
        .a(a[LO +: MK]), .b(b[LO +: MK]), .ci(cin_t[k]),
        .s(s[LO +: MK]), .co(ct[k]), .p_all(stage_p[k])
      );
      assign cg[k] = ct[k];
    end else begin : g_ci
      ci_cska_stage #(.M(MK), .USE_OAI(stage_out_inv(J - 1, NUCLEUS))) u_stage (
        .a(a[LO +: MK]), .b(b[LO +: MK]),
        .cprev_t(cin_t[k]), .cprev_g(cin_g[k]),
        .s(s[LO +: MK]), .cout_g(cg[k]), .cout_t(ct[k]), .p_all(stage_p[k])
      );
    end
  end

  assign co = ct[Q-1];
endmodule
