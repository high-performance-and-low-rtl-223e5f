// tb_ci_cska: checks the CI-CSKA in four configurations against integer addition:
//   default  32-bit VSS, stages 2,3,4,5,6,7,5 (odd stage count, last skip gate OAI)
//   fss32    32-bit FSS, eight 4-bit stages  (even stage count, last skip gate AOI)
//   vss16    16-bit VSS, stages 2,3,4,4,3
//   vss64    64-bit VSS, stages 2,3,4,5,6,7,8,9,8,7,5
// Stimuli mix random operands with operands in which chosen stages propagate (b = ~a on
// their slices), so the skip gates pass carries from stage to stage, including the all-
// propagate case where ci must reach co through every skip gate. For every configuration
// {co, s} must equal a + b + ci and stage_p must flag exactly the propagating stages.
// The testbench counts how often each stage's skip path was exercised with a carry and
// counts a failure if the default adder never skipped a carry across some stage.
module tb_ci_cska;
  import cska_pkg::*;

  localparam int unsigned S16 [5]  = '{2, 3, 4, 4, 3};
  localparam int unsigned S64 [11] = '{2, 3, 4, 5, 6, 7, 8, 9, 8, 7, 5};

  logic [63:0] a, b;
  logic        ci;
  logic [31:0] s_def, s_fss;
  logic [15:0] s16;
  logic [63:0] s64;
  logic        co_def, co_fss, co16, co64;
  logic [6:0]  p_def;
  logic [7:0]  p_fss;
  logic [4:0]  p16;
  logic [10:0] p64;
  int checks = 0, failures = 0;
  int skip_cnt [VSS_Q];

  ci_cska dut_def (.a(a[31:0]), .b(b[31:0]), .ci(ci), .s(s_def), .co(co_def), .stage_p(p_def));
  ci_cska #(.Q(FSS_Q), .SIZES(FSS_SIZES), .N(32)) dut_fss (
    .a(a[31:0]), .b(b[31:0]), .ci(ci), .s(s_fss), .co(co_fss), .stage_p(p_fss));
  ci_cska #(.Q(5), .SIZES(S16), .N(16)) dut16 (
    .a(a[15:0]), .b(b[15:0]), .ci(ci), .s(s16), .co(co16), .stage_p(p16));
  ci_cska #(.Q(11), .SIZES(S64), .N(64)) dut64 (
    .a(a), .b(b), .ci(ci), .s(s64), .co(co64), .stage_p(p64));

  // Expected propagate flags of a configuration
  function automatic logic [15:0] exp_p(logic [63:0] x, int unsigned q, int unsigned sz [16]);
    int unsigned lo = 0;
    logic [15:0] r = '0;
    for (int unsigned k = 0; k < q; k++) begin
      logic all1 = 1'b1;
      for (int unsigned i = lo; i < lo + sz[k]; i++) all1 &= x[i];
      r[k] = all1;
      lo += sz[k];
    end
    return r;
  endfunction

  function automatic void pad(input int unsigned src [], output int unsigned dst [16]);
    foreach (dst[i]) dst[i] = (i < src.size()) ? src[i] : 0;
  endfunction

  task automatic check_all();
    logic [64:0] r64;
    logic [32:0] r32;
    logic [16:0] r16;
    int unsigned z_def [16], z_fss [16], z16 [16], z64 [16];
    int unsigned d_def [], d_fss [], d16 [], d64 [];
    logic [63:0] x;
    int unsigned lo;
    #1;
    x = a ^ b;
    d_def = new[VSS_Q]; foreach (d_def[i]) d_def[i] = VSS_SIZES[i]; pad(d_def, z_def);
    d_fss = new[FSS_Q]; foreach (d_fss[i]) d_fss[i] = FSS_SIZES[i]; pad(d_fss, z_fss);
    d16 = new[5];  foreach (d16[i]) d16[i] = S16[i]; pad(d16, z16);
    d64 = new[11]; foreach (d64[i]) d64[i] = S64[i]; pad(d64, z64);
    r64 = {1'b0, a} + {1'b0, b} + 65'(ci);
    r32 = {1'b0, a[31:0]} + {1'b0, b[31:0]} + 33'(ci);
    r16 = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(ci);
    checks += 4;
    if ({co_def, s_def} != r32 || p_def != exp_p(x, VSS_Q, z_def)[6:0]) begin
      failures++;
      $display("FAIL vss32 a=%h b=%h ci=%0b -> co=%0b s=%h p=%b", a[31:0], b[31:0], ci, co_def, s_def, p_def);
    end
    if ({co_fss, s_fss} != r32 || p_fss != exp_p(x, FSS_Q, z_fss)[7:0]) begin
      failures++;
      $display("FAIL fss32 a=%h b=%h ci=%0b -> co=%0b s=%h p=%b", a[31:0], b[31:0], ci, co_fss, s_fss, p_fss);
    end
    if ({co16, s16} != r16 || p16 != exp_p(x, 5, z16)[4:0]) begin
      failures++;
      $display("FAIL vss16 a=%h b=%h ci=%0b -> co=%0b s=%h p=%b", a[15:0], b[15:0], ci, co16, s16, p16);
    end
    if ({co64, s64} != r64 || p64 != exp_p(x, 11, z64)[10:0]) begin
      failures++;
      $display("FAIL vss64 a=%h b=%h ci=%0b -> co=%0b s=%h p=%b", a, b, ci, co64, s64, p64);
    end
    // A skip across stage k of the default adder: stage k propagates and a carry enters it
    lo = 0;
    for (int unsigned k = 0; k < VSS_Q; k++) begin
      logic [32:0] below;
      below = {1'b0, a[31:0] & ((33'd1 << lo) - 1)} + {1'b0, b[31:0] & ((33'd1 << lo) - 1)} + 33'(ci);
      if (p_def[k] && below[lo]) skip_cnt[k]++;
      lo += VSS_SIZES[k];
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (skip_cnt[k]) skip_cnt[k] = 0;
    // Corner cases
    a = '0; b = '0; ci = 1'b0; check_all();
    a = '1; b = '1; ci = 1'b1; check_all();
    a = '1; b = '0; ci = 1'b1; check_all();   // carry in ripples and skips through everything
    a = '1; b = '0; ci = 1'b0; check_all();
    a = 64'h5555_5555_5555_5555; b = ~a; ci = 1'b1; check_all();
    // Random operands, with random stages forced to propagate
    for (int n = 0; n < 20000; n++) begin
      logic [63:0] mask;
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      ci = 1'($urandom);
      case (n % 4)
        0: mask = '0;
        1: mask = {$urandom, $urandom} | {$urandom, $urandom};
        2: mask = ~({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom});
        default: mask = '1 << ($urandom % 64);
      endcase
      // force propagate where mask is set; keep a generate in the lowest bits sometimes
      b = (b & ~mask) | (~a & mask);
      check_all();
    end
    foreach (skip_cnt[k]) begin
      $display("stage %0d: carry skipped %0d times", k + 1, skip_cnt[k]);
      if (k > 0 && skip_cnt[k] == 0) begin
        failures++;
        $display("FAIL no carry was ever skipped across stage %0d", k + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
