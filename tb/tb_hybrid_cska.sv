// tb_hybrid_cska: checks the hybrid adder datapath in three configurations:
//   default  32 bits, stages 2,3,4,[8],6,5,4 with stage 4 the prefix-adder nucleus
//   h16      16 bits, stages 2,3,[6],3,2 with stage 3 the nucleus
//   h24      24 bits, stages [8],6,5,5 with stage 1 the nucleus (fed by ci directly)
// {co, s} must equal a + b + ci, and pred must be 1 exactly when every stage between the
// nucleus and the last stage (exclusive) propagates. Operands are random, with randomly
// chosen bits forced to propagate so that both predictor outcomes occur often; the test
// fails if either outcome never occurred for the default adder.
module tb_hybrid_cska;
  import cska_pkg::*;

  localparam int unsigned S16 [5] = '{2, 3, 6, 3, 2};
  localparam int unsigned S24 [4] = '{8, 6, 5, 5};

  logic [31:0] a, b, s32;
  logic [23:0] s24;
  logic [15:0] s16;
  logic        ci, co32, co24, co16, pr32, pr24, pr16;
  int checks = 0, failures = 0;
  int pred_hi = 0, pred_lo = 0;

  hybrid_cska dut32 (.a(a), .b(b), .ci(ci), .s(s32), .co(co32), .pred(pr32));
  hybrid_cska #(.Q(5), .SIZES(S16), .N(16), .NUCLEUS(3)) dut16 (
    .a(a[15:0]), .b(b[15:0]), .ci(ci), .s(s16), .co(co16), .pred(pr16));
  hybrid_cska #(.Q(4), .SIZES(S24), .N(24), .NUCLEUS(1)) dut24 (
    .a(a[23:0]), .b(b[23:0]), .ci(ci), .s(s24), .co(co24), .pred(pr24));

  // 1 when bits lo..hi of x are all ones
  function automatic logic ones(logic [31:0] x, int lo, int hi);
    logic r = 1'b1;
    for (int i = lo; i <= hi; i++) r &= x[i];
    return r;
  endfunction

  task automatic check_all();
    logic [32:0] r32;
    logic [24:0] r24;
    logic [16:0] r16;
    logic [31:0] x;
    logic e32, e24, e16;
    #1;
    x   = a ^ b;
    r32 = {1'b0, a} + {1'b0, b} + 33'(ci);
    r24 = {1'b0, a[23:0]} + {1'b0, b[23:0]} + 25'(ci);
    r16 = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(ci);
    e32 = ones(x, 17, 27);  // stages 5 and 6: bits 17..22 and 23..27
    e16 = ones(x, 11, 13);  // stage 4: bits 11..13
    e24 = ones(x, 8, 18);   // stages 2 and 3: bits 8..13 and 14..18
    checks += 3;
    if ({co32, s32} != r32 || pr32 != e32) begin
      failures++;
      $display("FAIL h32 a=%h b=%h ci=%0b -> co=%0b s=%h pred=%0b", a, b, ci, co32, s32, pr32);
    end
    if ({co16, s16} != r16 || pr16 != e16) begin
      failures++;
      $display("FAIL h16 a=%h b=%h ci=%0b -> co=%0b s=%h pred=%0b", a[15:0], b[15:0], ci, co16, s16, pr16);
    end
    if ({co24, s24} != r24 || pr24 != e24) begin
      failures++;
      $display("FAIL h24 a=%h b=%h ci=%0b -> co=%0b s=%h pred=%0b", a[23:0], b[23:0], ci, co24, s24, pr24);
    end
    if (pr32) pred_hi++; else pred_lo++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '0; ci = 1'b1; check_all();
    a = '0; b = '0; ci = 1'b0; check_all();
    a = '1; b = '1; ci = 1'b0; check_all();
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] mask;
      a  = $urandom;
      b  = $urandom;
      ci = 1'($urandom);
      case (n % 3)
        0: mask = '0;
        1: mask = $urandom | $urandom | $urandom;
        default: mask = ~($urandom & $urandom & $urandom & $urandom);
      endcase
      b = (b & ~mask) | (~a & mask);
      check_all();
    end
    $display("predictor: %0d long, %0d short operations", pred_hi, pred_lo);
    if (pred_hi == 0 || pred_lo == 0) begin
      failures++;
      $display("FAIL predictor outcome never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
