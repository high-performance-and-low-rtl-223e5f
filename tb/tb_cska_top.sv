// tb_cska_top: end-to-end test of the whole design at its default parameters.
// Two stimulus threads run at once:
//  * The 32-bit VSS CI-CSKA gets a new operand pair every clock cycle: random operands,
//    with random bits forced to propagate so carries skip across stages; the all-propagate
//    case (carry in reaching carry out through every skip gate) is included. {co, s} must
//    equal a + b + ci and stage_p must flag exactly the all-propagate stages.
//  * The variable latency unit gets a stream of operations with random gaps; a third of them
//    force its upper stages (bits 17..27) to propagate so the predictor asks for the extra
//    cycle. A scoreboard checks every result, out_long and the latency (2 cycles from the
//    accepting cycle, 3 when predicted long).
// Mechanisms counted, each of which must occur: a carry skipped across every stage of the
// CI-CSKA, carry out of the CI-CSKA, short and long variable latency operations, back-to-
// back completions and input stalls of the unit.
module tb_cska_top;
  import cska_pkg::*;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [WIDTH-1:0] a, b, s, vl_a, vl_b, vl_s;
  logic             ci, co, vl_ci, vl_co, vl_in_valid, vl_in_ready, vl_out_valid, vl_out_long;
  logic [VSS_Q-1:0] stage_p;
  int checks = 0, failures = 0;
  int cycle = 0;
  int skip_cnt [VSS_Q];
  int n_co = 0, n_short = 0, n_long = 0, n_b2b = 0, n_stall = 0, last_done = -10;

  typedef struct {
    logic [WIDTH:0] sum;
    bit             long_op;
    int             t_acc;
  } op_t;
  op_t q [$];
  logic taken = 1'b0;

  cska_top dut (
    .a(a), .b(b), .ci(ci), .s(s), .co(co), .stage_p(stage_p),
    .clk(clk), .rst_n(rst_n),
    .vl_in_valid(vl_in_valid), .vl_in_ready(vl_in_ready),
    .vl_a(vl_a), .vl_b(vl_b), .vl_ci(vl_ci),
    .vl_out_valid(vl_out_valid), .vl_s(vl_s), .vl_co(vl_co), .vl_out_long(vl_out_long)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CI-CSKA checker, once per cycle
  always @(negedge clk) begin
    logic [WIDTH:0] ref_sum, below;
    logic [VSS_Q-1:0] ref_p;
    int unsigned lo;
    ref_sum = {1'b0, a} + {1'b0, b} + (WIDTH+1)'(ci);
    lo = 0;
    for (int unsigned k = 0; k < VSS_Q; k++) begin
      logic [WIDTH-1:0] m, hm;
      m  = ((WIDTH)'(1) << lo) - 1;
      hm = (((WIDTH)'(1) << VSS_SIZES[k]) - 1) << lo;
      ref_p[k] = (((a ^ b) & hm) == hm);
      below = {1'b0, a & m} + {1'b0, b & m} + (WIDTH+1)'(ci);
      if (ref_p[k] && below[lo]) skip_cnt[k]++;
      lo += VSS_SIZES[k];
    end
    checks++;
    if ({co, s} != ref_sum || stage_p != ref_p) begin
      failures++;
      $display("FAIL cska a=%h b=%h ci=%0b -> co=%0b s=%h p=%b", a, b, ci, co, s, stage_p);
    end
    if (co) n_co++;
  end

  // Variable latency unit scoreboard
  always @(negedge clk) begin
    if (rst_n) begin
      if (vl_out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL vl result with no outstanding operation at cycle %0d", cycle);
        end else begin
          op_t o;
          int  lat;
          o   = q.pop_front();
          lat = cycle - o.t_acc;
          if ({vl_co, vl_s} != o.sum || vl_out_long != o.long_op || lat != (o.long_op ? 3 : 2)) begin
            failures++;
            $display("FAIL vl cycle %0d: got co=%0b s=%h long=%0b lat=%0d, want %h long=%0b",
                     cycle, vl_co, vl_s, vl_out_long, lat, o.sum, o.long_op);
          end
          if (o.long_op) n_long++; else n_short++;
          if (last_done == cycle - 1) n_b2b++;
          last_done = cycle;
        end
      end
      if (vl_in_valid && !vl_in_ready) n_stall++;
      if (vl_in_valid && vl_in_ready) begin
        op_t o;
        o.sum     = {1'b0, vl_a} + {1'b0, vl_b} + (WIDTH+1)'(vl_ci);
        o.long_op = &(vl_a[27:17] ^ vl_b[27:17]);
        o.t_acc   = cycle;
        q.push_back(o);
      end
    end
  end

  initial begin
    foreach (skip_cnt[k]) skip_cnt[k] = 0;
    rst_n = 1'b0; vl_in_valid = 1'b0; vl_a = '0; vl_b = '0; vl_ci = 1'b0;
    a = '1; b = '0; ci = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      logic [WIDTH-1:0] mask;
      // CI-CSKA operands
      if (n % 50 == 0) begin
        a = $urandom; b = ~a; ci = 1'b1;
      end else begin
        a = $urandom; b = $urandom; ci = 1'($urandom);
        case (n % 3)
          0: mask = '0;
          1: mask = $urandom | $urandom;
          default: mask = ~($urandom & $urandom & $urandom);
        endcase
        b = (b & ~mask) | (~a & mask);
      end
      // variable latency unit operands
      if (!vl_in_valid || taken) begin
        vl_in_valid = ($urandom % 4 != 0);
        vl_a  = $urandom;
        vl_b  = $urandom;
        vl_ci = 1'($urandom);
        if ($urandom % 3 == 0) vl_b = (vl_b & ~32'h0FFE_0000) | (~vl_a & 32'h0FFE_0000);
      end
      #3 taken = vl_in_valid && vl_in_ready;  // accepted at the coming edge
      @(posedge clk);
      #1;
    end
    vl_in_valid = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d operations never completed", q.size());
    end
    foreach (skip_cnt[k]) begin
      $display("cska stage %0d: carry skipped %0d times", k + 1, skip_cnt[k]);
      if (k > 0 && skip_cnt[k] == 0) begin
        failures++;
        $display("FAIL no carry skipped across stage %0d", k + 1);
      end
    end
    $display("cska carry out=%0d; vl short=%0d long=%0d back_to_back=%0d input_stalls=%0d",
             n_co, n_short, n_long, n_b2b, n_stall);
    if (n_co == 0 || n_short == 0 || n_long == 0 || n_b2b == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
