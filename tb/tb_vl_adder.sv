// tb_vl_adder: checks the clocked variable latency adder unit at its default size.
// A driver offers operations with random gaps; roughly a third have their upper stages
// forced to propagate so the predictor fires. A scoreboard keeps each accepted operation
// with its acceptance cycle and, independently of the design, the expected sum and the
// expected latency from the accepting cycle to the cycle showing out_valid (3 cycles when
// stages 5 and 6, bits 17..27, all propagate, else 2).
// Every out_valid pulse must match the oldest outstanding operation in sum, carry,
// out_long and latency. The test also checks that in_ready drops while a predicted-long operation takes its extra cycle,
// that back-to-back short operations complete one per cycle, and that every accepted
// operation completes. Both latencies and the back-to-back case must each occur.
module tb_vl_adder;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid, in_ready, ci, out_valid, co, out_long;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_short = 0, n_long = 0, n_b2b = 0, n_stall = 0;

  typedef struct {
    logic [32:0] sum;
    bit          long_op;
    int          t_acc;
  } op_t;
  op_t q [$];

  vl_adder dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .a(a), .b(b), .ci(ci), .out_valid(out_valid), .s(s), .co(co), .out_long(out_long)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int last_done = -10;
  logic taken = 1'b0;

  // Monitor and scoreboard (samples just before each rising edge)
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL result with no outstanding operation at cycle %0d", cycle);
        end else begin
          op_t o;
          int  lat;
          o   = q.pop_front();
          lat = cycle - o.t_acc;
          if ({co, s} != o.sum || out_long != o.long_op || lat != (o.long_op ? 3 : 2)) begin
            failures++;
            $display("FAIL cycle %0d: got co=%0b s=%h long=%0b lat=%0d, want %h long=%0b",
                     cycle, co, s, out_long, lat, o.sum, o.long_op);
          end
          if (o.long_op) n_long++; else n_short++;
          if (last_done == cycle - 1) n_b2b++;
          last_done = cycle;
        end
      end
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        op_t o;
        o.sum     = {1'b0, a} + {1'b0, b} + 33'(ci);
        o.long_op = &(a[27:17] ^ b[27:17]);
        o.t_acc   = cycle;
        q.push_back(o);
      end
    end
  end

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0; ci = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (!in_ready || out_valid) begin
      failures++;
      $display("FAIL not idle after reset");
    end
    for (int n = 0; n < 3000; n++) begin
      // drive a new operation (or keep offering the one not yet taken)
      if (!in_valid || taken) begin
        in_valid = ($urandom % 4 != 0);
        a  = $urandom;
        b  = $urandom;
        ci = 1'($urandom);
        if ($urandom % 3 == 0) b = (b & ~32'h0FFE_0000) | (~a & 32'h0FFE_0000);
      end
      #3 taken = in_valid && in_ready;  // accepted at the coming edge
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d operations never completed", q.size());
    end
    $display("short=%0d long=%0d back_to_back=%0d input_stalls=%0d", n_short, n_long, n_b2b, n_stall);
    if (n_short == 0 || n_long == 0 || n_b2b == 0 || n_stall == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
