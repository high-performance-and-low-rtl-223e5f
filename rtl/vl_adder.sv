// vl_adder: clocked variable latency adder built on the hybrid carry skip adder.
//
// The clock period is meant to cover the hybrid adder's delay on every path except the
// rare long ones its predictor flags. An operation accepted in cycle t (in_valid && in_ready)
// is written into the operand register at the end of cycle t, and the hybrid adder then has
// cycle t+1 to add it. At the end of t+1 the result goes to the output register, so s, co and
// out_valid = 1 are seen in cycle t+2, unless the predictor flags the operands: then in_ready
// is 0 in cycle t+1, the adder gets cycle t+2 as well (state S_EXTRA), and the result is seen
// in cycle t+3 with out_long = 1. A new operation can be accepted in the last cycle of the
// previous one, so short operations complete one per cycle.
// out_valid is a one-cycle pulse; there is no output back-pressure. Reset (rst_n, active
// low, synchronous) empties the unit. The variable latency scheme follows the source design;
// the handshake, latencies and reset are this design's choices.
module vl_adder
  import cska_pkg::*;
#(
  parameter int unsigned Q         = HYB_Q,
  parameter int unsigned SIZES [Q] = HYB_SIZES,
  parameter int unsigned N         = WIDTH,
  parameter int unsigned NUCLEUS   = HYB_NUCLEUS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ci,
  output logic         out_valid,
  output logic [N-1:0] s,
  output logic         co,
  output logic         out_long
);
  typedef enum logic [1:0] {
    S_EMPTY,  // no operation in the operand register
    S_EVAL,   // first cycle of an operation
    S_EXTRA   // second cycle of a predicted-long operation
  } state_t;

  state_t       state, state_nx;
  logic [N-1:0] a_q, b_q;
  logic         ci_q;
  logic [N-1:0] sum;
  logic         cout, pred;
  logic         done, accept;

  hybrid_cska #(.Q(Q), .SIZES(SIZES), .N(N), .NUCLEUS(NUCLEUS)) u_hybrid (
    .a(a_q), .b(b_q), .ci(ci_q), .s(sum), .co(cout), .pred(pred)
  );

  // The operation in flight completes at the next edge
  assign done     = (state == S_EXTRA) || (state == S_EVAL && !pred);
  assign in_ready = (state == S_EMPTY) || done;
  assign accept   = in_valid && in_ready;

  always_comb begin
    if (accept)                         state_nx = S_EVAL;
    else if (state == S_EVAL && pred)   state_nx = S_EXTRA;
    else if (done)                      state_nx = S_EMPTY;
    else                                state_nx = state;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_EMPTY;
      a_q       <= '0;
      b_q       <= '0;
      ci_q      <= 1'b0;
      out_valid <= 1'b0;
      s         <= '0;
      co        <= 1'b0;
      out_long  <= 1'b0;
    end else begin
      state     <= state_nx;
      out_valid <= done;
      if (done) begin
        s        <= sum;
        co       <= cout;
        out_long <= (state == S_EXTRA);
      end
      if (accept) begin
        a_q  <= a;
        b_q  <= b;
        ci_q <= ci;
      end
    end
  end

  // A predicted-long operation must not be displaced before its extra cycle.
  a_long_blocks_input: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_EVAL && pred) |-> !in_ready);
  // An operation flagged long in its first cycle always gets the extra cycle.
  a_long_gets_extra: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_EVAL && pred) |=> (state == S_EXTRA));
endmodule
