// single_channel_filter - removes pulses that occur in only one of the two
// quadrature channels.
//
// When the shaft dithers around one edge, or noise hits one line, one
// channel toggles back and forth while the other stays put. A plain
// decoder would count such a pulse up and down again; this state machine
// never lets it through. The output state {a_out, b_out} is only moved by a
// step once motion has gone one step further:
//   IDLE   - input equals output.
//   PEND_A - A differs from the output, B agrees. If A returns, the pulse
//            is dropped (back to IDLE). If B changes too, the held A step
//            is passed to the output and B becomes the pending change.
//   PEND_B - the same with the channels swapped.
// The output therefore lags the input by at most one quadrature step; the
// step left pending when motion stops is the only difference between the
// input and output positions, and it does not accumulate. A change of both
// channels in one clock with nothing pending is not a legal quadrature step:
// the output holds, and 'illegal' is high (one clock late) for every clock in
// which the input differs from the idle output in both channels.
//
// The function (drop single-channel pulses, built as a state machine) is
// the published one; the states and the commit rule are this design's.
// Timing: a committed step appears on the outputs one clock after the
// input change that confirmed it. While rst is high the outputs load the
// inputs, so the first state after reset is taken as the starting point.
module single_channel_filter
  import qep_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic a_in,
  input  logic b_in,
  output logic a_out,
  output logic b_out,
  output logic illegal
);

  typedef enum logic [1:0] {
    S_IDLE   = 2'd0,
    S_PEND_A = 2'd1,
    S_PEND_B = 2'd2
  } state_t;

  state_t state;
  quad_t  q, in;

  assign in    = '{a: a_in, b: b_in};
  assign a_out = q.a;
  assign b_out = q.b;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      q       <= in;
      illegal <= 1'b0;
    end else begin
      illegal <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (in.a != q.a && in.b == q.b)      state <= S_PEND_A;
          else if (in.b != q.b && in.a == q.a) state <= S_PEND_B;
          else if (in != q)                    illegal <= 1'b1;
        end
        S_PEND_A: begin
          if (in == q) begin
            state <= S_IDLE;              // A pulse alone: dropped
          end else if (in.b != q.b) begin
            if (in.a != q.a) q.a <= in.a; // A step confirmed by B
            state <= S_PEND_B;            // B change now pending
          end
        end
        S_PEND_B: begin
          if (in == q) begin
            state <= S_IDLE;              // B pulse alone: dropped
          end else if (in.a != q.a) begin
            if (in.b != q.b) q.b <= in.b; // B step confirmed by A
            state <= S_PEND_A;            // A change now pending
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
