// direction_decoder - "logic decoding signals A & B": turns the filtered
// quadrature pair into a direction bit and the count signal CNT.
//
// CNT is set by the rising edge and reset by the falling edge of the pulses
// coming alternately from A and B, which makes it A xor B: it changes once
// for every edge of either channel, so counting both edges of CNT gives four
// counts per encoder line. The direction is read from the order of the AB
// states: right walks 00 -> 01 -> 11 -> 10 and left walks 00 -> 10 -> 11 ->
// 01. Whenever exactly one channel changes, the new direction is worked out
// from the previous and the new state and registered in the same clock as
// CNT, so a CNT edge and the direction of its own step reach the counters
// together. A change of both channels (not a legal step) leaves CNT and the
// direction unchanged.
//
// The CNT waveform and the state sequences follow the published design;
// the encoding of the direction bit (1 = right = up) is this design's.
// Ports: clk, rst (synchronous; CNT and the stored state load A xor B and
// the inputs), a, b (filtered channels), cnt, direction. Latency: one clock.
module direction_decoder
  import qep_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic cnt,
  output dir_t direction
);

  quad_t prev, cur;

  assign cur = '{a: a, b: b};

  always_ff @(posedge clk) begin
    if (rst) begin
      prev      <= cur;
      cnt       <= a ^ b;
      direction <= DIR_RIGHT;
    end else begin
      prev <= cur;
      cnt  <= cur.a ^ cur.b;
      if ((cur.a != prev.a) ^ (cur.b != prev.b))
        direction <= step_dir(cur.a != prev.a, cur);
    end
  end

endmodule
