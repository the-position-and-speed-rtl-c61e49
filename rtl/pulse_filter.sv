// pulse_filter - rejects pulses shorter than LEN clock cycles on one channel.
//
// The channel is shifted into a LEN-bit serial-in/parallel-out register at
// every clock. An XNOR reduction over all taps tells whether the last LEN
// samples agree; only then is the oldest tap loaded into the output latch.
// While the taps disagree the output keeps its last value. Any pulse (high
// or low) shorter than LEN cycles therefore never reaches the output, and a
// valid edge appears LEN cycles after it reached the input (one cycle for
// the first register stage, LEN-1 to fill the rest, one for the latch, i.e.
// out_filter follows LEN+1 rising clock edges after the input changed).
//
// The register, the XNOR check and the output latch follow the published
// filter; the output latch is a flip-flop with the XNOR result as enable
// instead of a separately clocked latch, and the synchronous reset is this
// design's addition: it fills the register and the output with the present
// input level, so the filter starts out agreeing with the encoder. The default LEN = 100 is T_min at 50 MHz for a
// 5000-line encoder turning at 3000 rpm.
//
// Ports: clk (sampling clock), rst (synchronous, active high), in_filter
// (raw channel), out_filter (filtered channel).
module pulse_filter #(
  parameter int unsigned LEN = qep_pkg::T_MIN_CYC
) (
  input  logic clk,
  input  logic rst,
  input  logic in_filter,
  output logic out_filter
);

  logic [LEN-1:0] taps;
  logic           agree;

  // XNOR over all taps: all ones or all zeros.
  assign agree = (&taps) | ~(|taps);

  always_ff @(posedge clk) begin
    if (rst) begin
      taps       <= {LEN{in_filter}};
      out_filter <= in_filter;
    end else begin
      taps <= {taps[LEN-2:0], in_filter};
      if (agree) out_filter <= taps[LEN-1];
    end
  end

  initial assert (LEN >= 2) else $error("pulse_filter: LEN must be at least 2");

endmodule
