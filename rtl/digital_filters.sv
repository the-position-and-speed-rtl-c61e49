// digital_filters - the input filter block of the measurement module.
//
// Each encoder channel (A, B and the index C) first passes its own
// pulse_filter, which drops pulses shorter than LEN clock cycles. A and B
// then go through the single_channel_filter, which drops pulses that show
// up in only one of the two channels, so the two filters are in cascade.
// C is inverted when INDEX_ACTIVE_LOW is set, so 'index' is active high.
//
// The cascade and the filters follow the published design; the index
// path and its polarity are this design's reading of how the C channel is
// used. Latency: LEN+1 clocks through the pulse filter plus one clock
// through the single-channel filter; the filtered A/B pair additionally
// lags by the one step the single-channel filter holds pending.
module digital_filters #(
  parameter int unsigned LEN              = qep_pkg::T_MIN_CYC,
  parameter bit          INDEX_ACTIVE_LOW = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic ch_a,
  input  logic ch_b,
  input  logic ch_c,
  output logic cha_filtr,
  output logic chb_filtr,
  output logic index,
  output logic illegal
);

  logic a_pf, b_pf, c_pf;

  pulse_filter #(.LEN(LEN)) u_pf_a (.clk, .rst, .in_filter(ch_a), .out_filter(a_pf));
  pulse_filter #(.LEN(LEN)) u_pf_b (.clk, .rst, .in_filter(ch_b), .out_filter(b_pf));
  pulse_filter #(.LEN(LEN)) u_pf_c (.clk, .rst, .in_filter(ch_c ^ INDEX_ACTIVE_LOW),
                                    .out_filter(c_pf));

  single_channel_filter u_scf (
    .clk, .rst,
    .a_in(a_pf), .b_in(b_pf),
    .a_out(cha_filtr), .b_out(chb_filtr),
    .illegal
  );

  assign index = c_pf;

endmodule
