// measurement_module - position and speed measurement for a quadrature
// incremental encoder.
//
// Signal chain: the raw channels A, B, C enter digital_filters (short-pulse
// rejection per channel, then single-channel pulse rejection on A/B). The
// filtered pair drives direction_decoder, which produces CNT (A xor B) and
// the direction. position_counter and speed_counter both count every edge
// of CNT in that direction: the first accumulates the position (four counts
// per encoder line), the second counts over a fixed gate and reports the
// velocity once per gate.
//
// Ports: clk (50 MHz), rst (synchronous reset of the whole chain; every
// stage loads the state of the stage before it, so rst must be held for at
// least four clocks for the chain to settle on the present encoder state),
// zero_cnt (clear position), index_en (let channel C clear the position),
// ch_a/ch_b/ch_c (encoder lines), position, velocity, vel_valid (one-clock
// strobe at each new velocity), direction and illegal (both channels changed
// at once). A channel edge reaches the position LEN+4 clocks later when the
// step is confirmed (pulse filter LEN+1, single-channel filter 1, decoder 1,
// counter 1).
//
// The block structure and the counter widths follow the published module;
// filter length, gate period and the index behaviour are this design's.
module measurement_module
  import qep_pkg::*;
#(
  parameter int unsigned LEN    = qep_pkg::T_MIN_CYC,
  parameter int unsigned POS_W  = 32,
  parameter int unsigned VEL_W  = 16,
  parameter int unsigned PERIOD = qep_pkg::SPEED_GATE
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    zero_cnt,
  input  logic                    index_en,
  input  logic                    ch_a,
  input  logic                    ch_b,
  input  logic                    ch_c,
  output logic [POS_W-1:0]        position,
  output logic signed [VEL_W-1:0] velocity,
  output logic                    vel_valid,
  output dir_t                    direction,
  output logic                    illegal
);

  logic cha_filtr, chb_filtr, index, cnt;

  digital_filters #(.LEN(LEN)) u_filters (
    .clk, .rst, .ch_a, .ch_b, .ch_c,
    .cha_filtr, .chb_filtr, .index, .illegal
  );

  direction_decoder u_decoder (
    .clk, .rst, .a(cha_filtr), .b(chb_filtr), .cnt, .direction
  );

  position_counter #(.POS_W(POS_W)) u_position (
    .clk, .rst, .zero_cnt, .index_en, .index, .cnt, .direction, .position
  );

  speed_counter #(.VEL_W(VEL_W), .PERIOD(PERIOD)) u_speed (
    .clk, .rst, .cnt, .direction, .velocity, .vel_valid
  );

endmodule
