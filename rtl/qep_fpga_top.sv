// qep_fpga_top - FPGA top level of the encoder measurement set-up.
//
// The measurement module turns the three encoder lines (taken through
// optocouplers outside the FPGA) into a 32-bit position and a 16-bit
// velocity. At every velocity update the RS-232 reporter sends a frame with
// the position and the velocity to a monitoring PC. Position, velocity and
// the status bits are also brought out as parallel ports for the rest of a
// motion processor.
//
// Ports: clk (50 MHz), rst, zero_cnt, index_en, ch_a/ch_b/ch_c,
// position, velocity, vel_valid, direction (1 = right, counting up),
// illegal, txd (UART output, idle high, 8N1), tx_busy (frame in
// progress). The frame is started by the
// vel_valid strobe; its layout is given in rs232_reporter.
//
// Reading the measurements out over a serial link follows the original
// test set-up; triggering a frame from every velocity update and the
// extra status ports are this design's choices.
module qep_fpga_top
  import qep_pkg::*;
#(
  parameter int unsigned LEN     = qep_pkg::T_MIN_CYC,
  parameter int unsigned PERIOD  = qep_pkg::SPEED_GATE,
  parameter int unsigned CLK_DIV = qep_pkg::UART_DIV
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               zero_cnt,
  input  logic               index_en,
  input  logic               ch_a,
  input  logic               ch_b,
  input  logic               ch_c,
  output logic [31:0]        position,
  output logic signed [15:0] velocity,
  output logic               vel_valid,
  output logic               direction,
  output logic               illegal,
  output logic               txd,
  output logic               tx_busy
);

  dir_t dir;

  measurement_module #(.LEN(LEN), .POS_W(32), .VEL_W(16), .PERIOD(PERIOD)) u_meas (
    .clk, .rst, .zero_cnt, .index_en, .ch_a, .ch_b, .ch_c,
    .position, .velocity, .vel_valid, .direction(dir), .illegal
  );

  assign direction = (dir == DIR_RIGHT);

  rs232_reporter #(.CLK_DIV(CLK_DIV), .POS_W(32), .VEL_W(16)) u_rs232 (
    .clk, .rst, .send(vel_valid), .position, .velocity(velocity),
    .txd, .busy(tx_busy)
  );

endmodule
