// rs232_reporter - serial link that reports position and velocity.
//
// On 'send' (ignored while a frame is in progress) the current position
// and velocity are captured and sent as one frame of bytes over an 8N1
// UART transmitter: a sync byte 0xA5, then the position and the velocity,
// each most significant byte first (POS_W/8 + VEL_W/8 bytes). Every byte is
// a start bit (0), eight data bits LSB first and a stop bit (1), each bit
// CLK_DIV clocks long; txd idles high. The default CLK_DIV = 434 gives
// 115200 baud from 50 MHz, so a 7-byte frame takes 70 bits = 30380 clocks,
// well inside the 1 ms velocity gate that triggers it.
//
// A serial RS-232 port on the FPGA for reading out the measurements is
// part of the published test set-up; baud rate and frame format here are
// this design's own. 'busy' is high from the clock after 'send' until the
// last stop bit has been sent. POS_W and VEL_W must be multiples of 8.
module rs232_reporter #(
  parameter int unsigned CLK_DIV = qep_pkg::UART_DIV,
  parameter int unsigned POS_W   = 32,
  parameter int unsigned VEL_W   = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             send,
  input  logic [POS_W-1:0] position,
  input  logic [VEL_W-1:0] velocity,
  output logic             txd,
  output logic             busy
);

  localparam int unsigned NBYTES = 1 + POS_W / 8 + VEL_W / 8;
  localparam int unsigned FW     = 8 * NBYTES;
  localparam logic [7:0]  SYNC   = 8'hA5;
  localparam int unsigned DW     = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;
  localparam int unsigned BW     = $clog2(NBYTES + 1);

  logic [FW-1:0] frame;     // bytes still to send, next one in the top byte
  logic [9:0]    shreg;     // current character: stop, data, start (LSB out first)
  logic [3:0]    bit_cnt;   // bits of the current character still to send
  logic [BW-1:0] byte_cnt;  // characters still to send after the current one
  logic [DW-1:0] div;

  assign txd = shreg[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      frame    <= '0;
      shreg    <= '1;
      bit_cnt  <= '0;
      byte_cnt <= '0;
      div      <= '0;
    end else if (!busy) begin
      shreg <= '1;
      if (send) begin
        busy     <= 1'b1;
        frame    <= {position, velocity, 8'h00};
        shreg    <= {1'b1, SYNC, 1'b0};
        bit_cnt  <= 4'd10;
        byte_cnt <= BW'(NBYTES - 1);
        div      <= '0;
      end
    end else if (div != DW'(CLK_DIV - 1)) begin
      div <= div + 1'b1;
    end else begin
      div <= '0;
      if (bit_cnt != 4'd1) begin
        shreg   <= {1'b1, shreg[9:1]};
        bit_cnt <= bit_cnt - 1'b1;
      end else if (byte_cnt != '0) begin
        shreg    <= {1'b1, frame[FW-1 -: 8], 1'b0};
        frame    <= frame << 8;
        bit_cnt  <= 4'd10;
        byte_cnt <= byte_cnt - 1'b1;
      end else begin
        shreg <= '1;
        busy  <= 1'b0;
      end
    end
  end

  initial assert (POS_W % 8 == 0 && VEL_W % 8 == 0)
    else $error("rs232_reporter: POS_W and VEL_W must be multiples of 8");

endmodule
