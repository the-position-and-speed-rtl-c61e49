// position_counter - POS_W-bit up/down position counter.
//
// Counts on both the rising and the falling edges of CNT, up when the
// direction is right and down when it is left, giving four counts per
// encoder line. CNT is sampled by the clock and compared with its value one
// clock earlier, so a CNT edge changes the position one clock later. The
// count is two's complement and wraps. It is cleared by rst, by zero_cnt
// ("zero counter"), and, when index_en is set, by the rising edge of the
// active-high index pulse of channel C; a clear wins over a count in the
// same clock.
//
// The 32-bit width and the edge counting follow the published module;
// what the index does, the priorities and the wrap are this design's.
module position_counter
  import qep_pkg::*;
#(
  parameter int unsigned POS_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             zero_cnt,
  input  logic             index_en,
  input  logic             index,
  input  logic             cnt,
  input  dir_t             direction,
  output logic [POS_W-1:0] position
);

  logic cnt_d, index_d;
  logic step, index_rise;

  assign step       = cnt ^ cnt_d;
  assign index_rise = index & ~index_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_d    <= cnt;
      index_d  <= index;
      position <= '0;
    end else begin
      cnt_d   <= cnt;
      index_d <= index;
      if (zero_cnt || (index_en && index_rise))
        position <= '0;
      else if (step)
        position <= (direction == DIR_RIGHT) ? position + 1'b1 : position - 1'b1;
    end
  end

endmodule
