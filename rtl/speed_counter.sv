// speed_counter - counts CNT edges over a fixed gate period.
//
// A free-running timer divides the clock into gates of PERIOD cycles. During
// a gate every edge of CNT adds one (direction right) or subtracts one
// (direction left) to a signed VEL_W-bit accumulator that saturates at its
// limits. On the last cycle of the gate the accumulator, including a step
// in that cycle, is copied to 'velocity', 'vel_valid' pulses for one clock
// and the accumulator restarts from zero, so no edge is lost between gates.
// velocity is the signed number of quadrature counts per gate: with
// 4*cp counts per revolution, speed [rev/s] = velocity * CLK_HZ /
// (PERIOD * 4 * cp).
//
// The 16-bit width and counting in a fixed period follow the published
// module; the 1 ms gate, the sign and the saturation are this design's.
// Ports: clk, rst (synchronous; restarts the gate and clears velocity),
// cnt, direction, velocity, vel_valid. vel_valid comes every PERIOD clocks,
// the first one PERIOD clocks after reset is released.
module speed_counter
  import qep_pkg::*;
#(
  parameter int unsigned VEL_W  = 16,
  parameter int unsigned PERIOD = qep_pkg::SPEED_GATE
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    cnt,
  input  dir_t                    direction,
  output logic signed [VEL_W-1:0] velocity,
  output logic                    vel_valid
);

  localparam int unsigned TW = (PERIOD > 1) ? $clog2(PERIOD) : 1;
  localparam logic signed [VEL_W-1:0] VMAX = {1'b0, {(VEL_W-1){1'b1}}};
  localparam logic signed [VEL_W-1:0] VMIN = {1'b1, {(VEL_W-1){1'b0}}};

  logic [TW-1:0]           timer;
  logic signed [VEL_W-1:0] acc, acc_next;
  logic                    cnt_d, step, gate_end;

  assign step     = cnt ^ cnt_d;
  assign gate_end = (timer == TW'(PERIOD - 1));

  always_comb begin
    acc_next = acc;
    if (step) begin
      if (direction == DIR_RIGHT) begin
        if (acc != VMAX) acc_next = acc + 1'b1;
      end else begin
        if (acc != VMIN) acc_next = acc - 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      timer     <= '0;
      acc       <= '0;
      cnt_d     <= cnt;
      velocity  <= '0;
      vel_valid <= 1'b0;
    end else begin
      cnt_d     <= cnt;
      vel_valid <= gate_end;
      if (gate_end) begin
        timer    <= '0;
        velocity <= acc_next;
        acc      <= '0;
      end else begin
        timer <= timer + 1'b1;
        acc   <= acc_next;
      end
    end
  end

  initial assert (PERIOD >= 2) else $error("speed_counter: PERIOD must be at least 2");

endmodule
