// tb_speed_counter - self-checking test of the gated speed counter.
//
// Uses a short gate (PERIOD = 200 clocks) and a 16-bit result. CNT is
// toggled at random moments with a random but biased direction; the test
// counts the signed edges it produced in each gate and, at every vel_valid,
// expects velocity to equal that count. It checks that vel_valid comes
// exactly every PERIOD clocks. A second instance with an 8-bit result is
// driven with more than 127 edges in one direction in a gate and must
// saturate at +127, then at -128.
module tb_speed_counter;
  import qep_pkg::*;
  localparam int PERIOD = 200;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic cnt = 1'b0;
  dir_t direction = DIR_RIGHT;
  logic signed [15:0] velocity;
  logic vel_valid;
  logic signed [7:0] vel8;
  logic vel8_valid;
  int checks = 0, failures = 0;
  int gate_count = 0, gates = 0, last_valid = -1, cyc = 0;
  bit sat_phase = 1'b0;
  int n_sat = 0;

  speed_counter #(.VEL_W(16), .PERIOD(PERIOD)) dut (.clk, .rst, .cnt, .direction,
                                                    .velocity, .vel_valid);
  speed_counter #(.VEL_W(8), .PERIOD(PERIOD)) dut8 (.clk, .rst, .cnt, .direction,
                                                    .velocity(vel8), .vel_valid(vel8_valid));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Edges are applied just after a clock edge and seen by the DUT at the next
  // one; the reference counts them in the gate that the DUT will see them in.
  int pending = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    gate_count += pending;
    pending = 0;
    #1;
    if (vel_valid) begin
      check(velocity == 16'(gate_count), $sformatf("velocity %0d expected %0d", velocity, gate_count));
      if (last_valid >= 0) check(cyc - last_valid == PERIOD, "gate period");
      if (sat_phase) begin
        if (gate_count > 127)  begin check(vel8 == 8'sd127, "saturates at +127");  n_sat++; end
        if (gate_count < -128) begin check(vel8 == -8'sd128, "saturates at -128"); n_sat++; end
      end else begin
        check(vel8 == 8'(gate_count), "8-bit copy agrees below saturation");
      end
      last_valid = cyc;
      gates++;
      gate_count = 0;
    end
  end

  task automatic toggle(input dir_t d);
    @(posedge clk) #2;
    direction = d;
    cnt = ~cnt;
    pending += (d == DIR_RIGHT) ? 1 : -1;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    // Random phase: |count| < 100 per gate.
    repeat (6000) begin
      if ($urandom_range(3) == 0) toggle($urandom_range(9) < 6 ? DIR_RIGHT : DIR_LEFT);
      else @(posedge clk);
    end
    // Wait for a gate end, then saturation phase.
    @(posedge vel_valid);
    sat_phase = 1'b1;
    repeat (PERIOD - 10) toggle(DIR_RIGHT);
    repeat (PERIOD + 5) @(posedge clk);
    repeat (PERIOD - 10) toggle(DIR_LEFT);
    repeat (2 * PERIOD) @(posedge clk);
    check(gates > 30, "enough gates seen");
    check(n_sat >= 2, "saturation reached both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
