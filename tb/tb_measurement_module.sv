// tb_measurement_module - end-to-end test of the measurement chain.
//
// LEN = 8, PERIOD = 300. The test moves a model encoder through a random
// walk of quadrature steps (each held LEN+4 to 3*LEN+4 clocks), adds glitches
// shorter than LEN on A, B and C, and single-channel dither. Checks:
//  - after each step the position equals the committed step count of a
//    step-level reference (output follows the encoder only once it is two
//    steps away, so a dither on one edge never counts);
//  - the latency from a confirming encoder edge to the position change is
//    LEN+4 clocks;
//  - at every velocity strobe the sum of all velocities since the last
//    clear equals the position (both count the same CNT edges);
//  - direction follows the last committed step;
//  - zero-counter and the index pulse (only when enabled) clear the
//    position.
module tb_measurement_module;
  import qep_pkg::*;
  localparam int LEN = 8;
  localparam int PERIOD = 300;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic zero_cnt = 1'b0, index_en = 1'b0;
  logic ch_a = 1'b0, ch_b = 1'b0, ch_c = 1'b1;
  logic [31:0] position;
  logic signed [15:0] velocity;
  logic vel_valid, illegal;
  dir_t direction;
  int checks = 0, failures = 0;
  int p = 0, c = 0, c_off = 0;
  longint vel_sum = 0;
  bit vel_check = 1'b1;
  int n_vel = 0, n_glitch = 0, n_rev = 0;
  dir_t last_dir = DIR_RIGHT;

  measurement_module #(.LEN(LEN), .POS_W(32), .VEL_W(16), .PERIOD(PERIOD)) dut (
    .clk, .rst, .zero_cnt, .index_en, .ch_a, .ch_b, .ch_c,
    .position, .velocity, .vel_valid, .direction, .illegal);

  always #5 clk = ~clk;

  function automatic logic [1:0] gray(input int pos);
    case (((pos % 4) + 4) % 4)
      0: return 2'b00;
      1: return 2'b01;
      2: return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) begin
    #2;
    if (vel_valid && vel_check) begin
      vel_sum += velocity;
      n_vel++;
      check(32'(vel_sum) == position,
            $sformatf("velocity sum %0d vs position %0d", vel_sum, $signed(position)));
    end
  end

  task automatic glitch();
    int which, w;
    which = int'($urandom_range(2));
    w = 1 + int'($urandom_range(LEN - 2));
    @(posedge clk) #1;
    if (which == 0) ch_a = ~ch_a; else if (which == 1) ch_b = ~ch_b; else ch_c = ~ch_c;
    repeat (w) @(posedge clk);
    #1;
    if (which == 0) ch_a = ~ch_a; else if (which == 1) ch_b = ~ch_b; else ch_c = ~ch_c;
    n_glitch++;
  endtask

  task automatic step(input int d, input bit with_glitch);
    int c_old;
    c_old = c;
    p += d;
    if (p - c == 2) c = p - 1;
    if (c - p == 2) c = p + 1;
    if (c != c_old) begin
      dir_t nd;
      nd = (c > c_old) ? DIR_RIGHT : DIR_LEFT;
      if (nd != last_dir) n_rev++;
      last_dir = nd;
    end
    @(posedge clk) #1 {ch_a, ch_b} = gray(p);
    repeat (LEN + 4 + int'($urandom_range(2 * LEN))) @(posedge clk);
    #1;
    check(position == 32'(c - c_off), $sformatf("position %0d expected %0d", $signed(position), c - c_off));
    check(direction == last_dir, "direction of the last counted step");
    if (with_glitch && $urandom_range(1) == 0) glitch();
  endtask

  initial begin
    int lat;
    logic [31:0] pos0;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (LEN + 4) @(posedge clk);
    // Latency of a confirmed step.
    step(+1, 1'b0);
    pos0 = position;
    @(posedge clk) #1 {ch_a, ch_b} = gray(p + 1);
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (position == pos0 && lat < 10 * LEN);
    check(lat == LEN + 4, $sformatf("latency %0d, expected %0d", lat, LEN + 4));
    p += 1; c = p - 1;
    repeat (2 * LEN) @(posedge clk);
    // Forward run, dither, random walk.
    repeat (30) step(+1, 1'b1);
    repeat (10) begin step(-1, 1'b0); step(+1, 1'b0); end
    repeat (30) step(-1, 1'b1);
    repeat (1500) step(($urandom_range(9) < 5) ? 1 : -1, 1'b1);
    // Zero counter.
    vel_check = 1'b0;
    @(posedge clk) #1 zero_cnt = 1'b1;
    @(posedge clk) #1 zero_cnt = 1'b0;
    c_off = c;
    // Velocity sum restarts at the next gate: wait for a gate with no motion.
    @(posedge vel_valid); @(posedge vel_valid);
    #3 vel_sum = 0;
    vel_check = 1'b1;
    check(position == 0, "zero counter clears");
    repeat (20) step(+1, 1'b0);
    // Index while disabled.
    @(posedge clk) #1 ch_c = 1'b0;
    repeat (2 * LEN) @(posedge clk);
    #1 ch_c = 1'b1;
    repeat (2 * LEN) @(posedge clk);
    #1 check(position == 32'(c - c_off), "index ignored when disabled");
    // Index enabled (the velocity sum no longer matches a cleared position).
    vel_check = 1'b0;
    index_en = 1'b1;
    @(posedge clk) #1 ch_c = 1'b0;
    repeat (2 * LEN) @(posedge clk);
    #1 ch_c = 1'b1;
    check(position == 0, "index clears when enabled");
    c_off = c;
    check(n_rev > 50, "direction reversals exercised");
    check(n_vel > 20, "velocity strobes seen");
    check(n_glitch > 200, "glitches injected");
    $display("velocity_strobes=%0d glitches=%0d reversals=%0d", n_vel, n_glitch, n_rev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
