// tb_station_oscillation - bench test of the top level at its default sizes
// with an oscillating motion programme.
//
// A model 5000-line encoder follows oscillations of different displacement
// (from 1 to 600 quadrature counts) and period, at speeds up to 3000 rpm
// (one count every 50 clocks at 50 MHz). During the slower oscillations
// (200 clocks or more per count) and the pauses between them the lines are
// noisy: glitches of 1 to 61 clocks, all shorter than the 100-clock filter,
// are put on A, B and C. A glitch inside a channel pulse can split it into
// two pieces; the short piece is dropped and the edge is delayed by up to
// one filter length plus the glitch. At top speed a channel pulse is only
// one filter length long and such a split loses the pulse, so noise is kept
// off the faster segments. Checks: the measured position is never more
// than one count outside the range the true position took in the delay
// window (100 to 280 clocks earlier); at the end, after the encoder has
// stopped, it equals the committed count of a step-level reference (true
// position held back by the one pending step); at every velocity strobe
// the velocity equals the change of the measured position since the last
// strobe. Index is disabled.
module tb_station_oscillation;
  localparam int MIN_Q = 50;       // clocks per count at 3000 rpm
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic zero_cnt = 1'b0, index_en = 1'b0;
  logic ch_a = 1'b0, ch_b = 1'b0, ch_c = 1'b1;
  logic [31:0] position;
  logic signed [15:0] velocity;
  logic vel_valid, direction, illegal, txd, tx_busy;
  int checks = 0, failures = 0;
  int p = 0;
  int max_err = 0, n_glitch = 0, n_osc = 0, n_vel = 0;
  logic [31:0] pos_at_last = '0;

  qep_fpga_top dut (
    .clk, .rst, .zero_cnt, .index_en, .ch_a, .ch_b, .ch_c,
    .position, .velocity, .vel_valid, .direction, .illegal, .txd, .tx_busy);

  always #10 clk = ~clk;

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

  // True position history, one entry per clock.
  int hist[512];
  int hptr = 0;
  always @(posedge clk) begin
    hist[hptr] = p;
    hptr = (hptr + 1) % 512;
    #1;
    if (!rst) begin
      int lo, hi, v, err;
      lo = hist[(hptr + 512 - 100) % 512];
      hi = lo;
      for (int k = 100; k <= 280; k++) begin
        v = hist[(hptr + 512 - k) % 512];
        if (v < lo) lo = v;
        if (v > hi) hi = v;
      end
      v = int'($signed(position));
      err = (v < lo) ? lo - v : (v > hi) ? v - hi : 0;
      if (err > max_err) max_err = err;
      checks++;
      if (err > 1) begin
        failures++;
        if (failures < 10) $display("FAIL at %0t: position %0d true %0d..%0d", $time, v, lo, hi);
      end
    end
    if (vel_valid) begin
      n_vel++;
      check(32'(velocity) == position - pos_at_last, "velocity equals position change per gate");
      pos_at_last = position;
    end
  end

  // Noise: glitches shorter than the filter on any line at random moments.
  bit noise_on = 1'b0;
  initial begin
    forever begin
      int which, w;
      repeat (200 + int'($urandom_range(2000))) @(posedge clk);
      if (noise_on) begin
        which = int'($urandom_range(2));
        w = 1 + int'($urandom_range(60));
        #2;
        if (which == 0) ch_a = ~ch_a; else if (which == 1) ch_b = ~ch_b; else ch_c = ~ch_c;
        repeat (w) @(posedge clk);
        #2;
        {ch_a, ch_b} = gray(p);   // back to the true levels
        ch_c = 1'b1;
        n_glitch++;
      end
    end
  end

  // One count, held 'q' clocks. A glitch in progress ends by restoring the
  // true line levels.
  int c = 0;   // committed count: follows p only once p is two counts away
  task automatic move(input int d, input int q);
    p += d;
    if (p - c == 2) c = p - 1;
    if (c - p == 2) c = p + 1;
    @(posedge clk) #1 {ch_a, ch_b} = gray(p);
    repeat (q - 1) @(posedge clk);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (300) @(posedge clk);
    // Oscillations: displacement 1..600 counts, 50..300 clocks per count.
    for (int k = 0; k < 60; k++) begin
      int amp, q;
      amp = (k % 3 == 0) ? 1 + int'($urandom_range(3)) : 1 + int'($urandom_range(600));
      q   = MIN_Q + int'($urandom_range(5 * MIN_Q));
      noise_on = (q >= 4 * MIN_Q);
      repeat (amp) move(+1, q);
      repeat (amp) move(-1, q);
      n_osc++;
      // Noisy pause.
      noise_on = 1'b1;
      repeat (3000) @(posedge clk);
      noise_on = 1'b0;
      repeat (100) @(posedge clk);
    end
    repeat (120000) @(posedge clk);
    check(int'($signed(position)) == c, $sformatf("final position %0d, committed %0d", $signed(position), c));
    check(max_err <= 1, $sformatf("largest position error %0d counts", max_err));
    check(n_glitch > 20, "noise applied");
    check(n_vel > 10, "velocity strobes");
    check(!illegal, "no illegal step");
    $display("oscillations=%0d glitches=%0d velocity_strobes=%0d max_error=%0d",
             n_osc, n_glitch, n_vel, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
