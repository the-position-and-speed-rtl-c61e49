// tb_qep_fpga_top - end-to-end test of the FPGA top level.
//
// Reduced sizes: LEN = 8, PERIOD = 2000 clocks, CLK_DIV = 4. A model
// encoder runs a motion programme of runs and oscillations of different
// amplitude with glitches, single-channel dither, an illegal double change,
// a zero-counter request and an index pulse. A UART receiver decodes the
// report frames from txd. Checks: the position after every step against a
// step-level reference, and each received frame against the position and
// velocity present at the strobe that started it. Each mechanism is counted and must
// happen at least once: short pulse rejected, single-channel pulse
// dropped, direction reversal, illegal step flagged, zero counter, index
// clear, velocity update, frame received, and a reset taken while the
// encoder rests in state 11, after which counting must resume from zero
// without an illegal step.
module tb_qep_fpga_top;
  localparam int LEN = 8;
  localparam int PERIOD = 2000;
  localparam int DIV = 4;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic zero_cnt = 1'b0, index_en = 1'b0;
  logic ch_a = 1'b0, ch_b = 1'b0, ch_c = 1'b1;
  logic [31:0] position;
  logic signed [15:0] velocity;
  logic vel_valid, direction, illegal, txd, tx_busy;
  int checks = 0, failures = 0;
  int p = 0, c = 0, c_off = 0;
  int n_short = 0, n_dither = 0, n_rev = 0, n_illegal = 0, n_zero = 0, n_index = 0;
  int n_vel = 0, n_frames = 0, n_reset = 0;
  int last_d = 1;

  qep_fpga_top #(.LEN(LEN), .PERIOD(PERIOD), .CLK_DIV(DIV)) dut (
    .clk, .rst, .zero_cnt, .index_en, .ch_a, .ch_b, .ch_c,
    .position, .velocity, .vel_valid, .direction, .illegal, .txd, .tx_busy);

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

  // Frames expected: position and velocity at each strobe while idle.
  logic [55:0] exp_q[$];
  always @(posedge clk) begin
    #2;
    if (illegal) n_illegal++;
    if (vel_valid) begin
      n_vel++;
      if (!tx_busy || exp_q.size() == 0) exp_q.push_back({8'hA5, position, velocity});
    end
  end

  // UART receiver.
  logic [55:0] frame;
  int nbytes = 0;
  initial begin
    forever begin
      logic [7:0] byte_v;
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      #1 check(txd == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        #1 byte_v[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      #1 check(txd == 1'b1, "stop bit");
      frame = {frame[47:0], byte_v};
      nbytes++;
      if (nbytes == 7) begin
        nbytes = 0;
        n_frames++;
        check(exp_q.size() > 0, "frame expected");
        if (exp_q.size() > 0) begin
          logic [55:0] e;
          e = exp_q.pop_front();
          check(frame == e, $sformatf("frame %h expected %h", frame, e));
        end
      end
    end
  end

  task automatic step(input int d, input int hold);
    int c_old;
    c_old = c;
    p += d;
    if (p - c == 2) c = p - 1;
    if (c - p == 2) c = p + 1;
    if (c != c_old) begin
      if ((c - c_old) != last_d) n_rev++;
      last_d = c - c_old;
    end
    @(posedge clk) #1 {ch_a, ch_b} = gray(p);
    repeat (hold) @(posedge clk);
    #1;
    check(position == 32'(c - c_off), $sformatf("position %0d expected %0d", $signed(position), c - c_off));
    check(direction == (last_d > 0), "direction");
  endtask

  task automatic short_pulse(input int which);
    @(posedge clk) #1;
    if (which == 0) ch_a = ~ch_a; else if (which == 1) ch_b = ~ch_b; else ch_c = ~ch_c;
    repeat (1 + int'($urandom_range(LEN - 2))) @(posedge clk);
    #1;
    if (which == 0) ch_a = ~ch_a; else if (which == 1) ch_b = ~ch_b; else ch_c = ~ch_c;
    n_short++;
  endtask

  initial begin
    int c0;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (3 * LEN) @(posedge clk);
    // Motion programme: runs and oscillations of various amplitude.
    for (int seg = 0; seg < 40; seg++) begin
      int amp, hold;
      amp  = 1 + int'($urandom_range(40));
      hold = LEN + 4 + int'($urandom_range(3 * LEN));
      repeat (amp) begin
        step((seg % 2 == 0) ? 1 : -1, hold);
        if ($urandom_range(3) == 0) short_pulse(int'($urandom_range(2)));
      end
      if (seg % 2 == 1) repeat (amp / 2) step(-1, hold);
    end
    // Single-channel dither from a settled point.
    if (p != c) step(c - p, LEN + 6);
    c0 = c;
    repeat (8) begin step(1, LEN + 6); step(-1, LEN + 6); end
    check(c == c0 && position == 32'(c0 - c_off), "dither not counted");
    n_dither++;
    // Illegal double change.
    @(posedge clk) #1 {ch_a, ch_b} = gray(p + 2);
    repeat (3 * LEN) @(posedge clk);
    #1 {ch_a, ch_b} = gray(p);
    repeat (3 * LEN) @(posedge clk);
    #1 check(position == 32'(c - c_off), "position kept over an illegal step");
    // Zero counter.
    @(posedge clk) #1 zero_cnt = 1'b1;
    @(posedge clk) #1 zero_cnt = 1'b0;
    c_off = c;
    @(posedge clk) #1 check(position == 0, "zero counter");
    n_zero++;
    repeat (25) step(1, LEN + 6);
    // Index with index_en.
    index_en = 1'b1;
    @(posedge clk) #1 ch_c = 1'b0;
    repeat (2 * LEN) @(posedge clk);
    #1 ch_c = 1'b1;
    check(position == 0, "index clear");
    if (position == 0) n_index++;
    c_off = c;
    repeat (10) step(1, LEN + 6);
    // Let the last frames go out.
    repeat (2 * PERIOD) @(posedge clk);
    // Reset with the encoder resting in state 11.
    if (p != c) step(c - p, LEN + 6);
    while (gray(p) != 2'b11) begin step(1, LEN + 6); step(1, LEN + 6); step(-1, LEN + 6); end
    @(posedge vel_valid);                 // reset between two frames
    repeat (2) @(posedge clk);
    while (tx_busy) @(posedge clk);
    repeat (4 * DIV) @(posedge clk);
    #1 rst = 1'b1;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    c = p;
    c_off = c;
    exp_q.delete();
    repeat (LEN + 6) @(posedge clk);
    #1 check(position == 0 && !illegal, "clean start after reset in state 11");
    begin
      int il0;
      il0 = n_illegal;
      repeat (6) step(1, LEN + 6);
      repeat (3) step(-1, LEN + 6);
      check(n_illegal == il0, "no illegal step after reset in state 11");
    end
    n_reset++;
    repeat (2 * PERIOD) @(posedge clk);
    check(n_short > 0, "short pulses rejected");
    check(n_dither > 0, "single-channel pulses dropped");
    check(n_rev > 0, "direction reversals");
    check(n_illegal > 0, "illegal step flagged");
    check(n_zero > 0, "zero counter used");
    check(n_index > 0, "index clear used");
    check(n_vel > 5, "velocity updates");
    check(n_frames > 5, "frames received");
    check(n_reset > 0, "reset in a non-zero state");
    $display("short=%0d dither=%0d reversals=%0d illegal=%0d zero=%0d index=%0d vel=%0d frames=%0d reset=%0d",
             n_short, n_dither, n_rev, n_illegal, n_zero, n_index, n_vel, n_frames, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
