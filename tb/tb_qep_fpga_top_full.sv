// tb_qep_fpga_top_full - the top level at its default sizes: 50 MHz clock,
// 100-clock pulse filter, 1 ms speed gate (50000 clocks), 115200 baud.
//
// The model encoder (5000 lines) turns right at the top speed of 3000 rpm,
// i.e. one quadrature step every 50 clocks (4 x 250 kHz), for four gates,
// then left at half that speed for three gates, then stops. Checks: every
// full gate at top speed reports 1000 counts (+-1 for the gate phase),
// every full gate at half speed reports -500 (+-1); the position at the end
// equals the committed steps; the last report frame decoded from txd
// matches the position and velocity of its strobe.
module tb_qep_fpga_top_full;
  localparam int CLK_HZ = 50_000_000;
  localparam int GATE = CLK_HZ / 1000;
  localparam int BIT = CLK_HZ / 115200;
  localparam int QUARTER = 50;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic zero_cnt = 1'b0, index_en = 1'b0;
  logic ch_a = 1'b0, ch_b = 1'b0, ch_c = 1'b1;
  logic [31:0] position;
  logic signed [15:0] velocity;
  logic vel_valid, direction, illegal, txd, tx_busy;
  int checks = 0, failures = 0;
  int p = 0;
  int phase = 0;   // 0 idle, 1 fast right, 2 slow left
  int n_fast = 0, n_slow = 0, n_frames = 0;

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

  // A gate is "full" when the whole of it ran in one phase; the phase is
  // remembered one gate back.
  int prev_phase = -1;
  logic [55:0] last_exp;
  always @(posedge clk) begin
    #1;
    if (vel_valid) begin
      if (prev_phase == 1 && phase == 1) begin
        check(velocity >= 999 && velocity <= 1001, $sformatf("top speed velocity %0d", velocity));
        n_fast++;
      end
      if (prev_phase == 2 && phase == 2) begin
        check(velocity >= -501 && velocity <= -499, $sformatf("half speed velocity %0d", velocity));
        n_slow++;
      end
      prev_phase = phase;
      if (!tx_busy) last_exp = {8'hA5, position, velocity};
    end
  end

  logic [55:0] frame;
  logic [55:0] frame_exp;
  int nbytes = 0;
  initial begin
    forever begin
      logic [7:0] byte_v;
      @(negedge txd);
      if (nbytes == 0) frame_exp = last_exp;
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        byte_v[i] = txd;
      end
      repeat (BIT) @(posedge clk);
      frame = {frame[47:0], byte_v};
      nbytes++;
      if (nbytes == 7) begin
        nbytes = 0;
        n_frames++;
        check(frame == frame_exp, $sformatf("frame %h expected %h", frame, frame_exp));
      end
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (300) @(posedge clk);
    phase = 1;
    repeat (4 * GATE / QUARTER) begin
      p++;
      #1 {ch_a, ch_b} = gray(p);
      repeat (QUARTER) @(posedge clk);
    end
    phase = 2;
    repeat (3 * GATE / (2 * QUARTER)) begin
      p--;
      #1 {ch_a, ch_b} = gray(p);
      repeat (2 * QUARTER) @(posedge clk);
    end
    phase = 0;
    repeat (2 * GATE) @(posedge clk);
    // Last step is held pending by the single-channel filter.
    check(position == 32'(p + 1), $sformatf("final position %0d expected %0d", $signed(position), p + 1));
    check(n_fast >= 2, "full gates at top speed");
    check(n_slow >= 1, "full gates at half speed");
    check(n_frames >= 5, "report frames received");
    check(!illegal, "no illegal step");
    $display("fast_gates=%0d slow_gates=%0d frames=%0d final_position=%0d",
             n_fast, n_slow, n_frames, $signed(position));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12 * GATE) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
