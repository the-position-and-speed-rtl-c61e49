// tb_single_channel_filter - self-checking test of the single-channel pulse
// filter.
//
// The inputs are driven as an integer encoder position p, shown as the
// quadrature state gray(p) (0:00, 1:01, 2:11, 3:10 for {A,B}). The
// reference keeps the committed position c: the output moves one step
// towards p only when p has moved two steps away from c, so |p - c| <= 1
// always, and a single-channel pulse (p goes to c+-1 and back) never moves
// it. The test covers forward and backward runs, dithering on one edge, a
// long random walk, and an illegal double change, which must raise
// 'illegal' and leave the output unchanged.
module tb_single_channel_filter;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic a_in = 1'b0, b_in = 1'b0;
  logic a_out, b_out, illegal;
  int   checks = 0, failures = 0;
  int   p = 0, c = 0;
  int   n_drop = 0, n_commit = 0;

  single_channel_filter dut (.clk, .rst, .a_in, .b_in, .a_out, .b_out, .illegal);

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

  // Move the input one step and let the filter settle for 'hold' clocks.
  task automatic step(input int d, input int hold);
    int c_old;
    c_old = c;
    p += d;
    if (p - c == 2) c = p - 1;
    if (c - p == 2) c = p + 1;
    if (c != c_old) n_commit++;
    {a_in, b_in} = gray(p);
    repeat (hold) @(posedge clk);
    #1;
    check({a_out, b_out} == gray(c),
          $sformatf("p=%0d c=%0d out=%b expected %b", p, c, {a_out, b_out}, gray(c)));
    check(!illegal, "no illegal flag on a legal step");
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk) #1;
    check({a_out, b_out} == 2'b00, "reset state");
    // Forward 12 steps: output lags by one.
    repeat (12) step(+1, 2);
    check(c == 11, "committed 11 after 12 forward steps");
    // Dither around one edge: nothing committed.
    begin
      int c0;
      c0 = c;
      repeat (10) begin step(-1, 2); step(+1, 2); end
      check(c == c0, "dither moves nothing");
      if (c == c0) n_drop++;
    end
    repeat (20) step(-1, 1);
    // Random walk with one-cycle steps.
    repeat (3000) step(($urandom_range(1) == 0) ? -1 : 1, 1 + int'($urandom_range(2)));
    // Illegal: both channels at once, from a settled state (p == c).
    if (p != c) step(c - p, 2);
    begin
      logic [1:0] held_q;
      @(posedge clk) #1;
      held_q = {a_out, b_out};
      {a_in, b_in} = gray(p + 2);
      @(posedge clk) #1;
      check(illegal, "illegal flag on a double change");
      repeat (3) @(posedge clk);
      #1 check({a_out, b_out} == held_q, "output held on a double change");
      {a_in, b_in} = gray(p);
      repeat (3) @(posedge clk);
      #1 check({a_out, b_out} == gray(c), "recovers after the double change");
    end
    check(n_commit > 1000, "random walk committed steps");
    $display("commits=%0d dither_drops=%0d", n_commit, n_drop);
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
