// tb_digital_filters - self-checking test of the filter cascade.
//
// LEN = 8. The encoder is moved by whole quadrature steps, each held long
// enough to pass the short-pulse filter, and between steps random glitches
// shorter than LEN clocks are put on A, B or C. A step-level reference
// (committed position c follows p only once p is two steps away) gives the
// expected filtered pair gray(c) after each step has settled. The index
// line is active low at the input: a low pulse of LEN clocks or more must
// appear as a high pulse on 'index', a shorter one must not.
module tb_digital_filters;
  localparam int LEN = 8;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ch_a = 1'b0, ch_b = 1'b0, ch_c = 1'b1;
  logic cha_filtr, chb_filtr, index, illegal;
  int   checks = 0, failures = 0;
  int   p = 0, c = 0;
  int   n_glitch = 0, n_drop = 0, n_index = 0;
  bit   saw_index = 1'b0;

  digital_filters #(.LEN(LEN), .INDEX_ACTIVE_LOW(1'b1)) dut (
    .clk, .rst, .ch_a, .ch_b, .ch_c, .cha_filtr, .chb_filtr, .index, .illegal);

  always #5 clk = ~clk;
  always @(posedge clk) if (index) saw_index = 1'b1;

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

  task automatic glitch();
    int which, w;
    which = int'($urandom_range(2));
    w = 1 + int'($urandom_range(LEN - 2));
    @(posedge clk) #1;
    case (which)
      0: ch_a = ~ch_a;
      1: ch_b = ~ch_b;
      default: ch_c = ~ch_c;
    endcase
    repeat (w) @(posedge clk);
    #1;
    case (which)
      0: ch_a = ~ch_a;
      1: ch_b = ~ch_b;
      default: ch_c = ~ch_c;
    endcase
    n_glitch++;
  endtask

  task automatic step(input int d);
    int c_old;
    c_old = c;
    p += d;
    if (p - c == 2) c = p - 1;
    if (c - p == 2) c = p + 1;
    @(posedge clk) #1 {ch_a, ch_b} = gray(p);
    repeat (LEN + 4) @(posedge clk);
    #1 check({cha_filtr, chb_filtr} == gray(c),
             $sformatf("p=%0d c=%0d out=%b", p, c, {cha_filtr, chb_filtr}));
    check(!index, "index stays low");
    if ($urandom_range(1) == 0) glitch();
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (LEN + 4) @(posedge clk);
    repeat (10) step(+1);
    // One-channel pulse long enough for the first filter: dropped by the second.
    begin
      int c0;
      c0 = c;
      step(-1);
      step(+1);
      step(-1);
      step(+1);
      check(c == c0, "reference: dither commits nothing");
      check({cha_filtr, chb_filtr} == gray(c0), "dither dropped by the second filter");
      n_drop++;
    end
    repeat (400) step($urandom_range(2) == 0 ? -1 : 1);
    // Index pulses.
    saw_index = 1'b0;
    @(posedge clk) #1 ch_c = 1'b0;
    repeat (LEN - 1) @(posedge clk);
    #1 ch_c = 1'b1;
    repeat (2 * LEN) @(posedge clk);
    check(!saw_index, "index pulse of LEN-1 clocks rejected");
    @(posedge clk) #1 ch_c = 1'b0;
    repeat (LEN) @(posedge clk);
    #1 ch_c = 1'b1;
    repeat (2 * LEN) @(posedge clk);
    check(saw_index, "index pulse of LEN clocks passed");
    if (saw_index) n_index++;
    check(n_glitch > 100, "glitches injected");
    $display("glitches=%0d dither_drops=%0d index=%0d", n_glitch, n_drop, n_index);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
