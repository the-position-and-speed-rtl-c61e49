// tb_pulse_filter - self-checking test of the short-pulse filter.
//
// Runs the filter at its default length (LEN = 100). Directed part: a pulse
// of LEN-1 cycles must be rejected, a pulse of exactly LEN cycles must pass
// and its edge must appear on the output at the (LEN+1)-th clock after the
// input edge. Random part: a noisy input whose runs are drawn between 1 and
// 2*LEN cycles is compared every clock with a run-length reference model:
// the output takes the input value once that value has been present for
// LEN consecutive samples.
module tb_pulse_filter;
  localparam int LEN = 100;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic in_filter = 1'b0;
  logic out_filter;
  int   checks = 0, failures = 0;

  pulse_filter #(.LEN(LEN)) dut (.clk, .rst, .in_filter, .out_filter);

  always #5 clk = ~clk;

  // Reference: run length of the current input value, as seen by the DUT.
  logic ref_out = 1'b0, last = 1'b0;
  int   run = 0;
  bit   model_on = 1'b0;
  always @(posedge clk) begin
    if (rst) begin
      ref_out = 1'b0; last = 1'b0; run = LEN;
    end else begin
      if (run >= LEN) ref_out = last;
      if (in_filter == last) run++;
      else begin last = in_filter; run = 1; end
    end
  end

  always @(negedge clk) if (model_on && !rst) begin
    checks++;
    if (out_filter !== ref_out) begin
      failures++;
      if (failures < 10) $display("mismatch at %0t: out=%0b ref=%0b", $time, out_filter, ref_out);
    end
  end

  task automatic pulse(input logic v, input int width);
    @(posedge clk) #1 in_filter = v;
    repeat (width) @(posedge clk);
    #1 in_filter = ~v;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int lat;
    bit seen;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (2 * LEN) @(posedge clk);
    // Too short: LEN-1 cycles high.
    pulse(1'b1, LEN - 1);
    seen = 1'b0;
    repeat (3 * LEN) begin @(posedge clk); #1 if (out_filter) seen = 1'b1; end
    check(!seen, "pulse of LEN-1 cycles must be rejected");
    // Long enough: rising edge, then measure latency.
    @(posedge clk) #1 in_filter = 1'b1;
    lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!out_filter && lat < 4 * LEN);
    check(lat == LEN + 1, $sformatf("latency %0d, expected %0d", lat, LEN + 1));
    repeat (2 * LEN) @(posedge clk);
    // Low pulse of exactly LEN cycles passes.
    pulse(1'b0, LEN);
    seen = 1'b0;
    repeat (3 * LEN) begin @(posedge clk); #1 if (!out_filter) seen = 1'b1; end
    check(seen, "low pulse of LEN cycles must pass");
    check(out_filter == 1'b1, "output back high after the low pulse");
    // Random runs against the reference model.
    model_on = 1'b1;
    repeat (400) begin
      int w;
      w = 1 + int'($urandom_range(2 * LEN - 1));
      @(posedge clk) #1 in_filter = ~in_filter;
      repeat (w - 1) @(posedge clk);
    end
    model_on = 1'b0;
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
