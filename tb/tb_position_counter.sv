// tb_position_counter - self-checking test of the 32-bit position counter.
//
// Toggles CNT with a random direction at random intervals and keeps a
// reference count (+1 right, -1 left per CNT edge, rising or falling). One
// clock after each edge the counter must equal the reference. Also checks:
// the zero-counter input, the index clearing only when enabled and only on
// the rising edge of the index, wrap-around below zero in 32 bits, and
// that a constant CNT does not count.
module tb_position_counter;
  import qep_pkg::*;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        zero_cnt = 1'b0, index_en = 1'b0, index = 1'b0;
  logic        cnt = 1'b0;
  dir_t        direction = DIR_RIGHT;
  logic [31:0] position;
  longint      ref_pos = 0;
  int          checks = 0, failures = 0;

  position_counter #(.POS_W(32)) dut (.clk, .rst, .zero_cnt, .index_en, .index,
                                      .cnt, .direction, .position);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic edge_cnt(input dir_t d);
    @(posedge clk) #1;
    direction = d;
    cnt = ~cnt;
    ref_pos += (d == DIR_RIGHT) ? 1 : -1;
    @(posedge clk) #1;
    check(position == 32'(ref_pos), $sformatf("position %0d expected %0d", $signed(position), ref_pos));
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk) #1 check(position == 0, "reset to zero");
    repeat (40) edge_cnt(DIR_RIGHT);
    check(position == 40, "40 counts up");
    repeat (50) edge_cnt(DIR_LEFT);
    check(position == 32'hFFFF_FFF6, "wraps to -10");
    repeat (5) @(posedge clk);
    #1 check(position == 32'(ref_pos), "no count while CNT is steady");
    repeat (2000) begin
      edge_cnt($urandom_range(2) == 0 ? DIR_LEFT : DIR_RIGHT);
      repeat ($urandom_range(3)) @(posedge clk);
    end
    // Zero counter.
    @(posedge clk) #1 zero_cnt = 1'b1;
    @(posedge clk) #1 zero_cnt = 1'b0; ref_pos = 0;
    check(position == 0, "zero counter clears");
    repeat (7) edge_cnt(DIR_RIGHT);
    // Index while disabled: no effect.
    @(posedge clk) #1 index = 1'b1;
    repeat (3) @(posedge clk);
    #1 index = 1'b0;
    @(posedge clk) #1 check(position == 7, "index ignored when disabled");
    // Index enabled: cleared on the rising edge only.
    index_en = 1'b1;
    @(posedge clk) #1 index = 1'b1;
    @(posedge clk) #1 check(position == 0, "index clears when enabled");
    ref_pos = 0;
    edge_cnt(DIR_RIGHT);
    edge_cnt(DIR_RIGHT);
    check(position == 2, "counting resumes while the index is still high");
    #1 index = 1'b0;
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
