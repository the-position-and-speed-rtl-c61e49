// tb_direction_decoder - self-checking test of the A/B decoder.
//
// Drives the filtered channels through a random walk of quadrature steps
// (gray code 00, 01, 11, 10 for increasing position), holding each state a
// random 1 to 3 clocks, plus some illegal double changes. One clock after
// each input change the test expects CNT = A xor B of the new state and a
// direction of right for a step to position+1 and left for a step to
// position-1; after a double change CNT must be unchanged and the
// direction kept.
module tb_direction_decoder;
  import qep_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic a = 1'b0, b = 1'b0;
  logic cnt;
  dir_t direction;
  int   checks = 0, failures = 0;
  int   p = 0;
  int   n_rev = 0;
  dir_t last_dir = DIR_RIGHT;

  direction_decoder dut (.clk, .rst, .a, .b, .cnt, .direction);

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

  task automatic move(input int d);
    dir_t exp_dir;
    logic cnt_before;
    @(posedge clk) #1;
    cnt_before = cnt;
    p += d;
    {a, b} = gray(p);
    if (d == 1 || d == -1) exp_dir = (d > 0) ? DIR_RIGHT : DIR_LEFT;
    else                   exp_dir = last_dir;
    if (exp_dir != last_dir) n_rev++;
    @(posedge clk) #1;
    if (d == 1 || d == -1) begin
      check(cnt == (a ^ b), "CNT = A xor B");
      check(cnt != cnt_before, "CNT toggles once per step");
    end else begin
      check(cnt == cnt_before, "CNT unchanged on a double change");
    end
    check(direction == exp_dir, $sformatf("direction %0d expected %0d (d=%0d)", direction, exp_dir, d));
    last_dir = exp_dir;
    repeat ($urandom_range(2)) @(posedge clk);
  endtask

  initial begin
    int r;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    // Eight steps right (B leads A), then eight left (A leads B).
    repeat (8) move(+1);
    repeat (8) move(-1);
    repeat (2000) begin
      r = int'($urandom_range(19));
      if (r == 0) move(2);
      else move((r < 10) ? 1 : -1);
    end
    check(n_rev > 100, "direction reversals exercised");
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
