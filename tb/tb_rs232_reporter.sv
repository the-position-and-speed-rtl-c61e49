// tb_rs232_reporter - self-checking test of the RS-232 reporting link.
//
// CLK_DIV = 4 clocks per bit. A UART receiver in the test samples txd in
// the middle of each bit, checks the start and stop bits, and collects
// 7-byte frames. For random position/velocity pairs the frame must be
// 0xA5, the position MSB first, the velocity MSB first. A 'send' during a
// frame must be ignored, busy must last exactly 70 bit times, and txd
// must idle high.
module tb_rs232_reporter;
  localparam int DIV = 4;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        send = 1'b0;
  logic [31:0] position = '0;
  logic [15:0] velocity = '0;
  logic        txd, busy;
  int          checks = 0, failures = 0;

  rs232_reporter #(.CLK_DIV(DIV), .POS_W(32), .VEL_W(16)) dut (
    .clk, .rst, .send, .position, .velocity, .txd, .busy);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Receiver: wait for a falling edge, then sample mid-bit.
  logic [7:0] rx_q[$];
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
      rx_q.push_back(byte_v);
    end
  end

  task automatic send_frame(input logic [31:0] pos, input logic [15:0] vel);
    int busy_cycles;
    logic [7:0] expv[7];
    expv = '{8'hA5, pos[31:24], pos[23:16], pos[15:8], pos[7:0], vel[15:8], vel[7:0]};
    @(posedge clk) #1;
    position = pos; velocity = vel; send = 1'b1;
    @(posedge clk) #1 send = 1'b0;
    position = ~pos; velocity = ~vel;       // captured values must be used
    busy_cycles = 0;
    while (busy) begin
      if (busy_cycles == 100) send = 1'b1;  // ignored while busy
      if (busy_cycles == 101) send = 1'b0;
      @(posedge clk) #1;
      busy_cycles++;
    end
    check(busy_cycles == 70 * DIV, $sformatf("busy %0d clocks, expected %0d", busy_cycles, 70 * DIV));
    check(txd == 1'b1, "idle high");
    repeat (3 * DIV) @(posedge clk);
    check(rx_q.size() == 7, $sformatf("received %0d bytes", rx_q.size()));
    for (int i = 0; i < 7 && rx_q.size() > 0; i++) begin
      logic [7:0] got;
      got = rx_q.pop_front();
      check(got == expv[i], $sformatf("byte %0d = %h, expected %h", i, got, expv[i]));
    end
    rx_q.delete();
    check(!busy, "no second frame from a send while busy");
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    #1 check(txd == 1'b1 && !busy, "idle after reset");
    send_frame(32'h1234_5678, 16'hBEEF);
    repeat (20) send_frame($urandom, 16'($urandom));
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
