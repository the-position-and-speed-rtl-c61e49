// qep_pkg - shared types and constants of the quadrature encoder
// position and speed measurement module.
//
// The quadrature state is the pair of channel levels {A, B}. Motion
// "right" walks the states 00 -> 01 -> 11 -> 10 -> 00 and motion "left"
// walks them the other way round; right is the counting-up direction
// (that choice of sign is this design's own). The default sizes derive the
// short-pulse filter length from the encoder and the top speed: a channel
// toggles at most at f_max = V_max * cp, so no genuine pulse is shorter than
// T_min = 1 / (2 f_max), which is CLK_HZ / (2 * V_max * cp) clock cycles.
// The 50 MHz clock, this sizing rule, the 5000-line encoder and 3000 rpm
// top speed come from the original module and its test bench; the 1 ms
// speed gate and the 115200 baud rate are this design's choices.
package qep_pkg;

  typedef enum logic {
    DIR_LEFT  = 1'b0,  // count down
    DIR_RIGHT = 1'b1   // count up
  } dir_t;

  typedef struct packed {
    logic a;
    logic b;
  } quad_t;

  // System clock of the filters (50 MHz).
  localparam int unsigned CLK_HZ      = 50_000_000;
  // Encoder lines per revolution per channel.
  localparam int unsigned ENC_CP      = 5000;
  // Highest speed the filters must pass, in revolutions per second (3000 rpm).
  localparam int unsigned V_MAX_RPS   = 50;
  // Shortest genuine channel pulse, in clock cycles (T_min).
  localparam int unsigned T_MIN_CYC   = CLK_HZ / (2 * V_MAX_RPS * ENC_CP);
  // Speed gate period in clock cycles (1 ms).
  localparam int unsigned SPEED_GATE  = CLK_HZ / 1000;
  // UART bit period in clock cycles (115200 baud).
  localparam int unsigned UART_DIV    = CLK_HZ / 115200;

  // Counting direction of one quadrature step that ends in state n, valid
  // when exactly one channel changed (a_changed tells which). Going right,
  // a change of A leaves A == B and a change of B leaves A != B.
  function automatic dir_t step_dir(logic a_changed, quad_t n);
    return dir_t'(a_changed ^ n.a ^ n.b);
  endfunction

endpackage
