// tick_gen: clock-enable generator.
//
// A free-running counter of period DIV clock cycles; `tick` is high for the
// one cycle in which the counter wraps.  The music box uses it twice: every
// 16384 cycles of the 40 MHz clock for the 2.4 kHz sample rate, and every
// 262144 cycles for the 153 Hz keypad scan.  The rates are the original design's;
// producing an enable pulse instead of a divided clock, so that the whole
// FPGA stays in one clock domain, is this design's choice.
//
// Timing: the counter holds 0 in reset and `tick` is high while it holds
// DIV-1, so the first tick is DIV-1 clock edges after reset is released and
// the next ones follow every DIV cycles.  Reset is asynchronous and active high.
module tick_gen #(
  parameter int unsigned DIV = 16384
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk or posedge rst)
    if (rst)                       count <= '0;
    else if (count == CW'(DIV - 1)) count <= '0;
    else                           count <= count + 1'b1;

  assign tick = (count == CW'(DIV - 1));

  initial assert (DIV >= 2) else $error("tick_gen: DIV must be at least 2");
endmodule
