// risc16_timer: the interval timer behind INT_TIMER.
//
// A free-running counter counts clock cycles from 0 to PERIOD - 1 and wraps;
// in the cycle it holds PERIOD - 1 the output tick is high, so tick is a
// one-cycle pulse every PERIOD cycles, the first one PERIOD cycles after reset
// ends. The top level ORs tick into interrupt request line 2, where the
// interrupt controller latches it in ISR bit 2 (INT_TIMER, vector 98); software
// enables or ignores it through IMR bit 2, which is clear after reset.
// The document names INT_TIMER as "raised by a watchdog timer" but gives no
// period and no register to restart or program it. The free-running counter,
// its lack of a software interface and the default PERIOD of 4096 cycles are
// therefore this design's choices. PERIOD must be at least 2.
// Interface: clk, synchronous active-high rst, tick (registered compare, no
// combinational path from any input).
module risc16_timer #(
  parameter int unsigned PERIOD = 4096
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst)                            count <= '0;
    else if (count == CW'(PERIOD - 1))  count <= '0;
    else                                count <= count + 1'b1;
  end

  assign tick = (count == CW'(PERIOD - 1));

  initial assert (PERIOD >= 2) else $error("risc16_timer: PERIOD must be at least 2");

endmodule
