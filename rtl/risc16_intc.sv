// risc16_intc: interrupt status and mask registers (cr5 ISR, cr6 IMR).
//
// Each of the NINT interrupt types has one ISR bit, set whenever its request
// line irq[i] is high, and one IMR bit that enables it. Every cycle the two are
// ANDed; when the result is non-zero, `pending` is high and int_code gives the
// 7-bit interrupt class 7'b110_iiii of the lowest-numbered pending type
// (INT_IO = 7'h60, INT_CLOCK = 7'h61, INT_TIMER = 7'h62), which the fetch stage
// inserts into IF/ID. Software reads both registers as cr5/cr6 and writes them
// with ordinary instructions in kernel mode; an ISR write replaces the status
// (so a handler clears a serviced bit by writing it 0) but a request arriving in
// the same cycle is still recorded. Lowest-index priority, this write
// behaviour and the reset value (both registers zero, every interrupt
// masked) are this design's choices. Updates at the rising clock edge.
module risc16_intc
  import risc16_pkg::*;
#(
  parameter int unsigned NINT = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NINT-1:0] irq,
  input  logic            isr_we,
  input  logic            imr_we,
  input  logic [15:0]     wdata,
  output logic [15:0]     isr,
  output logic [15:0]     imr,
  output logic            pending,
  output exc_t            int_code
);
  logic [NINT-1:0] isr_q, imr_q, act;

  always_ff @(posedge clk) begin
    if (rst) begin
      isr_q <= '0;
      imr_q <= '0;
    end else begin
      isr_q <= (isr_we ? wdata[NINT-1:0] : isr_q) | irq;
      if (imr_we) imr_q <= wdata[NINT-1:0];
    end
  end

  assign isr     = 16'(isr_q);
  assign imr     = 16'(imr_q);
  assign act     = isr_q & imr_q;
  assign pending = |act;

  always_comb begin
    int_code = INT_IO;
    for (int i = NINT - 1; i >= 0; i--)
      if (act[i]) int_code = INT_IO | exc_t'(i);
  end

endmodule
