// risc16_psr: processor status register.
//
// Layout (bit 15 down to 0): kernel-mode history K-8..K-1, the kernel-mode bit
// K, a zero bit, and the 6-bit ASID of the running process. When the pipeline
// vectors to a handler (push), {history, K} shifts left by one, so the old K
// becomes K-1, and K is set. A return-from-exception (pop) shifts the history
// right with zero fill and moves K-1 into K. Software writes reach only the
// ASID field (a normal instruction writing cr4); that write is applied before
// a push or pop in the same cycle, which the pipeline never issues together
// anyway. All updates happen at the rising clock edge. Reset puts the machine
// in user mode with an empty history and ASID = INIT_ASID, the start-up state
// the architecture asks for (ASID 9). The zero bit (bit 6) is constant by
// definition of the layout, so that output bit never changes.
module risc16_psr
  import risc16_pkg::*;
#(
  parameter logic [5:0] INIT_ASID = 6'd9
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       push,       // vector to a handler: enter kernel mode
  input  logic       pop,        // return from exception
  input  logic       asid_we,    // software write of cr4
  input  logic [5:0] asid_wdata,
  output psr_t       psr
);
  always_ff @(posedge clk) begin
    if (rst) begin
      psr <= '{khist: 8'h00, k: 1'b0, zero: 1'b0, asid: INIT_ASID};
    end else begin
      if (asid_we) psr.asid <= asid_wdata;
      if (push) begin
        psr.khist <= {psr.khist[6:0], psr.k};
        psr.k     <= 1'b1;
      end else if (pop) begin
        psr.khist <= {1'b0, psr.khist[7:1]};
        psr.k     <= psr.khist[0];
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(push && pop));

endmodule
