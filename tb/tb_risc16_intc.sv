// tb_risc16_intc: self-checking test of the interrupt status/mask registers.
//
// Random request pulses and random software writes of ISR and IMR are applied
// at the falling edge; a reference model (ISR = written value or old value,
// ORed with the requests; IMR = written value) is updated at the rising edge.
// After every edge the test compares isr, imr, pending and int_code (class
// 7'h60 plus the lowest pending type). It also checks the reset values and
// that a request arriving together with an ISR write is not lost. A watchdog
// bounds the run.
module tb_risc16_intc;
  import risc16_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [15:0] irq = '0, wdata = '0, isr, imr;
  logic        isr_we = 1'b0, imr_we = 1'b0, pending;
  exc_t        int_code;

  risc16_intc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_pending = 0, n_race = 0;
  logic [15:0] m_isr = '0, m_imr = '0;

  task automatic cmp(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  function automatic exc_t exp_code(logic [15:0] a);
    for (int i = 0; i < 16; i++) if (a[i]) return INT_IO | exc_t'(i);
    return INT_IO;
  endfunction

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    cmp(isr, 16'h0, "ISR reset");
    cmp(imr, 16'h0, "IMR reset");
    cmp(16'(pending), 16'h0, "nothing pending at reset");
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      irq    = ($urandom_range(0, 3) == 0) ? (16'h1 << $urandom_range(0, 15)) : 16'h0;
      isr_we = ($urandom_range(0, 5) == 0);
      imr_we = ($urandom_range(0, 9) == 0);
      wdata  = ($urandom_range(0, 1) == 0) ? 16'h0 : 16'($urandom);
      if (isr_we && irq != 0) n_race++;
      @(posedge clk);
      m_isr = (isr_we ? wdata : m_isr) | irq;
      if (imr_we) m_imr = wdata;
      #1;
      cmp(isr, m_isr, "ISR");
      cmp(imr, m_imr, "IMR");
      cmp(16'(pending), 16'(|(m_isr & m_imr)), "pending");
      if (pending) begin
        n_pending++;
        cmp(16'(int_code), 16'(exp_code(m_isr & m_imr)), "int_code");
      end
    end
    checks++;
    if (n_pending < 100 || n_race < 20) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
