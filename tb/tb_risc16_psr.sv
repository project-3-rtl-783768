// tb_risc16_psr: self-checking test of the processor status register.
//
// Checks the reset state (user mode, empty history, ASID 9), then applies
// random sequences of push (vectoring), pop (return from exception) and ASID
// writes and compares the whole 16-bit register after every clock with a
// model that keeps the nine mode bits {K-8..K-1, K} as a shift register. Nested
// pushes deeper than eight levels and pops from an empty history are included.
module tb_risc16_psr;
  import risc16_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic       push, pop, asid_we;
  logic [5:0] asid_wdata;
  psr_t       psr;

  risc16_psr dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_push = 0, n_pop = 0, max_depth = 0, depth = 0;
  logic [8:0] m_mode;   // {khist, k}
  logic [5:0] m_asid;

  task automatic cmp(string what);
    logic [15:0] exp;
    exp = {m_mode, 1'b0, m_asid};
    checks++;
    if (psr !== exp) begin
      failures++;
      $display("FAIL %s: psr=%h expected %h", what, psr, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; asid_we = 0; asid_wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    m_mode = 9'd0; m_asid = 6'd9;
    cmp("reset");
    checks++;
    if (psr !== 16'h0009) begin failures++; $display("FAIL: reset value %h", psr); end

    for (int i = 0; i < 1500; i++) begin
      int r;
      r = $urandom_range(0, 9);
      push = (r < 4);
      pop  = (r >= 4 && r < 7);
      asid_we = ($urandom_range(0, 4) == 0);
      asid_wdata = 6'($urandom);
      @(posedge clk);
      if (asid_we) m_asid = asid_wdata;
      if (push) begin
        m_mode = {m_mode[7:0], 1'b1};
        n_push++; depth++;
        if (depth > max_depth) max_depth = depth;
      end else if (pop) begin
        m_mode = {1'b0, m_mode[8:1]};
        n_pop++; if (depth > 0) depth--;
      end
      @(negedge clk);
      cmp($sformatf("step %0d", i));
    end
    // a push from user mode then a pop returns to user mode
    push = 0; pop = 0; asid_we = 0;
    for (int i = 0; i < 10; i++) begin pop = 1; @(negedge clk); end
    pop = 0; push = 1; @(negedge clk); push = 0;
    checks++;
    if (psr.k !== 1'b1 || psr.khist !== 8'h00) begin failures++; $display("FAIL: push from user mode %h", psr); end
    pop = 1; @(negedge clk); pop = 0;
    checks++;
    if (psr.k !== 1'b0) begin failures++; $display("FAIL: pop back to user mode %h", psr); end

    checks++;
    if (n_push < 100 || n_pop < 100 || max_depth < 9) begin
      failures++;
      $display("FAIL: coverage push=%0d pop=%0d depth=%0d", n_push, n_pop, max_depth);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
