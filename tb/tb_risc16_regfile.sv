// tb_risc16_regfile: self-checking test of the unified user/kernel register file.
//
// A model of all sixteen registers receives the same random normal writes (any
// 4-bit index {bank, r}) and hardware cr3/cr7 writes as the design; before
// every clock both read ports are compared with the model at random indices.
// Checked rules: r0 and cr0 read zero, the banks are separate, cr4/cr5/cr6
// read back psr_asid / isr / imr and a write to them is not stored but raises
// asid_we / isr_we / imr_we with the data on sr_wdata, and the cr3/cr7 ports
// reach the kernel bank. A watchdog bounds the run.
module tb_risc16_regfile;
  import risc16_pkg::*;

  logic        clk = 1'b0;
  logic [5:0]  psr_asid;
  logic [15:0] isr, imr;
  reg_t        rs1, rs2, wr;
  logic [15:0] rd1, rd2, wdata, cr3_wdata, cr7_wdata, sr_wdata;
  logic        we, cr3_we, cr7_we, asid_we, isr_we, imr_we;

  risc16_regfile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sr_we = 0, n_hw = 0;
  logic [15:0] m [16];

  function automatic logic [15:0] exp_rd(reg_t r);
    if (r[2:0] == 0) return 16'h0;
    if (r == 12) return {10'b0, psr_asid};
    if (r == 13) return isr;
    if (r == 14) return imr;
    return m[r];
  endfunction

  function automatic bit stored(reg_t r);
    return r[2:0] != 0 && r != 12 && r != 13 && r != 14;
  endfunction

  task automatic cmp(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; cr3_we = 0; cr7_we = 0; psr_asid = 6'd9; isr = 0; imr = 0;
    rs1 = 0; rs2 = 0; wr = 0; wdata = 0; cr3_wdata = 0; cr7_wdata = 0;
    // initialise every stored register through the normal port
    for (int r = 1; r < 16; r++) begin
      @(negedge clk);
      we = 1; wr = 4'(r); wdata = 16'($urandom);
      if (stored(4'(r))) m[r] = wdata;
    end
    @(negedge clk); we = 0;

    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      psr_asid  = 6'($urandom);
      isr       = 16'($urandom);
      imr       = 16'($urandom);
      we        = 1'($urandom);
      wr        = 4'($urandom);
      wdata     = 16'($urandom);
      cr3_we    = ($urandom_range(0, 7) == 0);
      cr7_we    = ($urandom_range(0, 7) == 0);
      cr3_wdata = 16'($urandom);
      cr7_wdata = 16'($urandom);
      rs1       = 4'($urandom);
      rs2       = 4'($urandom);
      #1;
      cmp(rd1, exp_rd(rs1), $sformatf("rd1 index %0d", rs1));
      cmp(rd2, exp_rd(rs2), $sformatf("rd2 index %0d", rs2));
      cmp(16'({asid_we, isr_we, imr_we}), 16'({we && wr == 12, we && wr == 13, we && wr == 14}),
          "special-register strobes");
      if (asid_we || isr_we || imr_we) begin
        n_sr_we++;
        cmp(sr_wdata, wdata, "sr_wdata");
      end
      if (cr3_we || cr7_we) n_hw++;
      @(posedge clk);
      if (we && stored(wr)) m[wr] = wdata;
      if (cr3_we) m[11] = cr3_wdata;
      if (cr7_we) m[15] = cr7_wdata;
    end
    // read back every register
    @(negedge clk);
    we = 0; cr3_we = 0; cr7_we = 0;
    for (int r = 0; r < 16; r++) begin
      rs1 = 4'(r); rs2 = 4'(15 - r);
      #1;
      cmp(rd1, exp_rd(rs1), "final rd1");
      cmp(rd2, exp_rd(rs2), "final rd2");
    end
    checks++;
    if (n_sr_we < 100 || n_hw < 50) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
