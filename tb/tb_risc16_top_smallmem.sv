// tb_risc16_top_smallmem: the whole machine built with a 4K-word physical
// memory (MEM_AW = 12, sixteen page frames), to exercise EXC_INVALIDADDR, which
// cannot occur at the full 64K-word size.
//
// Image, loaded through the back-door port while reset is held:
//   page frame 0: vectors for EXC_TLBUMISS (81), EXC_INVALIDADDR (84) and
//                 TRAP_HALT (113);
//   page frame 1: a flat user-miss handler that reads the PTE physically from
//                 frame 2 (512 + VPN) instead of through the kernel's virtual
//                 page table, so no kernel miss is involved; an
//                 invalid-address handler that counts in physical word 16 and
//                 resumes after the faulting instruction; the halt trap handler;
//   page frame 2: user page table: VPN 0 -> frame 3 (code), VPN 0x40 -> frame
//                 0x20, a frame that does not exist in this memory.
// The user program stores to and loads from virtual 0x4000 (both must raise
// EXC_INVALIDADDR with EPC = the instruction's PC, the store must not reach the
// aliased low memory and the load must not write its register), then stores a
// marker through an existing page and halts through TRAP_HALT.
// Parameters are set on the top with #(...) on purpose; a watchdog bounds the run.
module tb_risc16_top_smallmem;
  import risc16_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        ld_we = 1'b0;
  logic [15:0] ld_addr = '0, ld_data = '0;
  logic [15:0] irq = '0;
  logic        halted, sleeping;
  logic [3:0]  panic_code;
  logic [15:0] psr, dbg_pc;

  int checks = 0, failures = 0;

  risc16_top #(.MEM_AW(12)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] rri(logic [2:0] op, int a, int b, int imm);
    return {op, 3'(a), 3'(b), 7'(imm)};
  endfunction
  function automatic logic [15:0] i_add (int a, int b, int c);   return {3'b000, 3'(a), 3'(b), 4'b0, 3'(c)}; endfunction
  function automatic logic [15:0] i_nand(int a, int b, int c);   return {3'b010, 3'(a), 3'(b), 4'b0, 3'(c)}; endfunction
  function automatic logic [15:0] i_addi(int a, int b, int imm); return rri(3'b001, a, b, imm); endfunction
  function automatic logic [15:0] i_lui (int a, int imm10);      return {3'b011, 3'(a), 10'(imm10)}; endfunction
  function automatic logic [15:0] i_sw  (int a, int b, int imm); return rri(3'b100, a, b, imm); endfunction
  function automatic logic [15:0] i_lw  (int a, int b, int imm); return rri(3'b101, a, b, imm); endfunction
  function automatic logic [15:0] i_ext (int a, int b, int code); return rri(3'b111, a, b, code); endfunction

  task automatic poke(int addr, logic [15:0] d);
    @(negedge clk);
    ld_we = 1'b1; ld_addr = 16'(addr); ld_data = d;
    @(negedge clk);
    ld_we = 1'b0;
  endtask

  int org_ptr = 0;
  task automatic e(logic [15:0] w);
    poke(org_ptr, w);
    org_ptr++;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int UMISS_H = 256, INVA_H = 288, HALT_H = 300;

  int n_inva = 0, n_umiss = 0, n_stores = 0;
  logic [15:0] epc [2];

  always @(posedge clk) if (!rst && !halted) begin
    if (dut.u_core.dmem_we) n_stores++;
    if (dut.u_core.wb_flush) begin
      if (dut.u_core.memwb.exc == EXC_INVALIDADDR) begin
        if (n_inva < 2) epc[n_inva] = dut.u_core.wb_cr7_wdata;
        n_inva++;
      end
      if (dut.u_core.memwb.exc == EXC_TLBUMISS) n_umiss++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, pc=%h psr=%h", dbg_pc, psr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 32; i++) poke(i, 16'h0000);
    poke(81, 16'(UMISS_H));
    poke(84, 16'(INVA_H));
    poke(113, 16'(HALT_H));
    poke(512 + 16'h00, 16'h8003);
    poke(512 + 16'h40, 16'h8020);
    // user-miss handler: PTE at physical 512 + (cr3 & 0xFF)
    org_ptr = UMISS_H;
    e(i_lui(1, 10'h003));          // r1 = 0x00C0
    e(i_addi(1, 1, 63));           // r1 = 0x00FF
    e(i_nand(2, 3, 1));
    e(i_nand(2, 2, 2));            // r2 = cr3 & 0xFF
    e(i_lui(1, 10'h008));          // r1 = 0x0200
    e(i_add(2, 2, 1));             // r2 = PTE physical address
    e(i_lw(1, 2, 0));              // r1 = PTE
    e(i_ext(1, 3, TLB_WRITE));     // tlbw r1, cr3
    e(i_ext(0, 7, SYS_RFE));
    // invalid-address handler: count and skip
    org_ptr = INVA_H;
    e(i_lw(1, 0, 16));
    e(i_addi(1, 1, 1));
    e(i_sw(1, 0, 16));
    e(i_addi(7, 7, 1));
    e(i_ext(0, 7, SYS_RFE));
    org_ptr = HALT_H;
    e(i_ext(0, 0, MODE_HALT));
    // user program in frame 3
    org_ptr = 3 * 256;
    e(i_lui(5, 10'h100));          // 0 r5 = 0x4000 (frame 0x20: beyond memory)
    e(i_addi(6, 0, 55));           // 1
    e(i_sw(6, 5, 0));              // 2 invalid address
    e(i_addi(4, 0, 7));            // 3
    e(i_lw(4, 5, 1));              // 4 invalid address, r4 must stay 7
    e(i_sw(4, 0, 63));             // 5 virtual 63 -> physical 3*256 + 63
    e(i_ext(0, 0, TRAP_HALT));     // 6
    poke(3 * 256 + 63, 16'hDEAD);

    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wait (halted);
    repeat (2) @(posedge clk);

    check(panic_code == 4'd2, "halted by MODE_HALT");
    check(n_inva == 2, $sformatf("two invalid-address exceptions, saw %0d", n_inva));
    check(epc[0] == 16'd2 && epc[1] == 16'd4, $sformatf("EPCs %0d %0d", epc[0], epc[1]));
    check(dut.u_mem.mem[16] == 16'd2, "handler ran twice");
    check(dut.u_mem.mem[0] == 16'h0000 && dut.u_mem.mem[1] == 16'h0000,
          "the faulting store did not reach aliased low memory");
    check(dut.u_mem.mem[3 * 256 + 63] == 16'd7, "the faulting load left r4 unchanged");
    check(n_umiss >= 1, "user misses handled");
    check(psr == 16'h0089, $sformatf("PSR at halt = %h", psr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
