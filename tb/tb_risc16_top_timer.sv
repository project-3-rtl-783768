// tb_risc16_top_timer: the whole machine with a short timer period
// (TIMER_PERIOD = 97, set with #(...) on purpose), to show INT_TIMER being
// raised by the built-in timer and serviced precisely.
//
// Image, loaded through the back-door port while reset is held:
//   page frame 0: vectors for EXC_TLBUMISS (81), INT_TIMER (98), TRAP_GENERAL
//                 (112) and TRAP_HALT (113);
//   page frame 1: a flat user-miss handler reading the PTE physically from
//                 512 + VPN; a TRAP_GENERAL handler that unmasks only the timer
//                 (IMR = 4); a timer handler that counts in physical word 20,
//                 clears the ISR and returns; the halt trap;
//   page frame 2: user page table, VPN 0 -> frame 3.
// The user program unmasks the timer with a system call, then runs a loop of
// 100 iterations that adds the counter to a sum kept in memory (each iteration
// stores and reloads it, so there are load-use stalls and a taken branch), and
// halts. The run lasts many timer periods. Checks: the sum is 5050, every
// timer interrupt was taken in user mode with an EPC inside the program, the
// handler ran exactly as often as the interrupt was taken, the ticks are
// exactly 97 cycles apart, and no tick was lost while unmasked. A watchdog
// bounds the run.
module tb_risc16_top_timer;
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

  localparam int PERIOD = 97;

  risc16_top #(.TIMER_PERIOD(PERIOD)) dut (.*);

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
  function automatic logic [15:0] i_beq (int a, int b, int imm); return rri(3'b110, a, b, imm); endfunction
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

  localparam int UMISS_H = 256, TG_H = 288, TIM_H = 296, HALT_H = 310;
  localparam int PROG_LEN = 12;

  int n_timer = 0, n_tick = 0, n_bad_gap = 0, n_bad_epc = 0, n_kernel_int = 0, n_stall = 0;
  int n_tick_unmasked = 0;
  longint cyc = 0, last_tick = -1;

  always @(posedge clk) if (!rst && !halted) begin
    cyc++;
    if (dut.timer_tick) begin
      if (last_tick >= 0 && cyc - last_tick != PERIOD) n_bad_gap++;
      last_tick = cyc;
      n_tick++;
      if (dut.u_core.u_intc.imr[2]) n_tick_unmasked++;
    end
    if (dut.u_core.d_stall) n_stall++;
    if (dut.u_core.wb_flush && dut.u_core.memwb.exc == INT_TIMER) begin
      n_timer++;
      if (psr[7]) n_kernel_int++;
      if (dut.u_core.wb_cr7_wdata >= 16'(PROG_LEN)) n_bad_epc++;
      if (dut.u_core.wb_pc_target != 16'(TIM_H)) n_bad_epc++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, pc=%h psr=%h", dbg_pc, psr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 32; i++) poke(i, 16'h0000);
    poke(81, 16'(UMISS_H));
    poke(98, 16'(TIM_H));
    poke(112, 16'(TG_H));
    poke(113, 16'(HALT_H));
    poke(512 + 16'h00, 16'h8003);
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
    // system call: unmask the timer only
    org_ptr = TG_H;
    e(i_addi(6, 0, 4));            // cr6 (IMR) = 4
    e(i_ext(0, 7, SYS_RFE));
    // timer handler: count, acknowledge, return
    org_ptr = TIM_H;
    e(i_lw(1, 0, 20));
    e(i_addi(1, 1, 1));
    e(i_sw(1, 0, 20));
    e(i_add(5, 0, 0));             // cr5 (ISR) = 0
    e(i_ext(0, 7, SYS_RFE));
    org_ptr = HALT_H;
    e(i_ext(0, 0, MODE_HALT));
    // user program in frame 3
    org_ptr = 3 * 256;
    e(i_ext(0, 0, TRAP_GENERAL));  // 0  unmask the timer
    e(i_addi(1, 0, 0));            // 1  r1 = 0
    e(i_sw(1, 0, 60));            // 2  sum = 0
    e(i_addi(2, 0, 50));           // 3
    e(i_add(2, 2, 2));             // 4  r2 = 100
    e(i_lw(1, 0, 60));            // 5  loop: r1 = sum
    e(i_add(1, 1, 2));             // 6  load-use stall
    e(i_sw(1, 0, 60));            // 7  sum += r2
    e(i_addi(2, 2, -1));           // 8
    e(i_beq(2, 0, 1));             // 9
    e(i_beq(0, 0, -6));            // 10 back to 5
    e(i_ext(0, 0, TRAP_HALT));     // 11
    if (org_ptr != 3 * 256 + PROG_LEN) $fatal(1, "program length");

    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wait (halted);
    repeat (2) @(posedge clk);

    $display("cycles=%0d ticks=%0d timer interrupts=%0d unmasked ticks=%0d stalls=%0d",
             cyc, n_tick, n_timer, n_tick_unmasked, n_stall);
    check(panic_code == 4'd2, "halted by MODE_HALT");
    check(dut.u_mem.mem[3 * 256 + 60] == 16'd5050, $sformatf("sum = %0d", dut.u_mem.mem[3 * 256 + 60]));
    check(n_timer >= 5, $sformatf("timer interrupts taken: %0d", n_timer));
    check(dut.u_mem.mem[20] == 16'(n_timer), "handler count equals interrupts taken");
    check(n_bad_epc == 0, "every timer interrupt vectored to its handler with a user EPC");
    check(n_kernel_int == 0, "no interrupt taken in kernel mode");
    check(n_bad_gap == 0, "ticks exactly one period apart");
    check(n_timer >= n_tick_unmasked - 1 && n_timer <= n_tick_unmasked + 1,
          "every unmasked tick was serviced");
    check(n_stall > 0, "load-use stalls occurred");
    check(dut.u_core.u_intc.imr == 16'h0004, "IMR as written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
