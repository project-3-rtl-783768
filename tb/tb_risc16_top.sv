// tb_risc16_top: end-to-end test of the whole machine at its default size.
//
// The testbench assembles a small operating-system image and a user program
// with its own instruction-encoding functions and loads them through the
// back-door port while reset is held:
//   page frame 0: vector table entries for EXC_TLBUMISS (81), EXC_TLBKMISS (82),
//                 EXC_INVALIDOPCODE (83), EXC_PRIVILEGES (85), INT_IO (96),
//                 INT_CLOCK (97), INT_TIMER (98), TRAP_GENERAL (112) and
//                 TRAP_HALT (113), the
//                 root PTE for ASID 9 at physical 192 + 9 pointing at frame 2,
//                 and kernel scratch words;
//   page frame 1: the handlers;
//   page frame 2: the user page table of ASID 9 (VPN 0x00 -> frame 5 code,
//                 VPN 0x01 -> frame 6 array, VPN 0x40 -> frame 7 results).
// The user program starts at virtual address 0 in user mode with an empty TLB,
// so its first fetch misses; the miss handler's PTE load (virtual 0xC9xx)
// misses again and nests a kernel miss. The program then makes a TRAP_GENERAL
// system call whose handler unmasks three interrupts (writes cr6), moves values
// between the banks with CRMOVE, reads the TLB (a hit and a miss), clears the
// TLB, executes an undefined EXTEND code (EXC_INVALIDOPCODE, skipped by its
// handler), and sleeps; the testbench raises irq[0] when the machine sleeps,
// which wakes it, and the interrupt is taken as soon as the handler returns to
// user mode. Back in user mode the program sums an 8-word array (load-use
// stalls, forwarding, a loop branch) while the testbench raises irq[1]; it
// stores the sum in another page (data miss), executes a privileged tlbw in
// user mode (EXC_PRIVILEGES; the handler resumes at EPC+1), calls and returns
// from a subroutine with JALR, and then spins on a branch until the built-in
// timer's first INT_TIMER request (TIMER_PERIOD = 4096 cycles after reset, the
// default): the timer handler acknowledges it and releases the loop by moving
// a value into user r2 with CRMOVE. The program ends with TRAP_HALT, whose
// handler issues MODE_HALT.
// Checks: final memory contents, the halt state and PSR, every cr3 and EPC value
// the hardware writes when vectoring, the values the kernel saw, and that each
// mechanism occurred at least once.
module tb_risc16_top;
  import risc16_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        ld_we = 1'b0;
  logic [15:0] ld_addr = '0, ld_data = '0;
  logic        halted, sleeping;
  logic [15:0] irq = '0;
  logic [3:0]  panic_code;
  logic [15:0] psr, dbg_pc;

  int checks = 0, failures = 0;

  risc16_top dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------- encoders
  function automatic logic [15:0] rrr(logic [2:0] op, int a, int b, int c);
    return {op, 3'(a), 3'(b), 4'b0, 3'(c)};
  endfunction
  function automatic logic [15:0] rri(logic [2:0] op, int a, int b, int imm);
    return {op, 3'(a), 3'(b), 7'(imm)};
  endfunction
  function automatic logic [15:0] i_add (int a, int b, int c);   return rrr(3'b000, a, b, c); endfunction
  function automatic logic [15:0] i_addi(int a, int b, int imm); return rri(3'b001, a, b, imm); endfunction
  function automatic logic [15:0] i_nand(int a, int b, int c);   return rrr(3'b010, a, b, c); endfunction
  function automatic logic [15:0] i_lui (int a, int imm10);      return {3'b011, 3'(a), 10'(imm10)}; endfunction
  function automatic logic [15:0] i_sw  (int a, int b, int imm); return rri(3'b100, a, b, imm); endfunction
  function automatic logic [15:0] i_lw  (int a, int b, int imm); return rri(3'b101, a, b, imm); endfunction
  function automatic logic [15:0] i_beq (int a, int b, int imm); return rri(3'b110, a, b, imm); endfunction
  function automatic logic [15:0] i_jalr(int a, int b);          return rri(3'b111, a, b, 0); endfunction
  function automatic logic [15:0] i_ext (int a, int b, int code); return rri(3'b111, a, b, code); endfunction
  function automatic logic [15:0] i_sys (int code);              return rri(3'b111, 0, 0, code); endfunction

  // one back-door write, driven away from the active clock edge
  task automatic poke(int addr, logic [15:0] d);
    @(negedge clk);
    ld_we   = 1'b1;
    ld_addr = 16'(addr);
    ld_data = d;
    @(negedge clk);
    ld_we   = 1'b0;
  endtask

  int org_ptr = 0;
  task automatic org(int base);
    org_ptr = base;
  endtask
  task automatic e(logic [15:0] w);
    poke(org_ptr, w);
    org_ptr++;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int UMISS_H = 256, KMISS_H = 320, PRIV_H = 384, HALT_H = 400;
  localparam int INV_H = 404, INT_H = 408, TG_H = 416, TIM_H = 440;
  localparam int CODE_F = 5, DATA_F = 6, RES_F = 7;

  logic [15:0] arr [8];
  logic [15:0] sum;

  // ------------------------------------------------------- event counters
  int n_stall = 0, n_redirect = 0, n_fwd_ex = 0, n_fetch_umiss = 0, n_data_umiss = 0;
  int n_kmiss = 0, n_tlbw = 0, n_priv = 0, n_trap = 0, n_rfe = 0, n_flush = 0, n_cycles = 0;
  int n_trapg = 0, n_inv = 0, n_int = 0, n_sleep = 0, n_wake = 0, n_tlbr = 0, n_tlbclr = 0;
  int n_crmove = 0, n_timer = 0;
  logic [15:0] epc_priv = '0, epc_trap = '0, epc_trapg = '0, epc_inv = '0;
  bit irq1_sent = 0;

  always @(posedge clk) if (!rst && !halted) begin
    n_cycles++;
    if (dut.u_core.d_stall) n_stall++;
    if (dut.u_core.d_redirect && !dut.u_core.wb_flush) n_redirect++;
    if (!dut.u_core.d_stall && dut.u_core.idex.rt != 0 && dut.u_core.d_uses1 &&
        dut.u_core.d_src1 == dut.u_core.idex.rt) n_fwd_ex++;
    if (dut.u_core.tlb_we) n_tlbw++;
    if (dut.u_core.tlb_clear) n_tlbclr++;
    if (dut.u_core.sleeping && dut.u_core.int_pending && !dut.u_core.wb_flush) n_wake++;
    if (!dut.u_core.wb_flush && dut.u_core.exmem.exc == TLB_READ) n_tlbr++;
    if (!dut.u_core.wb_flush && dut.u_core.exmem.exc[6:4] == 3'b010) n_crmove++;
    if (dut.u_core.wb_flush) begin
      n_flush++;
      case (dut.u_core.memwb.exc)
        EXC_TLBUMISS: begin
          if (dut.u_core.memwb.ifx) n_fetch_umiss++; else n_data_umiss++;
          check(dut.u_core.wb_cr3_we &&
                (dut.u_core.wb_cr3_wdata == 16'hC900 || dut.u_core.wb_cr3_wdata == 16'hC901 ||
                 dut.u_core.wb_cr3_wdata == 16'hC940),
                $sformatf("UMISS cr3 = %h", dut.u_core.wb_cr3_wdata));
          check(dut.u_core.wb_pc_target == 16'(UMISS_H), "UMISS vector");
        end
        EXC_TLBKMISS: begin
          n_kmiss++;
          check(dut.u_core.wb_cr3_we && dut.u_core.wb_cr3_wdata == 16'h00C9,
                $sformatf("KMISS cr3 = %h", dut.u_core.wb_cr3_wdata));
          check(dut.u_core.wb_pc_target == 16'(KMISS_H), "KMISS vector");
        end
        EXC_INVALIDOPCODE: begin n_inv++;   epc_inv   = dut.u_core.wb_cr7_wdata; end
        EXC_PRIVILEGES:    begin n_priv++;  epc_priv  = dut.u_core.wb_cr7_wdata; end
        TRAP_GENERAL:      begin n_trapg++; epc_trapg = dut.u_core.wb_cr7_wdata; end
        TRAP_HALT:         begin n_trap++;  epc_trap  = dut.u_core.wb_cr7_wdata; end
        MODE_SLEEP:        n_sleep++;
        INT_IO, INT_CLOCK: begin
          n_int++;
          check(dut.u_core.memwb.ifx && dut.u_core.wb_cr7_wdata == dut.u_core.memwb.pc,
                "interrupt EPC is the PC of the replaced fetch");
          check(dut.u_core.wb_pc_target == 16'(INT_H), "interrupt vector");
          check(dut.u_core.memwb.exc == (n_int == 1 ? INT_IO : INT_CLOCK), "interrupt type order");
        end
        INT_TIMER: begin
          n_timer++;
          check(dut.u_core.memwb.ifx && dut.u_core.wb_cr7_wdata == 16'd20,
                $sformatf("timer interrupt EPC = %0d, the spin loop", dut.u_core.wb_cr7_wdata));
          check(dut.u_core.wb_pc_target == 16'(TIM_H), "timer vector");
          check(n_cycles >= 4096, $sformatf("timer interrupt after one period, cycle %0d", n_cycles));
        end
        default: if (dut.u_core.memwb.exc[6:4] == 3'b011) n_rfe++;
      endcase
    end
  end

  // interrupt sources: irq[0] while the machine sleeps, irq[1] once inside the user loop
  always @(negedge clk) begin
    irq = '0;
    if (!rst && sleeping && n_int == 0) irq[0] = 1'b1;
    if (!rst && !irq1_sent && n_int == 1 && !psr[7] && dbg_pc == 16'd10) begin
      irq[1] = 1'b1;
      irq1_sent = 1;
    end
  end

  initial begin
    // watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, pc=%h psr=%h", dbg_pc, psr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    // ---------------- page frame 0: vector table and root page table
    poke(81, 16'(UMISS_H));
    poke(82, 16'(KMISS_H));
    poke(83, 16'(INV_H));
    poke(85, 16'(PRIV_H));
    poke(96, 16'(INT_H));
    poke(97, 16'(INT_H));
    poke(98, 16'(TIM_H));
    poke(112, 16'(TG_H));
    poke(113, 16'(HALT_H));
    poke(192 + 9, 16'h8002);                 // root PTE of ASID 9 -> frame 2
    for (int i = 16; i < 24; i++) poke(i, 16'h0000);
    // ---------------- user page table of ASID 9 in frame 2
    poke(512 + 16'h00, 16'h8000 | CODE_F);
    poke(512 + 16'h01, 16'h8000 | DATA_F);
    poke(512 + 16'h40, 16'h8000 | RES_F);
    // ---------------- user-miss handler
    org(UMISS_H);
    e(i_sw(7, 0, 0));             // save EPC
    e(i_sw(1, 0, 1));
    e(i_sw(2, 0, 2));
    e(i_add(2, 3, 0));            // PTE address from cr3
    e(i_lw(1, 2, 0));             // load PTE, may nest a kernel miss
    e(i_lui(3, 10'h200));         // 0x8000
    e(i_nand(3, 3, 1));
    e(i_nand(3, 3, 3));
    e(i_beq(3, 0, 5));            // invalid PTE -> panic
    e(i_ext(1, 2, TLB_WRITE));    // tlbw r1, r2
    e(i_lw(7, 0, 0));
    e(i_lw(1, 0, 1));
    e(i_lw(2, 0, 2));
    e(i_ext(0, 7, SYS_RFE));      // rfe r7
    e(i_sys(7'h08));              // MODE_PANIC8
    // ---------------- kernel-miss handler
    org(KMISS_H);
    e(i_sw(1, 0, 8));
    e(i_sw(2, 0, 9));
    e(i_lw(1, 3, 0));             // root PTE, physical address in cr3
    e(i_lui(2, 10'h200));
    e(i_nand(2, 2, 1));
    e(i_nand(2, 2, 2));
    e(i_beq(2, 0, 14));           // invalid -> panic
    e(i_add(2, 4, 0));            // ASID from cr4
    e(i_add(2, 2, 2));            // ASID << 8, one doubling per line
    e(i_add(2, 2, 2));
    e(i_add(2, 2, 2));
    e(i_add(2, 2, 2));
    e(i_add(2, 2, 2));
    e(i_add(2, 2, 2));
    e(i_add(2, 2, 2));
    e(i_add(2, 2, 2));
    e(i_add(2, 2, 3));            // | VPN
    e(i_ext(1, 2, TLB_WRITE));
    e(i_lw(1, 0, 8));
    e(i_lw(2, 0, 9));
    e(i_ext(0, 7, SYS_RFE));
    e(i_sys(7'h09));              // MODE_PANIC9
    // ---------------- privilege handler: skip the offending instruction
    org(PRIV_H);
    e(i_addi(7, 7, 1));
    e(i_ext(0, 7, SYS_RFE));
    // ---------------- halt trap handler
    org(HALT_H);
    e(i_sys(MODE_HALT));
    // ---------------- invalid-opcode handler: skip the instruction
    org(INV_H);
    e(i_addi(7, 7, 1));
    e(i_ext(0, 7, SYS_RFE));
    // ---------------- interrupt handler: acknowledge everything, count, retry
    org(INT_H);
    e(i_add(5, 0, 0));            // cr5 (ISR) = 0
    e(i_lw(1, 0, 22));
    e(i_addi(1, 1, 1));
    e(i_sw(1, 0, 22));
    e(i_ext(0, 7, SYS_RFE));
    // ---------------- general system call
    org(TG_H);
    e(i_sw(7, 0, 16));            // save EPC, the nested exception below overwrites cr7
    e(i_addi(6, 0, 7));           // cr6 (IMR): enable I/O, clock and timer interrupts
    e(i_ext(4, 0, 7'h29));        // CRMOVE cr1 <- user r4
    e(i_sw(1, 0, 18));
    e(i_ext(6, 0, 7'h26));        // CRMOVE user r6 <- cr6
    e(i_lui(2, 10'h024));         // 0x0900: ASID 9, VPN 0x00
    e(i_ext(1, 2, TLB_READ));     // hit
    e(i_sw(1, 0, 19));
    e(i_addi(2, 2, 51));          // 0x0933: not mapped
    e(i_ext(1, 2, TLB_READ));     // miss
    e(i_sw(1, 0, 20));
    e(i_lui(2, 10'h024));
    e(i_sys(TLB_CLEAR));
    e(i_ext(1, 2, TLB_READ));     // miss after the clear
    e(i_sw(1, 0, 21));
    e(i_sys(7'h40));              // undefined code -> EXC_INVALIDOPCODE
    e(i_sys(MODE_SLEEP));         // wait for an interrupt
    e(i_lw(7, 0, 16));
    e(i_ext(0, 7, SYS_RFE));
    // ---------------- timer handler: acknowledge, count, release the user's wait
    org(TIM_H);
    e(i_add(5, 0, 0));            // cr5 (ISR) = 0
    e(i_lw(1, 0, 23));
    e(i_addi(1, 1, 1));
    e(i_sw(1, 0, 23));
    e(i_ext(2, 0, 7'h21));        // CRMOVE user r2 <- cr1
    e(i_ext(0, 7, SYS_RFE));
    // ---------------- user program (virtual page 0 -> frame 5)
    org(CODE_F * 256);
    e(i_lui(5, 10'h100));         //  0 r5 = 0x4000
    e(i_lui(4, 10'h048));         //  1 r4 = 0x1200
    e(i_addi(4, 4, 7'h34));       //  2 r4 = 0x1234
    e(i_sys(TRAP_GENERAL));       //  3 system call
    e(i_sw(6, 5, 3));             //  4 r6 was set by the kernel
    e(i_lui(1, 4));               //  5 r1 = 0x0100
    e(i_addi(2, 0, 8));           //  6 count
    e(i_addi(3, 0, 0));           //  7 sum
    e(i_lw(4, 1, 0));             //  8 loop:
    e(i_add(3, 3, 4));            //  9 load-use
    e(i_addi(1, 1, 1));           // 10
    e(i_addi(2, 2, -1));          // 11
    e(i_beq(2, 0, 1));            // 12 -> 14
    e(i_beq(0, 0, -6));           // 13 -> 8
    e(i_sw(3, 5, 0));             // 14
    e(i_ext(0, 0, TLB_WRITE));    // 15 privileged in user mode
    e(i_addi(6, 0, 15));          // 16
    e(i_addi(7, 0, 26));          // 17
    e(i_jalr(7, 7));              // 18 call 26, r7 = 19
    e(i_sw(6, 5, 1));             // 19
    e(i_beq(2, 0, -1));           // 20 wait for the timer (r2 is 0 after the loop)
    e(i_sys(TRAP_HALT));          // 21
    e(i_addi(6, 0, 1));           // 22 never reached
    e(i_sw(6, 5, 2));             // 23 never reached
    e(i_sw(6, 5, 2));             // 24 never reached
    e(i_sw(6, 5, 2));             // 25 never reached
    e(i_add(6, 6, 6));            // 26 r6 = 30
    e(i_jalr(0, 7));              // 27 return
    // ---------------- data
    sum = 0;
    for (int i = 0; i < 8; i++) begin
      arr[i] = 16'($urandom);
      sum += arr[i];
      poke(DATA_F * 256 + i, arr[i]);
    end
    poke(RES_F * 256 + 0, 16'hDEAD);
    poke(RES_F * 256 + 1, 16'hDEAD);
    poke(RES_F * 256 + 2, 16'h5A5A);
    poke(RES_F * 256 + 3, 16'hDEAD);
    poke(0, 16'h0000);

    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    check(psr == 16'h0009, $sformatf("PSR after reset = %h (user mode, ASID 9)", psr));

    wait (halted);
    repeat (2) @(posedge clk);
    $display("halted after %0d cycles", n_cycles);

    check(panic_code == 4'd2, $sformatf("halted by MODE_HALT, code %0d", panic_code));
    check(dut.u_mem.mem[RES_F * 256 + 0] == sum,
          $sformatf("sum stored %h expected %h", dut.u_mem.mem[RES_F * 256 + 0], sum));
    check(dut.u_mem.mem[RES_F * 256 + 1] == 16'd30, "subroutine result");
    check(dut.u_mem.mem[RES_F * 256 + 2] == 16'h5A5A, "nothing after the trap ran");
    check(dut.u_mem.mem[RES_F * 256 + 3] == 16'd7, "CRMOVE cr6 -> user r6");
    check(dut.u_mem.mem[18] == 16'h1234, "CRMOVE user r4 -> cr1");
    check(dut.u_mem.mem[19] == 16'h8005, $sformatf("TLB read hit = %h", dut.u_mem.mem[19]));
    check(dut.u_mem.mem[20] == 16'h0000, "TLB read miss");
    check(dut.u_mem.mem[21] == 16'h0000, "TLB read after clear");
    check(dut.u_mem.mem[22] == 16'd2, "two interrupts serviced");
    check(psr == 16'h0089, $sformatf("PSR at halt = %h (kernel, history 0, ASID 9)", psr));
    check(epc_trapg == 16'd4, $sformatf("EPC of system call = %0d", epc_trapg));
    check(epc_inv == 16'(TG_H + 15), $sformatf("EPC of invalid opcode = %0d", epc_inv));
    check(epc_priv == 16'd15, $sformatf("EPC of privilege exception = %0d", epc_priv));
    check(epc_trap == 16'd22, $sformatf("EPC of trap = %0d", epc_trap));
    check(dut.u_mem.mem[23] == 16'd1, "timer handler ran once");
    check(dut.u_core.u_rf.regs[2] == 16'd1, "user r2 released by the timer handler");
    check(dut.u_core.u_rf.regs[3] == sum, "user r3 holds the sum");
    check(dut.u_core.u_intc.isr == 16'h0000 && dut.u_core.u_intc.imr == 16'h0007,
          "ISR acknowledged, IMR as written");

    $display("events: stall=%0d redirect=%0d fwd_ex=%0d fetch_umiss=%0d data_umiss=%0d kmiss=%0d tlbw=%0d priv=%0d trap=%0d rfe=%0d flush=%0d",
             n_stall, n_redirect, n_fwd_ex, n_fetch_umiss, n_data_umiss, n_kmiss, n_tlbw,
             n_priv, n_trap, n_rfe, n_flush);
    $display("events: syscall=%0d invalid=%0d int=%0d timer=%0d sleep=%0d wake=%0d tlbr=%0d tlbclear=%0d crmove=%0d",
             n_trapg, n_inv, n_int, n_timer, n_sleep, n_wake, n_tlbr, n_tlbclr, n_crmove);
    check(n_stall > 0, "load-use stall occurred");
    check(n_redirect > 0, "branch/jump redirect occurred");
    check(n_fwd_ex > 0, "forwarding from execute occurred");
    check(n_fetch_umiss > 0, "fetch TLB miss occurred");
    check(n_data_umiss > 0, "data TLB miss occurred");
    check(n_kmiss > 0, "nested kernel TLB miss occurred");
    check(n_tlbw > 0, "TLB write occurred");
    check(n_tlbr == 3, "three TLB reads");
    check(n_tlbclr == 1, "one TLB clear");
    check(n_crmove == 3, "three CRMOVEs");
    check(n_priv == 1, "one privilege exception");
    check(n_inv == 1, "one invalid-opcode exception");
    check(n_trapg == 1, "one system call");
    check(n_trap == 1, "one halt trap");
    check(n_sleep == 1 && n_wake == 1, "slept once and woke");
    check(n_int == 2, "two interrupts taken");
    check(n_timer == 1, "one timer interrupt taken");
    check(n_rfe > 0, "return from exception occurred");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
