// tb_risc16_random: random user programs on the whole machine, compared with
// an instruction-level reference model.
//
// Each of several rounds builds a fresh image and resets the machine:
//   - the operating system: user- and kernel-miss handlers that walk the
//     two-level page table, a TRAP_GENERAL handler that unmasks the I/O
//     interrupt and returns, a privilege handler that skips the offending
//     instruction, an interrupt handler that acknowledges and returns, and the
//     halt trap;
//   - a random program of ADD, ADDI, NAND, LUI, LW, SW, forward BEQ, TRAP_GENERAL
//     and privileged TLB_WRITE (which must be skipped) instructions, placed in
//     a randomly chosen physical frame (virtual page 0), with a 64-word data
//     area at virtual 0xFFC0 in another random frame, reached as r0 - 1..64;
//   - random interrupt requests on irq[0] while the program runs.
// The user-miss handler is padded with 0..3 NOPs from round to round: with only
// two TLB entries the code page, the data page and the page-table page compete,
// and a replacement choice that repeated with the handler's period would make
// two pages evict each other forever (the watchdog would catch it).
// The reference model executes the same program architecturally (exceptions
// and interrupts are invisible to it, apart from the skipped privileged
// instructions). After TRAP_HALT the user registers and the data area must
// match the model. Because interrupts and misses arrive at arbitrary points,
// any imprecision shows up as a mismatch. Coverage counters require that
// misses, interrupts, traps, privilege exceptions and stalls all happened.
// A watchdog bounds the run.
module tb_risc16_random;
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

  risc16_top dut (.*);

  always #5 clk = ~clk;

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

  localparam int UMISS_H = 256, KMISS_H = 320, PRIV_H = 384, HALT_H = 400, INT_H = 408, TG_H = 416;
  localparam int NPROG = 120, ROUNDS = 6;

  // ------------------------------------------------------------- coverage
  int n_umiss = 0, n_kmiss = 0, n_int = 0, n_trapg = 0, n_priv = 0, n_stall = 0, n_halt = 0;
  bit running = 0;

  always @(posedge clk) if (!rst && !halted) begin
    if (dut.u_core.d_stall) n_stall++;
    if (dut.u_core.wb_flush)
      case (dut.u_core.memwb.exc)
        EXC_TLBUMISS:   n_umiss++;
        EXC_TLBKMISS:   n_kmiss++;
        INT_IO:         n_int++;
        TRAP_GENERAL:   n_trapg++;
        EXC_PRIVILEGES: n_priv++;
        default: ;
      endcase
  end

  // random interrupt requests while a program runs
  always @(negedge clk) irq = (running && $urandom_range(0, 39) == 0) ? 16'h0001 : 16'h0000;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, pc=%h psr=%h", dbg_pc, psr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- operating system
  task automatic load_os(int pad);
    poke(81, 16'(UMISS_H));
    poke(82, 16'(KMISS_H));
    poke(85, 16'(PRIV_H));
    poke(96, 16'(INT_H));
    poke(112, 16'(TG_H));
    poke(113, 16'(HALT_H));
    poke(192 + 9, 16'h8002);
    org_ptr = UMISS_H;
    e(i_sw(7, 0, 0));
    e(i_sw(1, 0, 1));
    e(i_sw(2, 0, 2));
    e(i_add(2, 3, 0));
    for (int i = 0; i < pad; i++) e(i_add(0, 0, 0));   // vary the handler length
    e(i_lw(1, 2, 0));
    e(i_lui(3, 10'h200));
    e(i_nand(3, 3, 1));
    e(i_nand(3, 3, 3));
    e(i_beq(3, 0, 5));
    e(i_ext(1, 2, TLB_WRITE));
    e(i_lw(7, 0, 0));
    e(i_lw(1, 0, 1));
    e(i_lw(2, 0, 2));
    e(i_ext(0, 7, SYS_RFE));
    e(i_ext(0, 0, 7'h08));
    org_ptr = KMISS_H;
    e(i_sw(1, 0, 8));
    e(i_sw(2, 0, 9));
    e(i_lw(1, 3, 0));
    e(i_lui(2, 10'h200));
    e(i_nand(2, 2, 1));
    e(i_nand(2, 2, 2));
    e(i_beq(2, 0, 14));
    e(i_add(2, 4, 0));
    for (int i = 0; i < 8; i++) e(i_add(2, 2, 2));
    e(i_add(2, 2, 3));
    e(i_ext(1, 2, TLB_WRITE));
    e(i_lw(1, 0, 8));
    e(i_lw(2, 0, 9));
    e(i_ext(0, 7, SYS_RFE));
    e(i_ext(0, 0, 7'h09));
    org_ptr = PRIV_H;
    e(i_addi(7, 7, 1));
    e(i_ext(0, 7, SYS_RFE));
    org_ptr = HALT_H;
    e(i_ext(0, 0, MODE_HALT));
    org_ptr = INT_H;
    e(i_add(5, 0, 0));
    e(i_ext(0, 7, SYS_RFE));
    org_ptr = TG_H;
    e(i_addi(6, 0, 1));
    e(i_ext(0, 7, SYS_RFE));
  endtask

  // ------------------------------------------------------ reference model
  logic [15:0] prog [NPROG + 4];
  logic [15:0] m_reg [8];
  logic [15:0] m_dat [64];      // virtual 0xFFC0 + i

  function automatic logic [15:0] sx7(logic [6:0] v);
    return {{9{v[6]}}, v};
  endfunction

  task automatic run_model();
    int pc = 0;
    int steps = 0;
    for (int r = 0; r < 8; r++) m_reg[r] = 16'h0;
    while (steps < 10000) begin
      logic [15:0] w, a;
      logic [2:0]  ra, rb, rc;
      w  = prog[pc];
      ra = w[12:10]; rb = w[9:7]; rc = w[2:0];
      steps++;
      pc++;
      case (w[15:13])
        3'b000: m_reg[ra] = m_reg[rb] + m_reg[rc];
        3'b001: m_reg[ra] = m_reg[rb] + sx7(w[6:0]);
        3'b010: m_reg[ra] = ~(m_reg[rb] & m_reg[rc]);
        3'b011: m_reg[ra] = {w[9:0], 6'b0};
        3'b100: begin a = m_reg[rb] + sx7(w[6:0]); m_dat[a[5:0]] = m_reg[ra]; end
        3'b101: begin a = m_reg[rb] + sx7(w[6:0]); m_reg[ra] = m_dat[a[5:0]]; end
        3'b110: if (m_reg[ra] == m_reg[rb]) pc = pc + int'(signed'(sx7(w[6:0])));
        default: if (w[6:0] == TRAP_HALT) break;   // TRAP_GENERAL, TLB_WRITE: no user-visible effect
      endcase
      m_reg[0] = 16'h0;
    end
  endtask

  // ---------------------------------------------------------- one round
  task automatic round(int rn);
    int code_f, data_f;
    code_f = $urandom_range(16, 127);
    do data_f = $urandom_range(16, 127); while (data_f == code_f);
    // program: load-store instructions only use rB = r0 with offsets -64..-1
    for (int i = 0; i < NPROG; i++) begin
      int k, a, b, c;
      k = $urandom_range(0, 19);
      a = $urandom_range(1, 7);
      b = $urandom_range(0, 7);
      c = $urandom_range(0, 7);
      if (i < 7) prog[i] = i_addi(i + 1, 0, $urandom_range(0, 127));
      else case (k)
        0, 1, 2:  prog[i] = i_add(a, b, c);
        3, 4, 5:  prog[i] = i_addi(a, b, $urandom_range(0, 127));
        6, 7:     prog[i] = i_nand(a, b, c);
        8:        prog[i] = i_lui(a, $urandom_range(0, 1023));
        9, 10, 11: prog[i] = i_lw(a, 0, -$urandom_range(1, 64));
        12, 13, 14: prog[i] = i_sw($urandom_range(0, 7), 0, -$urandom_range(1, 64));
        15, 16:   prog[i] = i_beq($urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 3));
        17:       prog[i] = i_ext(0, 0, TRAP_GENERAL);
        18:       prog[i] = i_ext(a, b, TLB_WRITE);
        default:  prog[i] = i_add(a, a, b);
      endcase
    end
    for (int i = NPROG; i < NPROG + 4; i++) prog[i] = i_ext(0, 0, TRAP_HALT);

    rst = 1'b1;
    running = 0;
    @(posedge clk);
    load_os(rn % 4);
    poke(512 + 16'h00, 16'h8000 | 16'(code_f));
    poke(512 + 16'hFF, 16'h8000 | 16'(data_f));
    for (int i = 0; i < NPROG + 4; i++) poke(code_f * 256 + i, prog[i]);
    for (int i = 0; i < 64; i++) begin
      m_dat[i] = 16'($urandom);
      poke(data_f * 256 + 192 + i, m_dat[i]);
    end
    run_model();

    repeat (2) @(posedge clk);
    rst = 1'b0;
    running = 1;
    wait (halted);
    running = 0;
    n_halt++;
    @(posedge clk);
    for (int r = 1; r < 8; r++)
      check(dut.u_core.u_rf.regs[r] == m_reg[r],
            $sformatf("round %0d r%0d = %h, model %h", rn, r, dut.u_core.u_rf.regs[r], m_reg[r]));
    for (int i = 0; i < 64; i++)
      check(dut.u_mem.mem[data_f * 256 + 192 + i] == m_dat[i],
            $sformatf("round %0d data[%0d] = %h, model %h", rn, i,
                      dut.u_mem.mem[data_f * 256 + 192 + i], m_dat[i]));
    check(panic_code == 4'd2, $sformatf("round %0d ended by MODE_HALT", rn));
  endtask

  initial begin
    for (int rn = 0; rn < ROUNDS; rn++) round(rn);
    $display("events: umiss=%0d kmiss=%0d int=%0d trap=%0d priv=%0d stall=%0d",
             n_umiss, n_kmiss, n_int, n_trapg, n_priv, n_stall);
    check(n_halt == ROUNDS, "every round halted");
    check(n_umiss > 0 && n_kmiss > 0, "TLB misses occurred");
    check(n_int > 0, "interrupts occurred");
    check(n_trapg > 0 && n_priv > 0, "traps and privilege exceptions occurred");
    check(n_stall > 0, "load-use stalls occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
