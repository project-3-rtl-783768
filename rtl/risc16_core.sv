// risc16_core: five-stage RiSC-16 pipeline with precise exceptions, kernel
// mode, interrupts and a software-managed two-port TLB.
//
// Stages and what each does here:
//   fetch     - PC, TLB port 1, memory port 1. User-mode fetches and kernel
//               fetches from the top half (PC[15] = 1) are translated, kernel
//               fetches always with ASID 0; a miss (CTL0) puts EXC_TLBUMISS or
//               EXC_TLBKMISS into IF/ID with a NOP in place of the instruction.
//               In user mode a pending unmasked interrupt is inserted the same
//               way (its class code replaces the fetched instruction).
//   decode    - register read through the unified file (the PSR K bit is the
//               bank bit of every register number), forwarding from execute,
//               memory and writeback, load-use stall (one bubble), BEQ and JALR
//               resolved here with the next fetch squashed (stomp). An EXTEND
//               instruction (JALR with non-zero imm7) places its 7-bit code in
//               the EXC field; in user mode every code outside the TRAP class
//               becomes EXC_PRIVILEGES and undefined codes become
//               EXC_INVALIDOPCODE.
//   execute   - adder / NAND / pass; for RFE the jump target R[rB] replaces
//               the PC field (MUXrfe) so that it reaches writeback.
//   memory    - data translation through TLB port 2 with the PSR's ASID, in
//               user mode and for the kernel's top half; a miss on LW/SW raises
//               EXC_TLBUMISS/KMISS (CTL8), an address beyond the physical
//               memory raises EXC_INVALIDADDR. TLB_READ, TLB_WRITE, TLB_CLEAR
//               (CTL9) and CRMOVE are carried out here and then retire as
//               ordinary instructions. Stores and TLB updates are suppressed for
//               an instruction that carries an exception and while writeback is
//               taking one (CTL2).
//   writeback - register write, or the exception actions of risc16_wb_ctl:
//               flush every pipeline register, load the PC from the vector
//               table through memory port 2 or from the RFE target, write EPC
//               and cr3, push/pop the PSR, halt or sleep.
// Timing: one instruction per cycle without hazards; a load or TLB_READ
// followed by a dependent instruction costs one bubble; a taken branch or
// JALR costs one squashed fetch; an exception costs the flush of the four
// younger stages.
// The stage split, the EXC/IFX fields, the vectoring rules and the address
// formats follow the architecture; the forwarding network, the encoding of the
// inter-stage registers, taking interrupts only in user mode and the operand
// conventions of TLB_READ and CRMOVE are this design's own.
// Bit 6 of the psr output is the PSR layout's unused bit and is constant 0.
module risc16_core
  import risc16_pkg::*;
#(
  parameter int unsigned TLB_ENTRIES = 2,
  parameter logic [5:0]  INIT_ASID   = 6'd9,
  parameter int unsigned MEM_AW      = 16,
  parameter int unsigned NINT        = 16
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NINT-1:0] irq,
  // memory port 1 (instruction)
  output logic [15:0]     imem_addr,
  input  logic [15:0]     imem_rdata,
  // memory port 2 (data and vector fetch)
  output logic [15:0]     dmem_addr,
  input  logic [15:0]     dmem_rdata,
  output logic            dmem_we,
  output logic [15:0]     dmem_wdata,
  // status
  output logic            halted,
  output logic            sleeping,
  output logic [3:0]      panic_code,
  output psr_t            psr,
  output logic [15:0]     pc_out
);
  // ------------------------------------------------------------ state
  logic [15:0] pc;
  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;
  logic   k;

  assign k      = psr.k;
  assign pc_out = pc;

  // ------------------------------------------------------- writeback (CTL1)
  logic        wb_vec_read, wb_flush, wb_pc_load, wb_halt, wb_sleep;
  logic [15:0] wb_vec_addr, wb_pc_target;
  logic        wb_rf_we, wb_cr3_we, wb_cr7_we, wb_push, wb_pop;
  reg_t        wb_rf_wr;
  logic [15:0] wb_rf_wdata, wb_cr3_wdata, wb_cr7_wdata;
  logic [3:0]  wb_panic;

  risc16_wb_ctl u_wb_ctl (
    .memwb     (memwb),
    .psr       (psr),
    .vec_rdata (dmem_rdata),
    .vec_read  (wb_vec_read),
    .vec_addr  (wb_vec_addr),
    .flush     (wb_flush),
    .pc_load   (wb_pc_load),
    .pc_target (wb_pc_target),
    .halt      (wb_halt),
    .sleep     (wb_sleep),
    .panic_code(wb_panic),
    .rf_we     (wb_rf_we),
    .rf_wr     (wb_rf_wr),
    .rf_wdata  (wb_rf_wdata),
    .cr3_we    (wb_cr3_we),
    .cr3_wdata (wb_cr3_wdata),
    .cr7_we    (wb_cr7_we),
    .cr7_wdata (wb_cr7_wdata),
    .psr_push  (wb_push),
    .psr_pop   (wb_pop)
  );

  logic        asid_we, isr_we, imr_we;
  logic [15:0] sr_wdata, isr, imr;
  logic        int_pending;
  exc_t        int_code;

  risc16_psr #(.INIT_ASID(INIT_ASID)) u_psr (
    .clk, .rst,
    .push      (wb_push),
    .pop       (wb_pop),
    .asid_we   (asid_we),
    .asid_wdata(sr_wdata[5:0]),
    .psr       (psr)
  );

  risc16_intc #(.NINT(NINT)) u_intc (
    .clk, .rst,
    .irq     (irq),
    .isr_we  (isr_we),
    .imr_we  (imr_we),
    .wdata   (sr_wdata),
    .isr     (isr),
    .imr     (imr),
    .pending (int_pending),
    .int_code(int_code)
  );

  // ------------------------------------------------------------------ TLB
  logic [7:0] t1_pfn, t2_pfn;
  logic       t1_miss, t2_miss;
  logic       tlb_we, tlb_clear, m_tlbop;
  logic [$clog2(TLB_ENTRIES > 1 ? TLB_ENTRIES : 2)-1:0] tlb_repl;  // observation only

  // TLB operations take the ASID and VPN from their rB word (MUXasid, MUXvpn)
  assign m_tlbop = exmem.exc[6:4] == EXTOP_TLB;

  risc16_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst,
    .p1_asid (k ? 6'd0 : psr.asid),          // MUXk
    .p1_vpn  (pc[15:8]),
    .p1_pfn  (t1_pfn),
    .p1_miss (t1_miss),
    .p2_asid (m_tlbop ? exmem.aluout[13:8] : psr.asid),
    .p2_vpn  (m_tlbop ? exmem.aluout[7:0] : exmem.aluout[15:8]),
    .p2_pfn  (t2_pfn),
    .p2_miss (t2_miss),
    .we      (tlb_we),
    .w_asid  (exmem.aluout[13:8]),
    .w_vpn   (exmem.aluout[7:0]),
    .w_pfn   (exmem.sdata[7:0]),
    .clear   (tlb_clear),
    .repl_idx(tlb_repl)
  );

  // ---------------------------------------------------------------- fetch
  logic  f_xlate, f_miss, f_int;
  ifid_t f_out;

  assign f_xlate   = !k || pc[15];
  assign f_miss    = f_xlate && t1_miss;
  assign f_int     = !k && int_pending;
  assign imem_addr = f_xlate ? {t1_pfn, pc[7:0]} : pc;

  always_comb begin
    f_out.pc    = pc;
    f_out.instr = imem_rdata;
    f_out.exc   = EXC_NONE;
    f_out.ifx   = 1'b0;
    if (f_int) begin
      f_out.instr = 16'h0000;
      f_out.exc   = int_code;
      f_out.ifx   = 1'b1;
    end else if (f_miss) begin
      f_out.instr = 16'h0000;
      f_out.exc   = k ? EXC_TLBKMISS : EXC_TLBUMISS;
      f_out.ifx   = 1'b1;
    end
  end

  // --------------------------------------------------------------- decode
  logic [15:0] d_instr;
  opcode_e     d_op;
  logic [2:0]  d_ra, d_rb, d_rc;
  reg_t        d_src1, d_src2;
  logic [6:0]  d_imm7;
  logic [15:0] d_sext7;
  logic        d_ext, d_crmove, d_uses1, d_uses2, d_stall, d_redirect;
  logic [15:0] d_target, d_v1, d_v2, rf_rd1, rf_rd2;
  exc_t        d_exc;
  idex_t       d_out;

  assign d_instr  = (ifid.exc != EXC_NONE) ? 16'h0000 : ifid.instr;
  assign d_op     = opcode_e'(d_instr[15:13]);
  assign d_ra     = d_instr[12:10];
  assign d_rb     = d_instr[9:7];
  assign d_rc     = d_instr[2:0];
  assign d_imm7   = d_instr[6:0];
  assign d_sext7  = {{9{d_imm7[6]}}, d_imm7};
  assign d_ext    = (d_op == OP_JALR) && (d_imm7 != 7'd0);
  assign d_crmove = d_ext && (d_exc[6:4] == EXTOP_CRMOVE);
  assign d_src1   = {k, d_rb};
  // CRMOVE: bit 3 set moves user r[rA] into cr[n], clear moves cr[n] into user r[rA]
  assign d_src2   = d_crmove ? (d_imm7[3] ? {1'b0, d_ra} : {1'b1, d_imm7[2:0]}) :
                    (d_op == OP_ADD || d_op == OP_NAND) ? {k, d_rc} : {k, d_ra};
  assign d_uses1  = (d_op != OP_LUI);
  assign d_uses2  = (d_op == OP_ADD || d_op == OP_NAND || d_op == OP_SW ||
                     d_op == OP_BEQ || d_ext);

  risc16_regfile u_rf (
    .clk,
    .psr_asid  (psr.asid),
    .isr       (isr),
    .imr       (imr),
    .rs1       (d_src1),
    .rd1       (rf_rd1),
    .rs2       (d_src2),
    .rd2       (rf_rd2),
    .we        (wb_rf_we),
    .wr        (wb_rf_wr),
    .wdata     (wb_rf_wdata),
    .cr3_we    (wb_cr3_we),
    .cr3_wdata (wb_cr3_wdata),
    .cr7_we    (wb_cr7_we),
    .cr7_wdata (wb_cr7_wdata),
    .asid_we   (asid_we),
    .isr_we    (isr_we),
    .imr_we    (imr_we),
    .sr_wdata  (sr_wdata)
  );

  // execute and memory results, used by forwarding
  logic [15:0] ex_result, mem_result;

  // Forwarding (MUXop1/MUXop2): youngest producer first; a value that the
  // execute stage cannot yet supply (ie_late) is covered by the stall below.
  function automatic logic [15:0] fwd(input reg_t r, input logic [15:0] rfv,
                                      input reg_t ie_rt, input logic ie_lw,
                                      input logic [15:0] exr, input reg_t em_rt,
                                      input logic [15:0] memr, input reg_t mw_rt,
                                      input logic [15:0] mwr);
    logic [15:0] v;
    if (r[2:0] == 3'd0)               v = 16'h0000;
    else if (ie_rt == r && !ie_lw)    v = exr;
    else if (em_rt == r)              v = memr;
    else if (mw_rt == r)              v = mwr;
    else                              v = rfv;
    // cr4 reads back only the ASID
    if (r == 4'd12) v = {10'b0, v[5:0]};
    return v;
  endfunction

  // results that only exist after the memory stage: loads and TLB reads
  logic ie_late;
  assign ie_late = (idex.op == OP_LW) || (idex.exc == TLB_READ);

  assign d_v1 = fwd(d_src1, rf_rd1, idex.rt, ie_late, ex_result,
                    exmem.rt, mem_result, memwb.rt, memwb.wdata);
  assign d_v2 = fwd(d_src2, rf_rd2, idex.rt, ie_late, ex_result,
                    exmem.rt, mem_result, memwb.rt, memwb.wdata);

  // load-use hazard (CTL6), also after a TLB read
  assign d_stall = ie_late && (idex.rt[2:0] != 3'd0) &&
                   ((d_uses1 && d_src1 == idex.rt) || (d_uses2 && d_src2 == idex.rt));

  // branch / jump resolution (CTL4)
  always_comb begin
    d_redirect = 1'b0;
    d_target   = ifid.pc + 16'd1 + d_sext7;
    if (d_op == OP_BEQ && d_v1 == d_v2) begin
      d_redirect = 1'b1;
    end else if (d_op == OP_JALR && !d_ext) begin
      d_redirect = 1'b1;
      d_target   = d_v1;
    end
    if (d_stall) d_redirect = 1'b0;
  end

  // exception code from decode
  always_comb begin
    d_exc = ifid.exc;
    if (ifid.exc == EXC_NONE && d_ext) begin
      if (!k && d_imm7[6:4] != EXTOP_TRAP)
        d_exc = EXC_PRIVILEGES;
      else if (is_defined(d_imm7))
        d_exc = d_imm7;
      else
        d_exc = EXC_INVALIDOPCODE;
    end
  end

  always_comb begin
    d_out.op    = d_op;
    d_out.exc   = d_exc;
    d_out.ifx   = ifid.ifx;
    d_out.pc    = ifid.pc;
    d_out.opnd1 = d_v1;
    d_out.opnd2 = d_v2;
    unique case (d_op)
      OP_LUI:  d_out.opnd0 = {d_instr[9:0], 6'b0};
      OP_JALR: d_out.opnd0 = ifid.pc + 16'd1;
      default: d_out.opnd0 = d_sext7;
    endcase
    d_out.rt = 4'd0;
    unique case (d_op)
      OP_ADD, OP_ADDI, OP_NAND, OP_LUI, OP_LW: d_out.rt = {k, d_ra};
      OP_JALR: begin
        if (!d_ext)                  d_out.rt = {k, d_ra};
        else if (d_exc == TLB_READ)  d_out.rt = {k, d_ra};
        else if (d_crmove)           d_out.rt = d_imm7[3] ? {1'b1, d_imm7[2:0]} : {1'b0, d_ra};
      end
      default: d_out.rt = 4'd0;
    endcase
  end

  // -------------------------------------------------------------- execute
  exmem_t e_out;

  always_comb begin
    unique case (idex.op)
      OP_ADD:                   ex_result = idex.opnd1 + idex.opnd2;
      OP_ADDI, OP_LW, OP_SW:    ex_result = idex.opnd1 + idex.opnd0;
      OP_NAND:                  ex_result = ~(idex.opnd1 & idex.opnd2);
      OP_LUI:                   ex_result = idex.opnd0;
      OP_JALR:
        if (idex.exc[6:4] == EXTOP_CRMOVE)  ex_result = idex.opnd2;   // moved value
        else if (idex.exc != EXC_NONE)      ex_result = idex.opnd1;   // rB word
        else                                ex_result = idex.opnd0;   // link
      default:                  ex_result = 16'h0000;
    endcase
    e_out.op     = idex.op;
    e_out.rt     = idex.rt;
    e_out.exc    = idex.exc;
    e_out.ifx    = idex.ifx;
    e_out.pc     = is_rfe(idex.exc) ? idex.opnd1 : idex.pc;   // MUXrfe
    e_out.sdata  = idex.opnd2;
    e_out.aluout = ex_result;
  end

  // --------------------------------------------------------------- memory
  logic        m_access, m_xlate, m_miss, m_badaddr;
  logic [15:0] m_daddr;
  memwb_t      m_out;

  assign m_access  = (exmem.exc == EXC_NONE) && (exmem.op == OP_LW || exmem.op == OP_SW);
  assign m_xlate   = !k || exmem.aluout[15];
  assign m_miss    = m_access && m_xlate && t2_miss;
  assign m_daddr   = m_xlate ? {t2_pfn, exmem.aluout[7:0]} : exmem.aluout;
  assign m_badaddr = m_access && !m_miss && (32'(m_daddr) >= (32'd1 << MEM_AW));

  // CTL2 / CTL9: nothing changes machine state while writeback takes an exception
  assign dmem_we    = m_access && exmem.op == OP_SW && !m_miss && !m_badaddr && !wb_flush;
  assign dmem_wdata = exmem.sdata;
  assign dmem_addr  = wb_vec_read ? wb_vec_addr : m_daddr;            // MUXaddr
  assign tlb_we     = (exmem.exc == TLB_WRITE) && !wb_flush;
  assign tlb_clear  = (exmem.exc == TLB_CLEAR) && !wb_flush;

  // MUXout
  always_comb begin
    if (exmem.op == OP_LW && !m_miss)  mem_result = dmem_rdata;
    else if (exmem.exc == TLB_READ)    mem_result = {!t2_miss, 7'b0, t2_pfn};   // PTE format
    else                               mem_result = exmem.aluout;
  end

  // CTL8
  always_comb begin
    m_out.pc    = exmem.pc;
    m_out.wdata = mem_result;
    m_out.ifx   = exmem.ifx;
    if (is_inpipe(exmem.exc))
      m_out.exc = EXC_NONE;
    else if (exmem.exc != EXC_NONE)
      m_out.exc = exmem.exc;
    else if (m_miss)
      m_out.exc = k ? EXC_TLBKMISS : EXC_TLBUMISS;
    else if (m_badaddr)
      m_out.exc = EXC_INVALIDADDR;
    else
      m_out.exc = EXC_NONE;
    m_out.rt = (m_out.exc != EXC_NONE) ? 4'd0 : exmem.rt;
  end

  // ------------------------------------------------------ pipeline registers
  always_ff @(posedge clk) begin
    if (rst) begin
      pc         <= 16'h0000;
      ifid       <= '0;
      idex       <= '0;
      exmem      <= '0;
      memwb      <= '0;
      halted     <= 1'b0;
      sleeping   <= 1'b0;
      panic_code <= 4'd0;
    end else if (wb_flush) begin
      // precise exception / RFE / halt / sleep taken in writeback: clear the pipe
      ifid  <= '0;
      idex  <= '0;
      exmem <= '0;
      memwb <= '0;
      if (wb_pc_load) pc <= wb_pc_target;
      if (wb_halt) begin
        halted     <= 1'b1;
        panic_code <= wb_panic;
      end
      if (wb_sleep) sleeping <= 1'b1;
    end else begin
      memwb <= m_out;
      exmem <= e_out;
      if (sleeping && int_pending) sleeping <= 1'b0;     // woken by an interrupt
      if (d_stall) begin
        idex <= '0;                       // bubble; PC and IF/ID hold
      end else begin
        idex <= d_out;
        if (halted || sleeping) begin
          ifid <= '0;
        end else if (d_redirect) begin
          ifid <= '0;                     // stomp the wrong-path fetch
          pc   <= d_target;
        end else begin
          ifid <= f_out;
          pc   <= pc + 16'd1;
        end
      end
    end
  end

  // ------------------------------------------------------------ assertions
  // no store or TLB update may happen while writeback vectors
  assert property (@(posedge clk) disable iff (rst) wb_flush |-> !dmem_we && !tlb_we && !tlb_clear);
  // an instruction carrying an exception never writes the register file
  assert property (@(posedge clk) disable iff (rst) (memwb.exc != EXC_NONE) |-> !wb_rf_we);
  // the pipeline is empty while the machine is halted
  assert property (@(posedge clk) disable iff (rst) halted |-> memwb.exc == EXC_NONE && !dmem_we);

endmodule
