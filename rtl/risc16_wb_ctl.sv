// risc16_wb_ctl: writeback-stage exception controller (CTL1 of the pipeline).
//
// Exceptional conditions are acted on only here, when every older instruction
// has already committed, which is what makes them precise. Whenever the
// MEM/WB register carries a non-zero 7-bit code, the controller asks for every
// pipeline register except the PC to be cleared (flush) and for the PC to be
// loaded, and it suppresses the instruction's own register write:
//   * EXC / INT / TRAP codes (7'h50..7'h7F): the code, zero-extended, is used
//     directly as the physical address of the vector (the table starts at 80 =
//     7'h50), read through memory port 2 in this same cycle; the PC loads the
//     vector, cr7 (EPC) receives the PC of the instruction for exceptions and
//     interrupts (retry) or PC+1 for traps (skip), and the PSR pushes K = 1.
//     On EXC_TLBUMISS cr3 receives 0xC000 + (ASID << 8) + VPN (the user PTE
//     address); on EXC_TLBKMISS cr3 receives the bare VPN (the physical address
//     of the root PTE). The faulting VPN is PC[15:8] when the miss came from
//     fetch (ifx) and the data address's top byte otherwise.
//   * SYS_RFE (7'h3x): the PC loads the jump target, which the execute stage
//     placed in the PC field, and the PSR pops its history.
//   * MODE_HALT and MODE_PANIC8..15: the machine halts; panic_code gives EXT_DATA.
//   * MODE_SLEEP: the PC loads PC+1 and the machine dozes until an interrupt.
// EPC is PC for exceptions (the instruction is retried, as a TLB miss must be),
// PC+1 for traps (skipped), and for interrupts PC when the fetch stage
// inserted it in place of an instruction (ifx) but PC+1 when a kernel `sys`
// instruction raised it. The PC / PC+1 choice per class is this design's
// reading of the architecture's retry-or-skip rule.
// Purely combinational; the caller applies the results at the next clock edge.
// vec_addr is the code zero-extended, so its upper nine bits are constant.
module risc16_wb_ctl
  import risc16_pkg::*;
(
  input  memwb_t      memwb,
  input  psr_t        psr,
  input  logic [15:0] vec_rdata,   // memory port 2 data while vec_read is high
  // memory port 2 override
  output logic        vec_read,
  output logic [15:0] vec_addr,
  // pipeline control
  output logic        flush,
  output logic        pc_load,
  output logic [15:0] pc_target,
  output logic        halt,
  output logic        sleep,
  output logic [3:0]  panic_code,
  // register-file writes
  output logic        rf_we,
  output reg_t        rf_wr,
  output logic [15:0] rf_wdata,
  output logic        cr3_we,
  output logic [15:0] cr3_wdata,
  output logic        cr7_we,
  output logic [15:0] cr7_wdata,
  // PSR
  output logic        psr_push,
  output logic        psr_pop
);
  exc_t       c;
  logic [7:0] bad_vpn;
  logic       retry;

  assign c        = memwb.exc;
  assign bad_vpn  = memwb.ifx ? memwb.pc[15:8] : memwb.wdata[15:8];
  assign vec_addr = {9'b0, c};
  assign retry    = (c[6:4] == EXTOP_EXC) || (c[6:4] == EXTOP_INT && memwb.ifx);

  always_comb begin
    vec_read   = 1'b0;
    flush      = 1'b0;
    pc_load    = 1'b0;
    pc_target  = vec_rdata;
    halt       = 1'b0;
    sleep      = 1'b0;
    panic_code = c[3:0];
    rf_we      = 1'b0;
    rf_wr      = memwb.rt;
    rf_wdata   = memwb.wdata;
    cr3_we     = 1'b0;
    cr3_wdata  = 16'h0000;
    cr7_we     = 1'b0;
    cr7_wdata  = retry ? memwb.pc : memwb.pc + 16'd1;
    psr_push   = 1'b0;
    psr_pop    = 1'b0;

    if (c == EXC_NONE) begin
      rf_we = memwb.rt[2:0] != 3'd0;
    end else begin
      flush = 1'b1;
      if (is_vectored(c)) begin
        vec_read  = 1'b1;
        pc_load   = 1'b1;
        pc_target = vec_rdata;
        cr7_we    = 1'b1;
        psr_push  = 1'b1;
        if (c == EXC_TLBUMISS) begin
          cr3_we    = 1'b1;
          cr3_wdata = UPT_BASE | {2'b00, psr.asid, bad_vpn};
        end else if (c == EXC_TLBKMISS) begin
          cr3_we    = 1'b1;
          cr3_wdata = {8'h00, bad_vpn};
        end
      end else if (is_rfe(c)) begin
        pc_load   = 1'b1;
        pc_target = memwb.pc;
        psr_pop   = 1'b1;
      end else if (is_halt(c)) begin
        halt = 1'b1;
      end else if (c == MODE_SLEEP) begin
        sleep     = 1'b1;
        pc_load   = 1'b1;
        pc_target = memwb.pc + 16'd1;
      end
    end
  end

endmodule
