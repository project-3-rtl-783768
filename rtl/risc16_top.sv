// risc16_top: the complete machine, the RiSC-16 pipeline with precise
// exceptions, kernel mode, interrupts and TLB joined to a dual-ported physical
// memory.
//
// Memory port 1 serves instruction fetch and memory port 2 data access and
// vector fetch, as in the pipeline diagram. The ld_* port writes memory
// directly and is meant for loading a boot image (page frame 0 with the vector
// table and root page table, handler code, page tables, the application) while
// rst is held; it is this design's own addition. irq[i] raises interrupt type i
// (0 I/O, 1 clock, 2 timer, others free) by setting bit i of the status
// register cr5; a level held for one clock is enough. The built-in interval
// timer also requests type 2 (INT_TIMER) once every TIMER_PERIOD cycles; the
// document gives no period, so the default 4096 is this design's choice.
// After reset the processor starts at PC 0 in user mode with ASID INIT_ASID
// (9), all interrupts masked.
// halted rises once a MODE_HALT or MODE_PANIC instruction reaches writeback;
// panic_code then holds its EXT_DATA (2 for MODE_HALT). sleeping is high
// between a MODE_SLEEP instruction and the next pending unmasked interrupt.
// psr and dbg_pc are for observation.
// Physical addresses are MEM_AW bits wide; the default 16 gives the full 256
// frames of 256 words. With a smaller MEM_AW a data access beyond the memory
// raises EXC_INVALIDADDR; instruction fetch simply drops the upper bits.
module risc16_top
  import risc16_pkg::*;
#(
  parameter int unsigned MEM_AW      = 16,
  parameter int unsigned TLB_ENTRIES = 2,
  parameter logic [5:0]  INIT_ASID   = 6'd9,
  parameter int unsigned TIMER_PERIOD = 4096
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] irq,
  input  logic        ld_we,
  input  logic [15:0] ld_addr,
  input  logic [15:0] ld_data,
  output logic        halted,
  output logic        sleeping,
  output logic [3:0]  panic_code,
  output logic [15:0] psr,
  output logic [15:0] dbg_pc
);
  logic [15:0] imem_addr, imem_rdata, dmem_addr, dmem_rdata, dmem_wdata;
  logic        dmem_we;
  psr_t        psr_s;
  logic        timer_tick;

  risc16_timer #(.PERIOD(TIMER_PERIOD)) u_timer (
    .clk, .rst,
    .tick (timer_tick)
  );

  risc16_core #(
    .TLB_ENTRIES(TLB_ENTRIES),
    .INIT_ASID  (INIT_ASID),
    .MEM_AW     (MEM_AW),
    .NINT       (16)
  ) u_core (
    .clk, .rst,
    .irq        (irq | {13'b0, timer_tick, 2'b0}),
    .imem_addr  (imem_addr),
    .imem_rdata (imem_rdata),
    .dmem_addr  (dmem_addr),
    .dmem_rdata (dmem_rdata),
    .dmem_we    (dmem_we),
    .dmem_wdata (dmem_wdata),
    .halted     (halted),
    .sleeping   (sleeping),
    .panic_code (panic_code),
    .psr        (psr_s),
    .pc_out     (dbg_pc)
  );

  assign psr = psr_s;

  risc16_memory #(.AW(MEM_AW)) u_mem (
    .clk,
    .p1_addr  (imem_addr[MEM_AW-1:0]),
    .p1_rdata (imem_rdata),
    .p2_addr  (dmem_addr[MEM_AW-1:0]),
    .p2_rdata (dmem_rdata),
    .p2_we    (dmem_we),
    .p2_wdata (dmem_wdata),
    .ld_we    (ld_we),
    .ld_addr  (ld_addr[MEM_AW-1:0]),
    .ld_data  (ld_data)
  );

endmodule
