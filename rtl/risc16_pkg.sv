// risc16_pkg: shared types and constants of the RiSC-16 pipeline with precise
// exceptions and a software-managed TLB.
//
// The instruction formats, the 7-bit exceptional-condition codes
// ({EXT_OP, EXT_DATA} of the EXTEND form of JALR), the PSR layout and the
// memory-map constants follow the architecture definition. The pipeline
// register structs are this implementation's own grouping of the fields that
// the pipeline diagram shows in each inter-stage register.
package risc16_pkg;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [2:0] {
    OP_ADD  = 3'b000,
    OP_ADDI = 3'b001,
    OP_NAND = 3'b010,
    OP_LUI  = 3'b011,
    OP_SW   = 3'b100,
    OP_LW   = 3'b101,
    OP_BEQ  = 3'b110,
    OP_JALR = 3'b111   // JALR when imm7 == 0, EXTEND otherwise
  } opcode_e;

  // ------------------------------------------- exceptional-condition codes
  // Upper three bits are EXT_OP, lower four EXT_DATA.
  typedef logic [6:0] exc_t;

  localparam exc_t EXC_NONE          = 7'h00;
  localparam exc_t MODE_SLEEP        = 7'h01;
  localparam exc_t MODE_HALT         = 7'h02;  // MODE_PANIC8..15 are 7'h08..7'h0F
  localparam exc_t TLB_READ          = 7'h10;
  localparam exc_t TLB_WRITE         = 7'h11;
  localparam exc_t TLB_CLEAR         = 7'h12;
  localparam exc_t SYS_CRMOVE        = 7'h20;  // bit 3: to CR, bits 2:0: CR number
  localparam exc_t SYS_RFE           = 7'h30;  // EXT_DATA ignored
  localparam exc_t EXC_GENERAL       = 7'h50;
  localparam exc_t EXC_TLBUMISS      = 7'h51;
  localparam exc_t EXC_TLBKMISS      = 7'h52;
  localparam exc_t EXC_INVALIDOPCODE = 7'h53;
  localparam exc_t EXC_INVALIDADDR   = 7'h54;
  localparam exc_t EXC_PRIVILEGES    = 7'h55;
  localparam exc_t INT_IO            = 7'h60;
  localparam exc_t INT_CLOCK         = 7'h61;
  localparam exc_t INT_TIMER         = 7'h62;
  localparam exc_t TRAP_GENERAL      = 7'h70;
  localparam exc_t TRAP_HALT         = 7'h71;

  localparam logic [2:0] EXTOP_MODE = 3'b000;
  localparam logic [2:0] EXTOP_TLB  = 3'b001;
  localparam logic [2:0] EXTOP_CRMOVE = 3'b010;
  localparam logic [2:0] EXTOP_RFE  = 3'b011;
  localparam logic [2:0] EXTOP_EXC  = 3'b101;
  localparam logic [2:0] EXTOP_INT  = 3'b110;
  localparam logic [2:0] EXTOP_TRAP = 3'b111;

  // Codes that the writeback stage handles by vectoring through the table
  // (EXC, INT and TRAP classes, 7'h50..7'h7F).
  function automatic logic is_vectored(exc_t c);
    return c[6] & (c[5] | c[4]);
  endfunction

  // Codes that stop the machine: MODE_HALT and MODE_PANIC8..15.
  function automatic logic is_halt(exc_t c);
    return (c[6:4] == EXTOP_MODE) && (c[3] || c[3:0] == 4'd2);
  endfunction

  function automatic logic is_rfe(exc_t c);
    return c[6:4] == EXTOP_RFE;
  endfunction

  // Privileged operations carried out inside the pipeline (TLB and CRMOVE
  // classes); they retire as ordinary instructions after the memory stage.
  function automatic logic is_inpipe(exc_t c);
    return (c[6:4] == EXTOP_TLB && c[3:0] <= 4'd2) || c[6:4] == EXTOP_CRMOVE;
  endfunction

  // Every EXTEND code the architecture defines (others raise EXC_INVALIDOPCODE).
  function automatic logic is_defined(exc_t c);
    return c == MODE_SLEEP || is_halt(c) || is_inpipe(c) || is_rfe(c) || is_vectored(c);
  endfunction

  // ------------------------------------------------------------------ PSR
  // bits 15:8 kernel-mode history K-8..K-1, bit 7 K, bit 6 zero, 5:0 ASID
  typedef struct packed {
    logic [7:0] khist;
    logic       k;
    logic       zero;
    logic [5:0] asid;
  } psr_t;

  // ------------------------------------------------------- memory map
  localparam logic [15:0] UPT_BASE = 16'hC000;  // user page tables, 0xC000 + (ASID << 8)

  // ---------------------------------------------------- pipeline registers
  // Register numbers in the pipeline are 4-bit physical indices {bank, r}:
  // bank 0 holds r0..r7, bank 1 holds cr0..cr7.
  typedef logic [3:0] reg_t;

  typedef struct packed {
    logic [15:0] instr;
    logic [15:0] pc;
    exc_t        exc;
    logic        ifx;     // code raised by the fetch stage (TLB miss or interrupt)
  } ifid_t;

  typedef struct packed {
    opcode_e     op;
    reg_t        rt;      // destination register, 0 = none
    exc_t        exc;
    logic        ifx;
    logic [15:0] pc;      // instruction PC (RFE: carries its jump target later)
    logic [15:0] opnd0;   // immediate / link value
    logic [15:0] opnd1;   // R[rB]
    logic [15:0] opnd2;   // R[rC] for ADD/NAND, R[rA] otherwise
  } idex_t;

  typedef struct packed {
    opcode_e     op;
    reg_t        rt;
    exc_t        exc;
    logic        ifx;
    logic [15:0] pc;
    logic [15:0] sdata;   // store data / TLB PFN word
    logic [15:0] aluout;  // result / effective address / TLB tag word
  } exmem_t;

  typedef struct packed {
    reg_t        rt;
    exc_t        exc;
    logic        ifx;     // code raised by instruction fetch
    logic [15:0] pc;
    logic [15:0] wdata;   // register write data (data address on a data miss)
  } memwb_t;

endpackage
