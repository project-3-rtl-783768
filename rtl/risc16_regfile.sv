// risc16_regfile: unified register file of eight user registers r0..r7 and
// eight kernel control registers cr0..cr7.
//
// Every register is addressed by a 4-bit physical index {bank, r}. Ordinary
// instructions take the bank bit from the PSR's kernel-mode bit, so user code
// sees r0..r7 and kernel code sees cr0..cr7 through the same 3-bit fields, the
// unified organisation the architecture prescribes; the CRMOVE instruction
// names the other bank explicitly. r0 and cr0 read as zero and ignore writes.
// cr4, cr5 and cr6 are not stored here: cr4 reads back the PSR's ASID
// (zero-extended) and a write to it changes only the ASID; cr5 and cr6 read the
// interrupt status and mask registers of the interrupt logic. Writes to these
// three leave as strobes (asid_we, isr_we, imr_we) with the data on sr_wdata.
// Two extra write ports, used by the writeback-stage exception logic when it
// vectors to a handler, load cr3 (faulting PTE address or VPN) and cr7 (EPC).
// Reads are combinational; writes take effect at the rising clock edge. A
// normal write and a hardware write to the same register in one cycle cannot
// occur (an exceptional instruction never writes its result); if they did, the
// hardware write would win. Storage is not reset. sr_wdata is the write data
// itself, passed on so the owners of cr4..cr6 need no extra wiring.
module risc16_regfile
  import risc16_pkg::*;
(
  input  logic        clk,
  input  logic [5:0]  psr_asid,    // read back through cr4
  input  logic [15:0] isr,         // read back through cr5
  input  logic [15:0] imr,         // read back through cr6
  // read ports
  input  reg_t        rs1,
  output logic [15:0] rd1,
  input  reg_t        rs2,
  output logic [15:0] rd2,
  // normal write port (writeback stage)
  input  logic        we,
  input  reg_t        wr,
  input  logic [15:0] wdata,
  // hardware writes when vectoring
  input  logic        cr3_we,
  input  logic [15:0] cr3_wdata,
  input  logic        cr7_we,
  input  logic [15:0] cr7_wdata,
  // software writes of registers held elsewhere
  output logic        asid_we,
  output logic        isr_we,
  output logic        imr_we,
  output logic [15:0] sr_wdata
);
  localparam reg_t CR3 = 4'd11, CR4 = 4'd12, CR5 = 4'd13, CR6 = 4'd14, CR7 = 4'd15;

  logic [15:0] regs [16];

  function automatic logic [15:0] rd(input reg_t r, input logic [15:0] v,
                                     input logic [5:0] asid, input logic [15:0] s5,
                                     input logic [15:0] s6);
    if (r[2:0] == 3'd0) return 16'h0000;
    else if (r == CR4)  return {10'b0, asid};
    else if (r == CR5)  return s5;
    else if (r == CR6)  return s6;
    else                return v;
  endfunction

  assign rd1 = rd(rs1, regs[rs1], psr_asid, isr, imr);
  assign rd2 = rd(rs2, regs[rs2], psr_asid, isr, imr);

  assign asid_we  = we && wr == CR4;
  assign isr_we   = we && wr == CR5;
  assign imr_we   = we && wr == CR6;
  assign sr_wdata = wdata;

  always_ff @(posedge clk) begin
    if (we && wr[2:0] != 3'd0 && wr != CR4 && wr != CR5 && wr != CR6) regs[wr] <= wdata;
    if (cr3_we) regs[CR3] <= cr3_wdata;
    if (cr7_we) regs[CR7] <= cr7_wdata;
  end

endmodule
