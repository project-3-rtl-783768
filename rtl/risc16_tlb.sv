// risc16_tlb: fully associative translation lookaside buffer with two lookup
// ports and one write port.
//
// Each entry holds a valid bit, a 6-bit ASID and an 8-bit VPN as its tag and an
// 8-bit PFN as its data, the entry layout of the architecture. Port 1 serves
// instruction fetch and port 2 data access; both compare {ASID, VPN} against
// every valid entry combinationally and return the PFN and a miss flag in the
// same cycle. A write replaces the entry chosen by a free-running counter that
// advances every clock, which gives the random replacement the architecture
// asks for ("consult the counter bit"). The counter is a 16-bit maximal-length
// LFSR (taps 16, 14, 13, 11) and the index is its value modulo ENTRIES. A
// plain binary counter is not used on purpose: with two entries its bit
// alternates, so a miss handler of odd length always picks the same victim
// and a code page and a data page can evict each other forever; the LFSR bit
// does not repeat with any short period. The default of two entries is the
// architecture's. A clear strobe (TLB_CLEAR) invalidates every entry. Writes
// and clears take effect at the next rising clock edge. Reset invalidates all
// entries and loads the LFSR with 16'hACE1.
// If two valid entries ever match, the lowest-numbered one wins; nothing in
// the write path prevents duplicate tags, which software must avoid.
module risc16_tlb #(
  parameter int unsigned ENTRIES = 2
) (
  input  logic       clk,
  input  logic       rst,
  // port 1: instruction fetch
  input  logic [5:0] p1_asid,
  input  logic [7:0] p1_vpn,
  output logic [7:0] p1_pfn,
  output logic       p1_miss,
  // port 2: data access
  input  logic [5:0] p2_asid,
  input  logic [7:0] p2_vpn,
  output logic [7:0] p2_pfn,
  output logic       p2_miss,
  // write / clear
  input  logic       we,
  input  logic [5:0] w_asid,
  input  logic [7:0] w_vpn,
  input  logic [7:0] w_pfn,
  input  logic       clear,
  // replacement index used by the next write (observation)
  output logic [$clog2(ENTRIES > 1 ? ENTRIES : 2)-1:0] repl_idx
);
  localparam int unsigned IW = $clog2(ENTRIES > 1 ? ENTRIES : 2);

  typedef struct packed {
    logic       v;
    logic [5:0] asid;
    logic [7:0] vpn;
    logic [7:0] pfn;
  } tlb_entry_t;

  tlb_entry_t entry [ENTRIES];
  logic [15:0]   lfsr;
  logic [IW-1:0] ctr;

  assign ctr      = IW'(lfsr % 16'(ENTRIES));
  assign repl_idx = ctr;

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr <= 16'hACE1;
      for (int i = 0; i < ENTRIES; i++) entry[i] <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (clear) begin
        for (int i = 0; i < ENTRIES; i++) entry[i].v <= 1'b0;
      end else if (we) begin
        entry[ctr] <= '{v: 1'b1, asid: w_asid, vpn: w_vpn, pfn: w_pfn};
      end
    end
  end

  always_comb begin
    p1_miss = 1'b1;
    p1_pfn  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (entry[i].v && entry[i].asid == p1_asid && entry[i].vpn == p1_vpn) begin
        p1_miss = 1'b0;
        p1_pfn  = entry[i].pfn;
      end
    end
  end

  always_comb begin
    p2_miss = 1'b1;
    p2_pfn  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (entry[i].v && entry[i].asid == p2_asid && entry[i].vpn == p2_vpn) begin
        p2_miss = 1'b0;
        p2_pfn  = entry[i].pfn;
      end
    end
  end

  // A write and a clear are never issued together by the pipeline.
  assert property (@(posedge clk) disable iff (rst) !(we && clear));

endmodule
