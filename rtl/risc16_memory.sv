// risc16_memory: word-addressed physical memory with two ports.
//
// Port 1 is the instruction-fetch read port. Port 2 is the data port: it reads
// combinationally and writes at the rising clock edge when p2_we is high; the
// writeback-stage exception logic also reads interrupt vectors through it. Both
// reads are combinational, as the single-cycle memory access of the pipeline
// requires. A third write-only port (ld_*) loads an image before the processor
// runs; it is this design's own addition for initialisation and has priority
// over port 2. With the default AW = 16 the memory is the full 64K-word
// physical space (256 page frames of 256 words). Contents are not reset.
module risc16_memory #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] p1_addr,
  output logic [15:0]   p1_rdata,
  input  logic [AW-1:0] p2_addr,
  output logic [15:0]   p2_rdata,
  input  logic          p2_we,
  input  logic [15:0]   p2_wdata,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [15:0]   ld_data
);
  logic [15:0] mem [2**AW];

  assign p1_rdata = mem[p1_addr];
  assign p2_rdata = mem[p2_addr];

  always_ff @(posedge clk) begin
    if (ld_we)      mem[ld_addr] <= ld_data;
    else if (p2_we) mem[p2_addr] <= p2_wdata;
  end

endmodule
