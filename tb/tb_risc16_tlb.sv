// tb_risc16_tlb: self-checking test of the two-port fully associative TLB.
//
// Random writes, clears and lookups on both ports are compared each cycle with
// a reference model that keeps its own copy of the entries and of the
// replacement LFSR (16 bits, taps 16/14/13/11, loaded with 16'hACE1 at reset,
// stepped every clock; the index is its value modulo the entry count). The
// index must also repeat as well as change between consecutive cycles, so it
// is not a plain alternating counter.
// Tags are drawn from a small set of ASIDs and VPNs so that hits, misses,
// ASID mismatches and replacement of both entries all occur; their counts are
// checked at the end.
module tb_risc16_tlb;
  localparam int N = 2;

  logic       clk = 1'b0, rst = 1'b1;
  logic [5:0] p1_asid, p2_asid, w_asid;
  logic [7:0] p1_vpn, p2_vpn, w_vpn, w_pfn, p1_pfn, p2_pfn;
  logic       p1_miss, p2_miss, we, clear;
  logic [0:0] repl_idx;

  risc16_tlb #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hits = 0, misses = 0, writes = 0, clears = 0;
  int wr_slot [N];

  // reference model
  logic       m_v    [N];
  logic [5:0] m_asid [N];
  logic [7:0] m_vpn  [N];
  logic [7:0] m_pfn  [N];
  int         m_ctr, same_idx = 0;
  logic [15:0] m_lfsr;
  logic [0:0]  prev_idx = '0;

  function automatic void lookup(input logic [5:0] a, input logic [7:0] v,
                                 output logic miss, output logic [7:0] pfn);
    miss = 1'b1; pfn = 8'h00;
    for (int i = N - 1; i >= 0; i--)
      if (m_v[i] && m_asid[i] == a && m_vpn[i] == v) begin miss = 1'b0; pfn = m_pfn[i]; end
  endfunction

  task automatic check_ports();
    logic em; logic [7:0] ep;
    lookup(p1_asid, p1_vpn, em, ep);
    checks++;
    if (p1_miss !== em || (!em && p1_pfn !== ep)) begin
      failures++;
      $display("FAIL port1 asid=%0d vpn=%h: miss=%b pfn=%h expected %b %h", p1_asid, p1_vpn, p1_miss, p1_pfn, em, ep);
    end
    if (em) misses++; else hits++;
    lookup(p2_asid, p2_vpn, em, ep);
    checks++;
    if (p2_miss !== em || (!em && p2_pfn !== ep)) begin
      failures++;
      $display("FAIL port2 asid=%0d vpn=%h: miss=%b pfn=%h expected %b %h", p2_asid, p2_vpn, p2_miss, p2_pfn, em, ep);
    end
    if (em) misses++; else hits++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; clear = 0; w_asid = 0; w_vpn = 0; w_pfn = 0;
    p1_asid = 0; p1_vpn = 0; p2_asid = 0; p2_vpn = 0;
    for (int i = 0; i < N; i++) begin m_v[i] = 0; m_asid[i] = 0; m_vpn[i] = 0; m_pfn[i] = 0; wr_slot[i] = 0; end
    m_lfsr = 16'hACE1; m_ctr = int'(m_lfsr % N);
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    for (int cyc = 0; cyc < 2000; cyc++) begin
      // drive at negedge
      p1_asid = 6'($urandom_range(0, 2)) * 6'd9;   // ASIDs 0, 9, 18
      p1_vpn  = 8'($urandom_range(0, 3)) + 8'hC8;
      p2_asid = 6'($urandom_range(0, 2)) * 6'd9;
      p2_vpn  = 8'($urandom_range(0, 3)) + 8'hC8;
      we      = ($urandom_range(0, 3) == 0);
      clear   = !we && ($urandom_range(0, 60) == 0);
      w_asid  = 6'($urandom_range(0, 2)) * 6'd9;
      w_vpn   = 8'($urandom_range(0, 3)) + 8'hC8;
      w_pfn   = 8'($urandom);
      #1;
      check_ports();
      checks++;
      if (repl_idx == prev_idx) same_idx++;
      prev_idx = repl_idx;
      if (repl_idx !== 1'(m_ctr)) begin
        failures++;
        $display("FAIL replacement counter %0d expected %0d", repl_idx, m_ctr);
      end
      @(posedge clk);
      // model update at the edge
      if (clear) begin
        for (int i = 0; i < N; i++) m_v[i] = 1'b0;
        clears++;
      end else if (we) begin
        m_v[m_ctr] = 1'b1; m_asid[m_ctr] = w_asid; m_vpn[m_ctr] = w_vpn; m_pfn[m_ctr] = w_pfn;
        wr_slot[m_ctr]++;
        writes++;
      end
      m_lfsr = {m_lfsr[14:0], m_lfsr[15] ^ m_lfsr[13] ^ m_lfsr[12] ^ m_lfsr[10]};
      m_ctr = int'(m_lfsr % N);
      @(negedge clk);
    end

    // reset empties the TLB
    we = 0; clear = 0;
    rst = 1'b1;
    @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < N; i++) m_v[i] = 1'b0;
    m_lfsr = 16'hACE1; m_ctr = int'(m_lfsr % N);
    p1_asid = m_asid[0]; p1_vpn = m_vpn[0];
    #1;
    checks++;
    if (!p1_miss) begin failures++; $display("FAIL: entry survived reset"); end

    checks++;
    if (hits < 50 || misses < 50 || writes < 50 || clears < 1 || wr_slot[0] == 0 || wr_slot[1] == 0 ||
        same_idx < 100) begin
      failures++;
      $display("FAIL: coverage hits=%0d misses=%0d writes=%0d clears=%0d", hits, misses, writes, clears);
    end
    $display("hits=%0d misses=%0d writes=%0d clears=%0d", hits, misses, writes, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
