// tb_risc16_memory: self-checking test of the dual-ported physical memory.
//
// Uses the default 64K-word size. Writes random words through the load port
// and through port 2, then reads random addresses through both ports in the
// same cycle and compares with a model. Also checks that a port-2 write is
// visible on port 1 immediately after the clock edge (combinational read) and
// that the load port wins over a simultaneous port-2 write to the same word.
module tb_risc16_memory;
  logic        clk = 1'b0;
  logic [15:0] p1_addr, p2_addr, ld_addr;
  logic [15:0] p1_rdata, p2_rdata, p2_wdata, ld_data;
  logic        p2_we, ld_we;

  risc16_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [15:0] model [int];
  logic [15:0] addrs [256];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p2_we = 0; ld_we = 0; p1_addr = 0; p2_addr = 0; ld_addr = 0; ld_data = 0; p2_wdata = 0;
    for (int i = 0; i < 256; i++) addrs[i] = 16'($urandom);
    // fill through both write ports
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      if (i % 2 == 0) begin
        ld_we = 1; p2_we = 0; ld_addr = addrs[i]; ld_data = 16'($urandom);
        model[int'(addrs[i])] = ld_data;
      end else begin
        ld_we = 0; p2_we = 1; p2_addr = addrs[i]; p2_wdata = 16'($urandom);
        model[int'(addrs[i])] = p2_wdata;
      end
    end
    @(negedge clk); ld_we = 0; p2_we = 0;
    // random dual reads
    for (int i = 0; i < 2000; i++) begin
      p1_addr = addrs[$urandom_range(0, 255)];
      p2_addr = addrs[$urandom_range(0, 255)];
      #1;
      checks += 2;
      if (p1_rdata !== model[int'(p1_addr)]) begin failures++; $display("FAIL p1 %h: %h vs %h", p1_addr, p1_rdata, model[int'(p1_addr)]); end
      if (p2_rdata !== model[int'(p2_addr)]) begin failures++; $display("FAIL p2 %h: %h vs %h", p2_addr, p2_rdata, model[int'(p2_addr)]); end
    end
    // write then read back on the other port at once
    @(negedge clk);
    p2_we = 1; p2_addr = 16'h1234; p2_wdata = 16'hBEEF; p1_addr = 16'h1234;
    @(posedge clk); #1;
    checks++;
    if (p1_rdata !== 16'hBEEF) begin failures++; $display("FAIL: write not visible on port 1"); end
    // load port has priority
    @(negedge clk);
    p2_we = 1; p2_addr = 16'h00AA; p2_wdata = 16'h1111;
    ld_we = 1; ld_addr = 16'h00AA; ld_data = 16'h2222;
    @(negedge clk);
    p2_we = 0; ld_we = 0; p1_addr = 16'h00AA;
    #1;
    checks++;
    if (p1_rdata !== 16'h2222) begin failures++; $display("FAIL: load-port priority %h", p1_rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
