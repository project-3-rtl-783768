// tb_risc16_timer: self-checking testbench for risc16_timer.
//
// Four instances run side by side: the default period (4096) and periods 2, 5
// and 97. Each cycle a behavioural model (a cycle counter that restarts on
// reset) predicts every tick output. Reset is asserted for a random number of
// cycles at random moments (drawn with $urandom) so restarts from any count
// are covered. Coverage requires at least one tick from every instance and a
// reset in the middle of a period. A watchdog bounds the run.
module tb_risc16_timer;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [3:0] tick;

  int checks = 0, failures = 0;
  localparam int P [4] = '{4096, 2, 5, 97};

  risc16_timer                u0 (.clk, .rst, .tick(tick[0]));
  risc16_timer #(.PERIOD(2))  u1 (.clk, .rst, .tick(tick[1]));
  risc16_timer #(.PERIOD(5))  u2 (.clk, .rst, .tick(tick[2]));
  risc16_timer #(.PERIOD(97)) u3 (.clk, .rst, .tick(tick[3]));

  always #5 clk = ~clk;

  int m_cnt [4];
  int n_tick [4];
  int n_midreset = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: the counter value after the most recent clock edge
  always @(posedge clk) begin
    for (int i = 0; i < 4; i++)
      m_cnt[i] = rst ? 0 : (m_cnt[i] == P[i] - 1 ? 0 : m_cnt[i] + 1);
  end

  initial begin
    for (int i = 0; i < 4; i++) begin m_cnt[i] = 0; n_tick[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (tick[i] !== (m_cnt[i] == P[i] - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: cycle %0d instance %0d tick=%b model count=%0d", cyc, i, tick[i], m_cnt[i]);
        end
        if (tick[i]) n_tick[i]++;
      end
      // occasional reset of random length, after the default period has run
      if (cyc > 9000 && $urandom_range(0, 299) == 0) begin
        if (m_cnt[3] != 0) n_midreset++;
        rst = 1'b1;
        repeat ($urandom_range(1, 3)) @(negedge clk);
        rst = 1'b0;
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_tick[i] == 0) begin failures++; $display("FAIL: instance %0d never ticked", i); end
    end
    checks++;
    if (n_midreset == 0) begin failures++; $display("FAIL: no reset in the middle of a period"); end
    $display("ticks: %0d %0d %0d %0d, mid-period resets %0d", n_tick[0], n_tick[1], n_tick[2], n_tick[3], n_midreset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
