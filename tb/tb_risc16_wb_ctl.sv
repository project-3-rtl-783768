// tb_risc16_wb_ctl: self-checking test of the writeback-stage exception
// controller.
//
// Drives random MEM/WB contents (codes drawn mostly from the classes the
// controller acts on), PSR values and vector-table words, and compares every
// output with expectations written out case by case from the architecture's
// rules: no exception -> ordinary register write; EXC/INT/TRAP -> vector read
// at the code's own address, EPC = PC (exceptions, interrupts replacing a
// fetch) or PC+1 (traps, interrupts raised by an instruction),
// cr3 = 0xC000 | ASID<<8 | VPN on a user miss and = VPN on a kernel miss, PSR
// push; RFE -> jump to the carried target and PSR pop; MODE_HALT/PANIC -> halt;
// MODE_SLEEP -> sleep and continue at PC+1. A watchdog bounds the run.
module tb_risc16_wb_ctl;
  import risc16_pkg::*;

  memwb_t      memwb;
  psr_t        psr;
  logic [15:0] vec_rdata;
  logic        vec_read, flush, pc_load, halt, sleep, rf_we, cr3_we, cr7_we, psr_push, psr_pop;
  logic [15:0] vec_addr, pc_target, rf_wdata, cr3_wdata, cr7_wdata;
  logic [3:0]  panic_code;
  reg_t        rf_wr;

  risc16_wb_ctl dut (.*);

  int checks = 0, failures = 0;
  int seen_none = 0, seen_umiss = 0, seen_kmiss = 0, seen_trap = 0, seen_rfe = 0, seen_halt = 0;
  int seen_sleep = 0, seen_int_fetch = 0;

  task automatic expect_eq(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (exc=%h pc=%h)", what, got, exp, memwb.exc, memwb.pc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [6:0] c;
      logic [7:0] vpn;
      int sel;
      sel = $urandom_range(0, 8);
      case (sel)
        0: c = 7'h00;
        1: c = 7'h51;                               // EXC_TLBUMISS
        2: c = 7'h52;                               // EXC_TLBKMISS
        3: c = 7'h70 | 7'($urandom_range(0, 15));   // traps
        4: c = 7'h30 | 7'($urandom_range(0, 15));   // RFE
        5: c = ($urandom_range(0, 1) == 0) ? 7'h02 : (7'h08 | 7'($urandom_range(0, 7)));
        8: c = 7'h01;                               // MODE_SLEEP
        6: c = 7'h50 | 7'($urandom_range(0, 15));   // other exceptions
        default: c = 7'h60 | 7'($urandom_range(0, 15)); // interrupts
      endcase
      memwb.exc   = c;
      memwb.rt    = 4'($urandom);
      memwb.ifx   = 1'($urandom);
      memwb.pc    = 16'($urandom);
      memwb.wdata = 16'($urandom);
      psr         = psr_t'(16'($urandom));
      vec_rdata   = 16'($urandom);
      #1;
      vpn = memwb.ifx ? memwb.pc[15:8] : memwb.wdata[15:8];
      if (c == 7'h00) begin
        seen_none++;
        expect_eq(16'({flush, pc_load, halt, sleep, cr3_we, cr7_we, psr_push, psr_pop, vec_read}), 16'h0, "quiet controls");
        expect_eq(16'(rf_we), 16'(memwb.rt[2:0] != 0), "rf_we");
        expect_eq(16'(rf_wr), 16'(memwb.rt), "rf_wr");
        expect_eq(rf_wdata, memwb.wdata, "rf_wdata");
      end else begin
        expect_eq(16'(flush), 16'h1, "flush");
        expect_eq(16'(rf_we), 16'h0, "no register write");
        if (c >= 7'h50) begin
          expect_eq(16'({vec_read, pc_load, cr7_we, psr_push, psr_pop, halt}), 16'b111100, "vector controls");
          expect_eq(vec_addr, 16'(c), "vector address = code");
          expect_eq(pc_target, vec_rdata, "PC <- vector");
          expect_eq(16'(sleep), 16'h0, "no sleep");
          if (c[6:4] == 3'b110 && memwb.ifx) seen_int_fetch++;
          expect_eq(cr7_wdata, (c >= 7'h70 || (c[6:4] == 3'b110 && !memwb.ifx)) ?
                               memwb.pc + 16'd1 : memwb.pc, "EPC");
          if (c == 7'h51) begin
            seen_umiss++;
            expect_eq(16'(cr3_we), 16'h1, "cr3_we umiss");
            expect_eq(cr3_wdata, 16'hC000 + (16'(psr.asid) << 8) + 16'(vpn), "cr3 umiss");
          end else if (c == 7'h52) begin
            seen_kmiss++;
            expect_eq(16'(cr3_we), 16'h1, "cr3_we kmiss");
            expect_eq(cr3_wdata, 16'(vpn), "cr3 kmiss");
          end else begin
            if (c >= 7'h70) seen_trap++;
            expect_eq(16'(cr3_we), 16'h0, "no cr3 write");
          end
        end else if (c[6:4] == 3'b011) begin
          seen_rfe++;
          expect_eq(16'({vec_read, pc_load, cr7_we, cr3_we, psr_push, psr_pop, halt}), 16'b0100010, "rfe controls");
          expect_eq(pc_target, memwb.pc, "rfe target");
        end else if (c == 7'h01) begin
          seen_sleep++;
          expect_eq(16'({vec_read, pc_load, cr7_we, cr3_we, psr_push, psr_pop, halt, sleep}), 16'b01000001, "sleep controls");
          expect_eq(pc_target, memwb.pc + 16'd1, "sleep resumes at PC+1");
        end else begin
          seen_halt++;
          expect_eq(16'(sleep), 16'h0, "no sleep on halt");
          expect_eq(16'({vec_read, pc_load, cr7_we, cr3_we, psr_push, psr_pop, halt}), 16'b0000001, "halt controls");
          expect_eq(16'(panic_code), 16'(c[3:0]), "panic code");
        end
      end
    end
    checks++;
    if (seen_none == 0 || seen_umiss == 0 || seen_kmiss == 0 || seen_trap == 0 || seen_rfe == 0 || seen_halt == 0 ||
        seen_sleep == 0 || seen_int_fetch == 0) begin
      failures++; $display("FAIL: coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
