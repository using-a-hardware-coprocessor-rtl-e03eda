// tb_pscop_ccu: self-checking test of the Configuration Control Unit.
//
// Drives the host register port and checks the decoded write strobes for
// every slot and field, the read multiplexer against values supplied by the
// testbench, the run-request handshake with the plan builder, RESTART only
// while idle, the lock on parameter writes while busy, the sticky end-of-plan
// flag and the PLAN read strobe.
module tb_pscop_ccu;
  import pscop_pkg::*;

  localparam int N = 8;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [5:0] cpu_addr = '0;
  logic [7:0] cpu_wdata = '0, cpu_rdata;
  logic       cpu_wr = 0, cpu_rd = 0, plan_done;
  logic [7:0] mpt_wr_p, mpt_wr_ph;
  logic [7:0] cfg_wdata;
  logic [7:0] mpt_p [N];
  logic [7:0] mpt_ph [N];
  logic       restart, spb_c_we, spb_eclen_we;
  logic [2:0] cfg_idx;
  logic [7:0] spb_c_q = '0, spb_eclen_q = 8'h5A;
  logic       run_pending, spb_started = 0, spb_busy = 0, spb_done = 0;
  logic       spm_re;
  logic [7:0] spm_rdata = 8'hC3;
  logic       spm_avail = 1, spm_free = 1;
  logic [1:0] spm_n_full = 2'd1;

  int checks = 0, failures = 0;

  pscop_ccu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // drive a write and check the strobes during the write cycle
  task automatic wr_check(input logic [5:0] a, input logic [7:0] d, input bit locked);
    int s = a[4:2];
    @(negedge clk);
    cpu_addr = a; cpu_wdata = d; cpu_wr = 1; #1;
    if (!a[5]) begin
      check(mpt_wr_p  == ((!locked && a[1:0] == 0) ? 8'(1 << s) : 8'h00), $sformatf("wr_p strobe a=%h", a));
      check(mpt_wr_ph == ((!locked && a[1:0] == 1) ? 8'(1 << s) : 8'h00), $sformatf("wr_ph strobe a=%h", a));
      check(spb_c_we  == (!locked && a[1:0] == 2), $sformatf("c_we strobe a=%h", a));
      check(cfg_idx == 3'(s) && cfg_wdata == d, "index and data");
    end else begin
      check(mpt_wr_p == 0 && mpt_wr_ph == 0 && !spb_c_we, "no slot strobe for control address");
      check(spb_eclen_we == (!locked && a == REG_ECLEN), "eclen strobe");
    end
    @(negedge clk); cpu_wr = 0;
  endtask

  task automatic rd(input logic [5:0] a, output logic [7:0] d);
    @(negedge clk); cpu_addr = a; cpu_rd = 1; #1;
    check(spm_re == (a == REG_PLAN), "plan read strobe");
    @(negedge clk); cpu_rd = 0; d = cpu_rdata;
  endtask

  logic [7:0] d;

  initial begin
    for (int i = 0; i < N; i++) begin mpt_p[i] = 8'(i * 17 + 3); mpt_ph[i] = 8'(i * 5 + 1); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // write decode, unlocked
    for (int a = 0; a < 32; a++) wr_check(6'(a), 8'($urandom), 0);
    wr_check(REG_ECLEN, 8'h40, 0);
    // read-back
    for (int i = 0; i < N; i++) begin
      rd(6'(4*i),     d); check(d == mpt_p[i],  "P read mux");
      rd(6'(4*i + 1), d); check(d == mpt_ph[i], "Ph read mux");
      spb_c_q = 8'(i + 100);
      rd(6'(4*i + 2), d); check(d == 8'(i + 100) && cfg_idx == 3'(i), "C read mux");
      rd(6'(4*i + 3), d); check(d == 0, "reserved reads 0");
    end
    rd(REG_ECLEN, d); check(d == 8'h5A, "ECLEN read");
    rd(REG_PLAN, d);  check(d == 8'hC3, "PLAN read");
    spm_avail = 0;
    rd(REG_PLAN, d);  check(d == 8'h00, "PLAN read empty");
    rd(REG_STATUS, d); check(d == 8'h20, $sformatf("status idle %h", d));
    // RESTART while idle
    @(negedge clk); cpu_addr = REG_CTRL; cpu_wdata = 8'h02; cpu_wr = 1; #1;
    check(restart, "restart pulse"); @(negedge clk); cpu_wr = 0; #1;
    check(!restart && !run_pending, "restart only");
    // RUN: pending until started
    @(negedge clk); cpu_addr = REG_CTRL; cpu_wdata = 8'h03; cpu_wr = 1; #1;
    check(restart, "restart with run"); @(negedge clk); cpu_wr = 0;
    check(run_pending, "run pending");
    rd(REG_STATUS, d); check(d[1], "status shows pending");
    wr_check(6'd4, 8'h11, 1);            // locked while pending
    wr_check(REG_ECLEN, 8'h11, 1);
    @(negedge clk); spb_started = 1; @(negedge clk); spb_started = 0; spb_busy = 1;
    check(!run_pending, "pending cleared by started");
    wr_check(6'd9, 8'h22, 1);            // locked while busy
    @(negedge clk); cpu_addr = REG_CTRL; cpu_wdata = 8'h02; cpu_wr = 1; #1;
    check(!restart, "no restart while busy"); @(negedge clk); cpu_wr = 0;
    @(negedge clk); spb_done = 1; @(negedge clk); spb_done = 0; spb_busy = 0;
    spm_avail = 1; spm_free = 0; spm_n_full = 2'd2;
    check(plan_done, "done flag set");
    rd(REG_STATUS, d); check(d == 8'h5C, $sformatf("status after done %h", d));
    check(!plan_done, "done flag cleared by status read");
    rd(REG_STATUS, d); check(d == 8'h4C, $sformatf("status second read %h", d));
    wr_check(6'd9, 8'h22, 0);            // unlocked again
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
