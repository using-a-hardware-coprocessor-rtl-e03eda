// tb_pscop_top: end-to-end test of the planning scheduler coprocessor at its
// default sizes (8 message slots, 8-bit parameters, 16-EC plans).
//
// The testbench plays the host CPU: it writes message sets through the
// register port, issues RUN (with RESTART for a new set), waits for the
// end-of-plan flag and reads the 16 EC bytes back. Every plan is compared
// with a reference model of the planning scheduler written here in plain
// procedural code: per EC each active message is released when its phase
// counter expires, then pending messages are taken in slot order while their
// C fits in the remaining EC time, and the EC closes at the first one that
// does not fit. The time from the RUN write to the end-of-plan flag is
// checked against sum over ECs of (4 + 2 * accepted) + 2 clocks.
//
// Scenarios: a hand-made set with contention, rejections and carried-over
// requests over several consecutive plans; both SPM banks filled so that a
// third RUN must wait for the CPU to read a plan; parameter writes refused
// while busy; register read-back; and a series of random message sets, in
// which P, Ph, C and the EC length are also rewritten between two plans
// without a RESTART (new P applies at the next reload, Ph only at RESTART).
// Each mechanism is counted and a failure is recorded for one that never
// occurred.
module tb_pscop_top;
  import pscop_pkg::*;

  localparam int N   = PSCOP_N_MSG;
  localparam int NEC = PSCOP_N_EC;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [5:0] cpu_addr = '0;
  logic [7:0] cpu_wdata = '0;
  logic       cpu_wr = 1'b0, cpu_rd = 1'b0;
  logic [7:0] cpu_rdata;
  logic       plan_done, ev_accept, ev_reject, ev_ec_tick;
  logic [3:0] ec_index;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_accept = 0, n_reject = 0, n_contention = 0, n_carry = 0;
  int n_bank_wait = 0, n_locked_ignored = 0, n_restart = 0, n_empty_ec = 0, n_param_change = 0;

  pscop_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (ev_accept) n_accept++;
    if (ev_reject) n_reject++;
    if (dut.chain_en && dut.u_spb.state == SPB_ARB && $countones(dut.mpt_req) >= 2) n_contention++;
  end

  // ---------------- reference model ----------------
  int m_p[N], m_ph[N], m_c[N], m_eclen;
  int m_cnt[N];
  bit m_req[N];

  function automatic void model_restart();
    for (int i = 0; i < N; i++) begin m_cnt[i] = m_ph[i]; m_req[i] = 0; end
  endfunction

  function automatic void model_plan(output logic [7:0] bytes[NEC], output int cycles);
    int rem, a;
    cycles = 0;
    for (int e = 0; e < NEC; e++) begin
      for (int i = 0; i < N; i++) begin
        if (m_p[i] != 0) begin
          if (m_cnt[i] == 0) begin
            if (m_req[i]) n_carry++;
            m_req[i] = 1; m_cnt[i] = m_p[i] - 1;
          end else m_cnt[i]--;
        end
      end
      rem = m_eclen; a = 0; bytes[e] = '0;
      for (int i = 0; i < N; i++) begin
        if (m_req[i]) begin
          if (m_c[i] <= rem) begin
            rem -= m_c[i]; m_req[i] = 0; bytes[e][i] = 1'b1; a++;
          end else break;
        end
      end
      if (bytes[e] == 0) n_empty_ec++;
      cycles += 4 + 2 * a;
    end
  endfunction

  // ---------------- host bus tasks ----------------
  task automatic wr(input logic [5:0] a, input logic [7:0] d);
    @(negedge clk);
    cpu_addr = a; cpu_wdata = d; cpu_wr = 1'b1;
    @(negedge clk);
    cpu_wr = 1'b0;
  endtask

  task automatic rd(input logic [5:0] a, output logic [7:0] d);
    @(negedge clk);
    cpu_addr = a; cpu_rd = 1'b1;
    @(negedge clk);
    cpu_rd = 1'b0;
    d = cpu_rdata;
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_set();
    for (int i = 0; i < N; i++) begin
      wr(6'(4*i + 0), 8'(m_p[i]));
      wr(6'(4*i + 1), 8'(m_ph[i]));
      wr(6'(4*i + 2), 8'(m_c[i]));
    end
    wr(REG_ECLEN, 8'(m_eclen));
  endtask

  // RUN (optionally with RESTART), wait for the done flag, check latency
  task automatic run_plan(input bit restart, input bit check_latency, output int exp_cycles,
                          output logic [7:0] exp[NEC]);
    int n;
    logic [7:0] st;
    if (restart) begin model_restart(); n_restart++; end
    model_plan(exp, exp_cycles);
    @(negedge clk);
    cpu_addr = REG_CTRL; cpu_wdata = {6'd0, restart, 1'b1}; cpu_wr = 1'b1;
    @(posedge clk);
    #1 cpu_wr = 1'b0;
    n = 0;
    do begin
      @(posedge clk); n++;
      #1;
    end while (!plan_done && n < 10000);
    if (check_latency)
      check(n == exp_cycles + 2, $sformatf("latency %0d expected %0d", n, exp_cycles + 2));
    rd(REG_STATUS, st);
    check(st[4] && st[2] && !st[0], $sformatf("status after done %h", st));
  endtask

  task automatic read_plan(input logic [7:0] exp[NEC], input string tag);
    logic [7:0] d;
    for (int e = 0; e < NEC; e++) begin
      rd(REG_PLAN, d);
      check(d == exp[e], $sformatf("%s EC%0d got %h expected %h", tag, e, d, exp[e]));
    end
  endtask

  logic [7:0] exp_a[NEC], exp_b[NEC], exp_c[NEC];
  int cyc;
  logic [7:0] d;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- scenario 1: hand-made set, eight slots with mixed periods ----
    m_p  = '{1, 2, 3, 4, 2, 5, 8, 16};
    m_ph = '{0, 1, 0, 2, 0, 3, 1, 7};
    m_c  = '{20, 30, 25, 40, 35, 10, 50, 5};
    m_eclen = 100;
    load_set();
    // read-back of the parameter registers
    for (int i = 0; i < N; i++) begin
      rd(6'(4*i + 0), d); check(d == 8'(m_p[i]),  "P read-back");
      rd(6'(4*i + 1), d); check(d == 8'(m_ph[i]), "Ph read-back");
      rd(6'(4*i + 2), d); check(d == 8'(m_c[i]),  "C read-back");
    end
    rd(REG_ECLEN, d); check(d == 8'(m_eclen), "ECLEN read-back");
    for (int k = 0; k < 4; k++) begin
      run_plan(k == 0, 1'b1, cyc, exp_a);
      read_plan(exp_a, $sformatf("set1 plan%0d", k));
    end

    // ---- scenario 2: both SPM banks full, third RUN must wait ----
    run_plan(1'b0, 1'b1, cyc, exp_a);   // fills bank 0
    run_plan(1'b0, 1'b1, cyc, exp_b);   // fills bank 1
    rd(REG_STATUS, d);
    check(d[3] == 1'b1 && d[6:5] == 2'd2, $sformatf("SPM full status %h", d));
    wr(REG_CTRL, 8'h01);                 // RUN with no free bank
    repeat (20) @(posedge clk);
    rd(REG_STATUS, d);
    check(d[1] == 1'b1 && d[0] == 1'b0, $sformatf("run must wait, status %h", d));
    if (d[1]) n_bank_wait++;
    // parameter writes are refused while a run is pending
    wr(6'd0, 8'd99);
    rd(6'd0, d);
    check(d == 8'(m_p[0]), "P write refused while locked");
    if (d == 8'(m_p[0])) n_locked_ignored++;
    read_plan(exp_a, "bank0");           // frees bank 0, pending run starts
    model_plan(exp_c, cyc);
    repeat (cyc + 4) @(posedge clk);
    rd(REG_STATUS, d);
    check(d[4] == 1'b1, "pending run completed after bank freed");
    read_plan(exp_b, "bank1");
    read_plan(exp_c, "bank0 again");

    // ---- scenario 3: restart reproduces the first plan ----
    model_restart();
    m_p  = '{1, 1, 1, 1, 1, 1, 1, 1};
    m_ph = '{0, 0, 0, 0, 0, 0, 0, 0};
    m_c  = '{10, 10, 10, 10, 10, 10, 10, 10};
    m_eclen = 45;
    load_set();
    run_plan(1'b1, 1'b1, cyc, exp_a);
    read_plan(exp_a, "overload");

    // ---- scenario 4: random sets ----
    for (int t = 0; t < 12; t++) begin
      for (int i = 0; i < N; i++) begin
        m_p[i]  = ($urandom_range(0, 5) == 0) ? 0 : $urandom_range(1, 20);
        m_ph[i] = $urandom_range(0, 20);
        m_c[i]  = $urandom_range(0, 80);
      end
      m_eclen = $urandom_range(40, 255);
      load_set();
      for (int k = 0; k < 3; k++) begin
        if (k == 2) begin
          // change parameters between plans without RESTART
          for (int i = 0; i < N; i++) begin
            if ($urandom_range(0, 1)) m_p[i] = $urandom_range(0, 20);
            m_ph[i] = $urandom_range(0, 20);
            m_c[i]  = $urandom_range(0, 80);
          end
          m_eclen = $urandom_range(40, 255);
          load_set();
          n_param_change++;
        end
        run_plan(k == 0, 1'b1, cyc, exp_a);
        read_plan(exp_a, $sformatf("random%0d plan%0d", t, k));
      end
    end

    $display("mechanisms: accept=%0d reject=%0d contention=%0d carry=%0d empty_ec=%0d bank_wait=%0d locked=%0d restart=%0d param_change=%0d",
             n_accept, n_reject, n_contention, n_carry, n_empty_ec, n_bank_wait, n_locked_ignored, n_restart, n_param_change);
    check(n_accept > 0, "accept happened");
    check(n_reject > 0, "reject happened");
    check(n_contention > 0, "daisy-chain contention happened");
    check(n_carry > 0, "carried-over request happened");
    check(n_empty_ec > 0, "empty EC happened");
    check(n_bank_wait > 0, "wait for free SPM bank happened");
    check(n_locked_ignored > 0, "locked parameter write happened");
    check(n_restart > 0, "restart happened");
    check(n_param_change > 0, "parameter change between plans happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
