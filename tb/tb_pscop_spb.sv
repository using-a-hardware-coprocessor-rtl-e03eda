// tb_pscop_spb: self-checking test of the Schedule Plan Builder on its own.
//
// The eight MPTs are replaced by a behavioural model in this testbench: on
// every ec_tick it adds a random set of newly released requests to the
// pending set; the daisy chain (chain_ret, bus_id) is computed from the
// pending set and chain_en; an ack clears the lowest pending slot. A stub
// SPM captures the EC bytes. The bytes, the number of EC bytes, the commit
// pulse and the plan time (sum over ECs of 4 + 2 * accepted clocks from the edge that takes `start` to `done`) are
// compared with an independent model of the allocation rule. The test also
// checks the C and EC-length registers and that a run waits for a free bank.
module tb_pscop_spb;
  import pscop_pkg::*;

  localparam int N = 8, NEC = 16;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       start = 0, started, busy, done;
  logic [3:0] ec_idx;
  logic       cfg_c_we = 0, cfg_eclen_we = 0;
  logic [2:0] cfg_idx = '0;
  logic [7:0] cfg_wdata = '0, cfg_c_q, cfg_eclen_q;
  logic       ec_tick, chain_en, chain_ret, ack;
  logic [2:0] bus_id;
  logic       spm_free = 1, spm_we, spm_commit;
  logic [7:0] spm_wdata;
  logic       ev_accept, ev_reject;

  int checks = 0, failures = 0;

  pscop_spb dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- MPT model ----
  logic [7:0] pend = '0;
  logic [7:0] release_pat [NEC];
  int c_tab[N];
  int eclen;

  always_comb begin
    chain_ret = chain_en;
    bus_id    = '0;
    for (int i = N - 1; i >= 0; i--) if (chain_en && pend[i]) begin bus_id = 3'(i); end
    if (pend != 0) chain_ret = 1'b0;
  end

  always @(posedge clk) begin
    if (ec_tick) pend <= pend | release_pat[ec_idx];
    else if (ack) begin
      for (int i = 0; i < N; i++) if (pend[i]) begin pend[i] <= 1'b0; break; end
    end
  end

  // ---- SPM stub ----
  logic [7:0] got[$];
  int commits = 0;
  always @(posedge clk) begin
    if (spm_we) got.push_back(spm_wdata);
    if (spm_commit) commits++;
  end

  // ---- reference ----
  function automatic void model(output logic [7:0] bytes[NEC], output int cycles);
    logic [7:0] p = '0;
    int rem;
    cycles = 0;
    for (int e = 0; e < NEC; e++) begin
      int a = 0;
      p |= release_pat[e];
      rem = eclen; bytes[e] = '0;
      for (int i = 0; i < N; i++) if (p[i]) begin
        if (c_tab[i] <= rem) begin rem -= c_tab[i]; p[i] = 0; bytes[e][i] = 1; a++; end
        else break;
      end
      cycles += 4 + 2 * a;
    end
  endfunction

  task automatic cfg(input int idx, input bit eclen_w, input int v);
    @(negedge clk);
    cfg_idx = 3'(idx); cfg_wdata = 8'(v); cfg_c_we = !eclen_w; cfg_eclen_we = eclen_w;
    @(negedge clk);
    cfg_c_we = 0; cfg_eclen_we = 0;
  endtask

  logic [7:0] exp[NEC];
  int exp_cyc, n;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int i = 0; i < N; i++) begin
        c_tab[i] = $urandom_range(0, 60);
        cfg(i, 0, c_tab[i]);
      end
      eclen = (t == 0) ? 0 : $urandom_range(0, 200);
      cfg(0, 1, eclen);
      for (int i = 0; i < N; i++) begin
        cfg_idx = 3'(i); #1;
        check(cfg_c_q == 8'(c_tab[i]), "C register");
      end
      check(cfg_eclen_q == 8'(eclen), "EC length register");
      for (int e = 0; e < NEC; e++) release_pat[e] = (t == 1) ? 8'hFF : 8'($urandom);
      pend = '0;
      got.delete();
      commits = 0;
      model(exp, exp_cyc);
      // first hold off with no free bank
      @(negedge clk); spm_free = 0; start = 1;
      repeat (5) @(negedge clk);
      check(!busy && !started, "waits for free bank");
      spm_free = 1; #1;
      check(started, "started when bank free");
      @(posedge clk); #1 start = 0;
      n = 0;
      while (!done && n < 2000) begin @(posedge clk); #1 n++; end
      check(n == exp_cyc, $sformatf("plan time %0d expected %0d", n, exp_cyc));
      @(posedge clk); #1;
      check(got.size() == NEC && commits == 1, $sformatf("bytes %0d commits %0d", got.size(), commits));
      for (int e = 0; e < NEC && e < got.size(); e++)
        check(got[e] == exp[e], $sformatf("t%0d EC%0d got %h expected %h", t, e, got[e], exp[e]));
      check(!busy, "idle after plan");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
