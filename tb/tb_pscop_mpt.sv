// tb_pscop_mpt: self-checking test of one Message's Production Timer.
//
// Loads P and Ph, restarts, then applies EC ticks and compares the request
// line with the release rule "ready in ECs Ph, Ph+P, Ph+2P, ...", computed
// here independently. Between ticks it exercises the daisy-chain cell
// (chain_out = chain_in & !req, sel, bus_id) and checks that an ack clears
// the request only when the MPT holds the chain. P = 0 must never request.
module tb_pscop_mpt;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] id = 3'd5;
  logic       wr_p = 0, wr_ph = 0;
  logic [7:0] wdata = '0, p_q, ph_q;
  logic       restart = 0, ec_tick = 0, chain_in = 0, ack = 0;
  logic       chain_out, req, sel;
  logic [2:0] bus_id;

  int checks = 0, failures = 0;

  pscop_mpt dut (.*);

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

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0;
  endtask

  task automatic load(input int p, input int ph);
    @(negedge clk); wdata = 8'(p); wr_p = 1;
    @(negedge clk); wr_p = 0; wdata = 8'(ph); wr_ph = 1;
    @(negedge clk); wr_ph = 0;
    check(p_q == 8'(p) && ph_q == 8'(ph), "parameter registers");
    pulse(restart);
    check(req == 1'b0, "restart clears request");
  endtask

  // Run n ECs; serve the request in each EC where `serve` says so.
  task automatic run_ecs(input int p, input int ph, input int n, input bit serve_all);
    bit exp_req = 0;
    for (int e = 0; e < n; e++) begin
      pulse(ec_tick);
      if (p != 0 && e >= ph && ((e - ph) % p) == 0) exp_req = 1;
      check(req == exp_req, $sformatf("P=%0d Ph=%0d EC%0d req=%0d expected %0d", p, ph, e, req, exp_req));
      // chain blocked: no selection, ack ignored
      chain_in = 0; #1;
      check(sel == 0 && chain_out == 0 && bus_id == 0, "chain_in low");
      pulse(ack);
      check(req == exp_req, "ack without chain ignored");
      chain_in = 1; #1;
      check(chain_out == !exp_req && sel == exp_req && bus_id == (exp_req ? id : 3'd0), "chain cell");
      if (serve_all || (e % 3 == 0)) begin
        pulse(ack);
        if (exp_req) exp_req = 0;
        check(req == exp_req, "ack with chain clears request");
      end
      chain_in = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(1, 0);  run_ecs(1, 0, 10, 1);
    load(3, 2);  run_ecs(3, 2, 20, 1);
    load(4, 1);  run_ecs(4, 1, 25, 0);   // some requests left pending
    load(0, 0);  run_ecs(0, 0, 8, 1);
    load(255, 7); run_ecs(255, 7, 12, 1);
    load(16, 15); run_ecs(16, 15, 40, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
