// tb_pscop_table1: plan-build time of the coprocessor for the worst-case
// message sets of the reference prototype's measurements.
//
// Nine message sets with 0 to 8 messages, each with phase 0, period 1 EC and
// a transmission time that lets every message fit in every EC, so that all
// messages are allocated in all 16 ECs. For each set the testbench measures
// the clocks from the RUN write to the end-of-plan flag, checks it against
// 16 * (4 + 2n) + 2, checks every EC byte (the n lowest bits set) and prints
// the time at a 12 MHz clock next to the execution times measured on the
// FPGA prototype (8, 16, 22, 30, 36, 41, 50, 56, 63 us), which this design
// must not exceed.
module tb_pscop_table1;
  import pscop_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [5:0] cpu_addr = '0;
  logic [7:0] cpu_wdata = '0;
  logic       cpu_wr = 1'b0, cpu_rd = 1'b0;
  logic [7:0] cpu_rdata;
  logic       plan_done, ev_accept, ev_reject, ev_ec_tick;
  logic [3:0] ec_index;

  int checks = 0, failures = 0;
  // prototype execution times in microseconds at 12 MHz, 0..8 messages
  int unsigned proto_us[9] = '{8, 16, 22, 30, 36, 41, 50, 56, 63};

  pscop_top dut (.*);

  // 12 MHz clock: period 83.333 ns, modelled as 84 ns
  always #42 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [5:0] a, input logic [7:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_wr = 1'b1;
    @(negedge clk); cpu_wr = 1'b0;
  endtask

  task automatic rd(input logic [5:0] a, output logic [7:0] d);
    @(negedge clk); cpu_addr = a; cpu_rd = 1'b1;
    @(negedge clk); cpu_rd = 1'b0; d = cpu_rdata;
  endtask

  initial begin
    int n_clk, exp_clk;
    logic [7:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wr(REG_ECLEN, 8'd200);
    for (int n = 0; n <= 8; n++) begin
      for (int i = 0; i < 8; i++) begin
        wr(6'(4*i + 0), (i < n) ? 8'd1 : 8'd0);   // P = 1 EC, 0 = unused slot
        wr(6'(4*i + 1), 8'd0);                    // Ph = 0
        wr(6'(4*i + 2), 8'd25);                   // C: 8 * 25 = 200 fits
      end
      @(negedge clk);
      cpu_addr = REG_CTRL; cpu_wdata = 8'h03; cpu_wr = 1'b1;
      @(posedge clk);
      #1 cpu_wr = 1'b0;
      n_clk = 0;
      do begin @(posedge clk); n_clk++; #1; end while (!plan_done && n_clk < 5000);
      exp_clk = 16 * (4 + 2 * n) + 2;
      check(n_clk == exp_clk, $sformatf("%0d messages: %0d clocks, expected %0d", n, n_clk, exp_clk));
      check(n_clk * 1000 <= proto_us[n] * 12000,
            $sformatf("%0d messages: %0d clocks exceed %0d us at 12 MHz", n, n_clk, proto_us[n]));
      $display("messages=%0d clocks=%0d time_at_12MHz=%0d.%02d us prototype=%0d us",
               n, n_clk, n_clk / 12, (n_clk % 12) * 100 / 12, proto_us[n]);
      rd(REG_STATUS, d);
      for (int e = 0; e < 16; e++) begin
        rd(REG_PLAN, d);
        check(d == 8'((1 << n) - 1), $sformatf("%0d messages EC%0d byte %h", n, e, d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
