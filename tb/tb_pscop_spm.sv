// tb_pscop_spm: self-checking test of the two-bank Schedule Plan Memory.
//
// Writes whole plans of random EC bytes, commits them and reads them back,
// checking the order of bytes and plans, the free/avail/n_full flags when
// zero, one and two plans are stored, reads interleaved with the filling of
// the other bank, pops ignored when nothing is stored, and flush.
module tb_pscop_spm;

  localparam int NEC = 16;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       flush = 0, we = 0, commit = 0, re = 0;
  logic [7:0] wdata = '0, rdata;
  logic       free, avail;
  logic [1:0] n_full;

  int checks = 0, failures = 0;

  pscop_spm dut (.*);

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

  logic [7:0] plans[$];   // reference queue of stored bytes

  task automatic write_plan();
    for (int e = 0; e < NEC; e++) begin
      logic [7:0] b = 8'($urandom);
      @(negedge clk); we = 1; wdata = b;
      plans.push_back(b);
      @(negedge clk); we = 0;
    end
    @(negedge clk); commit = 1;
    @(negedge clk); commit = 0;
  endtask

  task automatic read_bytes(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      check(avail, "avail while reading");
      check(rdata == plans[0], $sformatf("read got %h expected %h", rdata, plans[0]));
      void'(plans.pop_front());
      re = 1;
      @(negedge clk); re = 0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(free && !avail && n_full == 0, "empty after reset");
    // pop on empty memory is ignored
    re = 1; @(negedge clk); re = 0;
    for (int r = 0; r < 10; r++) begin
      write_plan();
      check(free && avail && n_full == 1, "one plan stored");
      write_plan();
      check(!free && avail && n_full == 2, "two plans stored");
      read_bytes(5);
      check(!free && n_full == 2, "partly read bank still full");
      read_bytes(NEC - 5);
      check(free && avail && n_full == 1, "first bank freed");
      // refill the freed bank while the other one is being read
      write_plan();
      check(!free && n_full == 2, "refilled");
      read_bytes(2 * NEC);
      check(free && !avail && n_full == 0, "all read");
    end
    write_plan();
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    plans.delete();
    check(free && !avail && n_full == 0, "flush empties");
    write_plan();
    read_bytes(NEC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
