// pscop_spm: Schedule Plan Memory.
//
// Two banks of N_EC bytes, each holding one plan (one byte per elementary
// cycle, bit i set when the transaction of message slot i is placed in that
// EC). The banks form a two-entry queue of plans so that the Schedule Plan
// Builder can fill one bank (plan i+1) while the host CPU still reads the
// other (plan i), the overlap of planning and dispatching of a planning
// scheduler.
//
// Write side (SPB): `we` stores `wdata` at the next address of the write
// bank; `commit` marks that bank full and moves to the other one. `free` is
// high while the write bank is empty.
// Read side (CPU): `rdata` is the head byte of the oldest full bank and is
// valid while `avail` is high; `re` pops it. Popping the last byte empties
// the bank. `flush` discards both banks. All updates happen on the rising
// clock edge; `rdata` is a combinational read.
//
// Two 16-byte FIFO banks follow the source description; the queue discipline
// between them and the flush are this design's choices.
module pscop_spm
  import pscop_pkg::*;
#(
  parameter int unsigned N_MSG = pscop_pkg::PSCOP_N_MSG,
  parameter int unsigned N_EC  = pscop_pkg::PSCOP_N_EC,
  parameter int unsigned ECW   = $clog2(N_EC)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  // write side
  input  logic             we,
  input  logic [N_MSG-1:0] wdata,
  input  logic             commit,
  output logic             free,
  // read side
  input  logic             re,
  output logic [N_MSG-1:0] rdata,
  output logic             avail,
  output logic [1:0]       n_full
);

  logic [N_MSG-1:0] mem [2*N_EC];
  logic [1:0]       full;
  logic             wbank, rbank;
  logic [ECW-1:0]   widx, ridx;

  always_ff @(posedge clk) begin
    if (we) mem[{wbank, widx}] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= '0;
      wbank <= 1'b0;
      rbank <= 1'b0;
      widx  <= '0;
      ridx  <= '0;
    end else if (flush) begin
      full  <= '0;
      wbank <= 1'b0;
      rbank <= 1'b0;
      widx  <= '0;
      ridx  <= '0;
    end else begin
      if (we) widx <= widx + 1'b1;
      if (commit) begin
        full[wbank] <= 1'b1;
        wbank       <= ~wbank;
        widx        <= '0;
      end
      if (re && avail) begin
        if (ridx == ECW'(N_EC - 1)) begin
          full[rbank] <= 1'b0;
          rbank       <= ~rbank;
          ridx        <= '0;
        end else begin
          ridx <= ridx + 1'b1;
        end
      end
    end
  end

  assign free   = ~full[wbank];
  assign avail  = full[rbank];
  assign rdata  = mem[{rbank, ridx}];
  assign n_full = {1'b0, full[0]} + {1'b0, full[1]};

endmodule
