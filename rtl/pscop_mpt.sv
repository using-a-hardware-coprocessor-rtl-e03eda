// pscop_mpt: Message's Production Timer, one per message slot, plus its cell
// of the priority daisy chain.
//
// The MPT holds the period P and initial phase Ph of one message, both counted
// in elementary cycles (ECs). It keeps an EC down-counter that is loaded with
// Ph on `restart` and steps once per `ec_tick` (the global EC timing sent by
// the Schedule Plan Builder). In the EC where the counter is zero the message
// becomes ready: the MPT raises `req` and reloads the counter with P-1, so the
// message is released in ECs Ph, Ph+P, Ph+2P, ...
//
// Daisy chain: chain_out = chain_in & !req. A slot with a pending request
// therefore blocks every slot after it, and the slot that sees chain_in high
// while requesting is the one selected (`sel`). Only the selected MPT drives
// its slot number onto the shared bus (`bus_id`, zero otherwise, so the bus is
// the OR of all MPTs) and only it reacts to the SPB's `ack`, which clears the
// request. A request that is not served stays pending into later ECs.
//
// Timing: `req` changes on the clock edge that samples `ec_tick` or
// `ack & sel`; chain and bus are combinational from `req`.
//
// The release rule, the daisy chain and its direction follow the source
// description. P = 0 marking an unused slot, the counter reload value and the
// behaviour of a request still pending when the message is released again
// (it stays a single request) are this design's choices.
module pscop_mpt
  import pscop_pkg::*;
#(
  parameter int unsigned PW  = pscop_pkg::PSCOP_PW,
  parameter int unsigned IDW = $clog2(pscop_pkg::PSCOP_N_MSG)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [IDW-1:0] id,        // slot number of this MPT
  // parameter access from the CCU
  input  logic           wr_p,
  input  logic           wr_ph,
  input  logic [PW-1:0]  wdata,
  output logic [PW-1:0]  p_q,
  output logic [PW-1:0]  ph_q,
  // global timing from the SPB
  input  logic           restart,   // reload the phase counter, drop request
  input  logic           ec_tick,   // start of a new EC
  // request / daisy chain / shared bus
  input  logic           chain_in,
  output logic           chain_out,
  input  logic           ack,       // SPB accepted the selected request
  output logic           req,
  output logic           sel,
  output logic [IDW-1:0] bus_id
);

  logic [PW-1:0] cnt;
  logic          active;

  assign active = (p_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_q  <= '0;
      ph_q <= '0;
    end else begin
      if (wr_p)  p_q  <= wdata;
      if (wr_ph) ph_q <= wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      req <= 1'b0;
    end else if (restart) begin
      cnt <= ph_q;
      req <= 1'b0;
    end else if (ec_tick) begin
      if (active) begin
        if (cnt == '0) begin
          req <= 1'b1;
          cnt <= p_q - 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end else if (ack && sel) begin
      req <= 1'b0;
    end
  end

  assign sel       = chain_in & req;
  assign chain_out = chain_in & ~req;
  assign bus_id    = sel ? id : '0;

endmodule
