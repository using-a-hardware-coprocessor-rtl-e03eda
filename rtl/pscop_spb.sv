// pscop_spb: Schedule Plan Builder.
//
// On `start` (and only when the SPM has a free bank) the SPB builds one plan
// of N_EC elementary cycles. For every EC it
//   1. pulses `ec_tick`, so that every MPT updates its timer and raises its
//      request if its message is due, and loads the remaining EC time with
//      the EC length register;
//   2. enables the daisy chain and samples, one clock later, whether any
//      request is pending (`chain_ret` low) and which slot won (`bus_id`);
//   3. looks up the winner's transmission time C: if C fits in the remaining
//      time the transaction is accepted (`ack`, bit set in the EC byte, time
//      deducted) and step 2 is repeated; if it does not fit, or no request is
//      pending, the EC is closed;
//   4. writes the EC byte to the SPM.
// After the last EC it commits the bank to the SPM and pulses `done`.
//
// Cycle count: an EC takes 4 + 2*a clocks, a being the number of accepted
// transactions in it. `done` is high in the clock cycle that begins
// sum(4 + 2*a) clock edges after the edge that takes `start` (the edge at
// which `started` is high).
//
// The SPB also holds the per-slot transmission times C (a small register
// array) and the EC length, written through the CCU. The accept/reject rule,
// the closing of an EC on the first rejection and the one extra clock for the
// daisy chain to settle follow the source description; the state sequence
// and the register ports are this design's own.
module pscop_spb
  import pscop_pkg::*;
#(
  parameter int unsigned N_MSG = pscop_pkg::PSCOP_N_MSG,
  parameter int unsigned PW    = pscop_pkg::PSCOP_PW,
  parameter int unsigned N_EC  = pscop_pkg::PSCOP_N_EC,
  parameter int unsigned IDW   = $clog2(N_MSG),
  parameter int unsigned ECW   = $clog2(N_EC)
) (
  input  logic             clk,
  input  logic             rst_n,
  // control
  input  logic             start,     // run request (level)
  output logic             started,   // run request taken (pulse)
  output logic             busy,
  output logic             done,      // plan complete (pulse)
  output logic [ECW-1:0]   ec_idx,    // EC being built
  // parameter registers
  input  logic             cfg_c_we,
  input  logic             cfg_eclen_we,
  input  logic [IDW-1:0]   cfg_idx,
  input  logic [PW-1:0]    cfg_wdata,
  output logic [PW-1:0]    cfg_c_q,
  output logic [PW-1:0]    cfg_eclen_q,
  // MPT side
  output logic             ec_tick,
  output logic             chain_en,
  input  logic             chain_ret,
  input  logic [IDW-1:0]   bus_id,
  output logic             ack,
  // SPM side
  input  logic             spm_free,
  output logic             spm_we,
  output logic [N_MSG-1:0] spm_wdata,
  output logic             spm_commit,
  // event strobes (observation only)
  output logic             ev_accept,
  output logic             ev_reject
);

  spb_state_e state;

  logic [PW-1:0]    c_mem [N_MSG];
  logic [PW-1:0]    ec_len;
  logic [PW-1:0]    rem;
  logic [N_MSG-1:0] ec_byte;
  logic             has_req;
  logic [IDW-1:0]   win_id;
  logic [PW-1:0]    win_c;
  logic             fits;

  // parameter registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_MSG; i++) c_mem[i] <= '0;
      ec_len <= '0;
    end else begin
      if (cfg_c_we)     c_mem[cfg_idx] <= cfg_wdata;
      if (cfg_eclen_we) ec_len         <= cfg_wdata;
    end
  end

  assign cfg_c_q     = c_mem[cfg_idx];
  assign cfg_eclen_q = ec_len;

  assign win_c = c_mem[win_id];
  assign fits  = (win_c <= rem);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= SPB_IDLE;
      ec_idx  <= '0;
      rem     <= '0;
      ec_byte <= '0;
      has_req <= 1'b0;
      win_id  <= '0;
    end else begin
      unique case (state)
        SPB_IDLE: begin
          if (start && spm_free) begin
            ec_idx <= '0;
            state  <= SPB_EC_START;
          end
        end
        SPB_EC_START: begin
          rem     <= ec_len;
          ec_byte <= '0;
          state   <= SPB_ARB;
        end
        SPB_ARB: begin
          has_req <= ~chain_ret;
          win_id  <= bus_id;
          state   <= SPB_CHECK;
        end
        SPB_CHECK: begin
          if (has_req && fits) begin
            rem             <= rem - win_c;
            ec_byte[win_id] <= 1'b1;
            state           <= SPB_ARB;
          end else begin
            state <= SPB_WRITE;
          end
        end
        SPB_WRITE: begin
          if (ec_idx == ECW'(N_EC - 1)) begin
            state <= SPB_DONE;
          end else begin
            ec_idx <= ec_idx + 1'b1;
            state  <= SPB_EC_START;
          end
        end
        SPB_DONE: state <= SPB_IDLE;
        default:  state <= SPB_IDLE;
      endcase
    end
  end

  always_comb begin
    started    = (state == SPB_IDLE) && start && spm_free;
    busy       = (state != SPB_IDLE);
    done       = (state == SPB_DONE);
    ec_tick    = (state == SPB_EC_START);
    chain_en   = (state == SPB_ARB) || (state == SPB_CHECK);
    ack        = (state == SPB_CHECK) && has_req && fits;
    ev_accept  = ack;
    ev_reject  = (state == SPB_CHECK) && has_req && !fits;
    spm_we     = (state == SPB_WRITE);
    spm_wdata  = ec_byte;
    spm_commit = (state == SPB_DONE);
  end

endmodule
