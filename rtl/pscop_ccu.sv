// pscop_ccu: Configuration Control Unit, the host CPU's view of the
// coprocessor.
//
// A simple synchronous register port: `cpu_wr` with `cpu_addr`/`cpu_wdata`
// writes a register on the clock edge; `cpu_rd` with `cpu_addr` returns the
// register in `cpu_rdata` on the following clock (registered read). The map
// is given in pscop_pkg. The CCU decodes writes into the MPT parameter
// registers (P, Ph), the SPB parameter registers (C, EC length) and the
// control register, and multiplexes them back for reads.
//
// Control: writing CTRL with RUN sets a run request that stays pending until
// the SPB takes it (it waits for a free SPM bank). RESTART, written while the
// coprocessor is idle, reloads every MPT phase counter and empties the SPM;
// written together with RUN it starts a fresh schedule. Parameter writes are
// ignored while a plan is pending or being built, since parameters cannot be
// changed during operation. `plan_done` is the sticky end-of-plan flag
// (STATUS bit 4), cleared by reading STATUS.
//
// That the CCU holds the control and status registers and gives access to
// the MPT and SPB parameters follows the source description; the bus
// protocol, the addresses and the bit assignment are this design's own.
module pscop_ccu
  import pscop_pkg::*;
#(
  parameter int unsigned N_MSG = pscop_pkg::PSCOP_N_MSG,
  parameter int unsigned PW    = pscop_pkg::PSCOP_PW,
  parameter int unsigned AW    = pscop_pkg::PSCOP_AW,
  parameter int unsigned IDW   = $clog2(N_MSG)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host CPU port
  input  logic [AW-1:0]    cpu_addr,
  input  logic [PW-1:0]    cpu_wdata,
  input  logic             cpu_wr,
  input  logic             cpu_rd,
  output logic [PW-1:0]    cpu_rdata,
  output logic             plan_done,
  // MPT parameters
  output logic [N_MSG-1:0] mpt_wr_p,
  output logic [N_MSG-1:0] mpt_wr_ph,
  output logic [PW-1:0]    cfg_wdata,
  input  logic [PW-1:0]    mpt_p  [N_MSG],
  input  logic [PW-1:0]    mpt_ph [N_MSG],
  output logic             restart,
  // SPB parameters and control
  output logic             spb_c_we,
  output logic             spb_eclen_we,
  output logic [IDW-1:0]   cfg_idx,
  input  logic [PW-1:0]    spb_c_q,
  input  logic [PW-1:0]    spb_eclen_q,
  output logic             run_pending,
  input  logic             spb_started,
  input  logic             spb_busy,
  input  logic             spb_done,
  // SPM read side
  output logic             spm_re,
  input  logic [N_MSG-1:0] spm_rdata,
  input  logic             spm_avail,
  input  logic             spm_free,
  input  logic [1:0]       spm_n_full
);

  logic          slot_sel;
  logic [1:0]    field;
  logic          locked;
  logic          ctrl_wr;
  logic [PW-1:0] rd_mux;

  assign slot_sel  = (cpu_addr[AW-1] == 1'b0);
  assign field     = cpu_addr[1:0];
  assign cfg_idx   = cpu_addr[IDW+1:2];
  assign cfg_wdata = cpu_wdata;
  assign locked    = run_pending | spb_busy;
  assign ctrl_wr   = cpu_wr && (cpu_addr == REG_CTRL);

  always_comb begin
    mpt_wr_p  = '0;
    mpt_wr_ph = '0;
    if (cpu_wr && slot_sel && !locked) begin
      mpt_wr_p[cfg_idx]  = (field == FLD_P);
      mpt_wr_ph[cfg_idx] = (field == FLD_PH);
    end
  end

  assign spb_c_we     = cpu_wr && slot_sel && !locked && (field == FLD_C);
  assign spb_eclen_we = cpu_wr && !locked && (cpu_addr == REG_ECLEN);
  assign restart      = ctrl_wr && cpu_wdata[1] && !locked;
  assign spm_re       = cpu_rd && (cpu_addr == REG_PLAN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_pending <= 1'b0;
      plan_done   <= 1'b0;
    end else begin
      if (ctrl_wr && cpu_wdata[0]) run_pending <= 1'b1;
      else if (spb_started)        run_pending <= 1'b0;
      if (spb_done)                                   plan_done <= 1'b1;
      else if (cpu_rd && (cpu_addr == REG_STATUS))    plan_done <= 1'b0;
    end
  end

  always_comb begin
    rd_mux = '0;
    if (slot_sel) begin
      unique case (field)
        FLD_P:   rd_mux = mpt_p[cfg_idx];
        FLD_PH:  rd_mux = mpt_ph[cfg_idx];
        FLD_C:   rd_mux = spb_c_q;
        default: rd_mux = '0;
      endcase
    end else begin
      unique case (cpu_addr)
        REG_STATUS: rd_mux = PW'({spm_n_full, plan_done, ~spm_free, spm_avail, run_pending, spb_busy});
        REG_ECLEN:  rd_mux = spb_eclen_q;
        REG_PLAN:   rd_mux = spm_avail ? PW'(spm_rdata) : '0;
        default:    rd_mux = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cpu_rdata <= '0;
    else if (cpu_rd) cpu_rdata <= rd_mux;
  end

endmodule
