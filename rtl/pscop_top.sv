// pscop_top: Planning Scheduler Coprocessor (PSCoP).
//
// A hardware planning scheduler for the arbiter node of a fieldbus such as
// CAN or WorldFIP. The host CPU writes, for every message slot, its period P,
// initial phase Ph (both in elementary cycles, ECs) and transmission time C,
// plus the usable length of an EC, then issues RUN. The coprocessor builds a
// plan of N_EC EC schedules, one byte per EC, a set bit meaning that the
// message of that slot is to be transmitted in that EC, and raises
// `plan_done`. The CPU reads the plan byte by byte from the PLAN register and
// dispatches it while the coprocessor, after the next RUN, builds the
// following plan into the second memory bank.
//
// Structure (one Message's Production Timer per slot, a Schedule Plan
// Builder, a two-bank Schedule Plan Memory and a Configuration Control Unit):
//
//   SPB --chain_en--> MPT0 --> MPT1 --> ... --> MPT7 --chain_ret--> SPB
//   MPTs --bus_id (wired OR)--> SPB --ack, ec_tick--> MPTs
//   SPB --EC bytes--> SPM --PLAN reads--> CCU <--> host CPU
//
// Priority is fixed by slot: slot 0 wins the daisy chain over slot 7. The
// host port is the CCU's synchronous register port (see pscop_ccu).
// The four block types, their connections (chain from the SPB through MPT0
// to MPT7 and back, a shared bus between MPTs and SPB, the SPM filled by the
// SPB and read by the host) follow the reference design; the single host
// register port, the restart line and the observation outputs are this
// design's own. The
// `ev_*` outputs are one-clock strobes of scheduler events and `ec_index` the EC being built, for
// observation.
module pscop_top
  import pscop_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PSCOP_AW-1:0] cpu_addr,
  input  logic [PSCOP_PW-1:0] cpu_wdata,
  input  logic                cpu_wr,
  input  logic                cpu_rd,
  output logic [PSCOP_PW-1:0] cpu_rdata,
  output logic                plan_done,
  output logic                ev_accept,
  output logic                ev_reject,
  output logic                ev_ec_tick,
  output logic [$clog2(PSCOP_N_EC)-1:0] ec_index
);

  localparam int unsigned N_MSG = PSCOP_N_MSG;
  localparam int unsigned PW    = PSCOP_PW;
  localparam int unsigned N_EC  = PSCOP_N_EC;
  localparam int unsigned IDW   = $clog2(N_MSG);
  localparam int unsigned ECW   = $clog2(N_EC);

  // MPT <-> SPB / CCU wiring
  logic [N_MSG-1:0] mpt_wr_p, mpt_wr_ph;
  logic [PW-1:0]    mpt_p  [N_MSG];
  logic [PW-1:0]    mpt_ph [N_MSG];
  logic [IDW-1:0]   mpt_bus_id [N_MSG];
  logic [N_MSG:0]   chain;
  logic [N_MSG-1:0] mpt_req, mpt_sel;
  logic [IDW-1:0]   bus_id;
  logic [PW-1:0]    cfg_wdata;
  logic [IDW-1:0]   cfg_idx;
  logic             restart;

  // SPB
  logic             ec_tick, chain_en, ack;
  logic             run_pending, spb_started, spb_busy, spb_done;
  logic             spb_c_we, spb_eclen_we;
  logic [PW-1:0]    spb_c_q, spb_eclen_q;
  logic [ECW-1:0]   ec_idx;

  // SPM
  logic             spm_we, spm_commit, spm_free, spm_re, spm_avail;
  logic [N_MSG-1:0] spm_wdata, spm_rdata;
  logic [1:0]       spm_n_full;

  assign chain[0] = chain_en;

  for (genvar i = 0; i < N_MSG; i++) begin : g_mpt
    pscop_mpt u_mpt (
      .clk       (clk),
      .rst_n     (rst_n),
      .id        (IDW'(i)),
      .wr_p      (mpt_wr_p[i]),
      .wr_ph     (mpt_wr_ph[i]),
      .wdata     (cfg_wdata),
      .p_q       (mpt_p[i]),
      .ph_q      (mpt_ph[i]),
      .restart   (restart),
      .ec_tick   (ec_tick),
      .chain_in  (chain[i]),
      .chain_out (chain[i+1]),
      .ack       (ack),
      .req       (mpt_req[i]),
      .sel       (mpt_sel[i]),
      .bus_id    (mpt_bus_id[i])
    );
  end

  // Shared bus: only the selected MPT drives a non-zero value.
  always_comb begin
    bus_id = '0;
    for (int i = 0; i < N_MSG; i++) bus_id |= mpt_bus_id[i];
  end

  pscop_spb u_spb (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (run_pending),
    .started      (spb_started),
    .busy         (spb_busy),
    .done         (spb_done),
    .ec_idx       (ec_idx),
    .cfg_c_we     (spb_c_we),
    .cfg_eclen_we (spb_eclen_we),
    .cfg_idx      (cfg_idx),
    .cfg_wdata    (cfg_wdata),
    .cfg_c_q      (spb_c_q),
    .cfg_eclen_q  (spb_eclen_q),
    .ec_tick      (ec_tick),
    .chain_en     (chain_en),
    .chain_ret    (chain[N_MSG]),
    .bus_id       (bus_id),
    .ack          (ack),
    .spm_free     (spm_free),
    .spm_we       (spm_we),
    .spm_wdata    (spm_wdata),
    .spm_commit   (spm_commit),
    .ev_accept    (ev_accept),
    .ev_reject    (ev_reject)
  );

  pscop_spm u_spm (
    .clk    (clk),
    .rst_n  (rst_n),
    .flush  (restart),
    .we     (spm_we),
    .wdata  (spm_wdata),
    .commit (spm_commit),
    .free   (spm_free),
    .re     (spm_re),
    .rdata  (spm_rdata),
    .avail  (spm_avail),
    .n_full (spm_n_full)
  );

  pscop_ccu u_ccu (
    .clk          (clk),
    .rst_n        (rst_n),
    .cpu_addr     (cpu_addr),
    .cpu_wdata    (cpu_wdata),
    .cpu_wr       (cpu_wr),
    .cpu_rd       (cpu_rd),
    .cpu_rdata    (cpu_rdata),
    .plan_done    (plan_done),
    .mpt_wr_p     (mpt_wr_p),
    .mpt_wr_ph    (mpt_wr_ph),
    .cfg_wdata    (cfg_wdata),
    .mpt_p        (mpt_p),
    .mpt_ph       (mpt_ph),
    .restart      (restart),
    .spb_c_we     (spb_c_we),
    .spb_eclen_we (spb_eclen_we),
    .cfg_idx      (cfg_idx),
    .spb_c_q      (spb_c_q),
    .spb_eclen_q  (spb_eclen_q),
    .run_pending  (run_pending),
    .spb_started  (spb_started),
    .spb_busy     (spb_busy),
    .spb_done     (spb_done),
    .spm_re       (spm_re),
    .spm_rdata    (spm_rdata),
    .spm_avail    (spm_avail),
    .spm_free     (spm_free),
    .spm_n_full   (spm_n_full)
  );

  assign ev_ec_tick = ec_tick;
  assign ec_index   = ec_idx;

  // At most one MPT may hold the chain, and it must be requesting.
  a_one_sel: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(mpt_sel));
  a_sel_req: assert property (@(posedge clk) disable iff (!rst_n) (mpt_sel & ~mpt_req) == '0);
  // An ack is only given while some MPT is selected.
  a_ack_sel: assert property (@(posedge clk) disable iff (!rst_n) ack |-> (mpt_sel != '0));

endmodule
