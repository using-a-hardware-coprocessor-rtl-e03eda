// pscop_pkg: constants and types shared by the blocks of the planning
// scheduler coprocessor (PSCoP).
//
// The coprocessor builds static schedules ("plans") for a fieldbus arbiter.
// A plan covers N_EC elementary cycles (ECs); each EC schedule is one byte
// with one bit per message slot. The sizes below are those of the reference
// prototype: 8 message slots, 8-bit parameters, 16-EC plans. The register
// map seen by the host CPU is this design's own choice.
package pscop_pkg;

  // Number of message slots (one MPT each). Slot 0 has the highest priority.
  parameter int unsigned PSCOP_N_MSG = 8;
  // Width of the message parameters P, Ph, C and of the EC length.
  parameter int unsigned PSCOP_PW    = 8;
  // ECs per plan (depth of one SPM bank).
  parameter int unsigned PSCOP_N_EC  = 16;

  // Host register map (6-bit byte address).
  //   0x00..0x1F : message slot s at 4*s: +0 period P, +1 phase Ph,
  //                +2 transmission time C, +3 reserved (reads 0)
  //   0x20       : CTRL   (write) bit0 RUN, bit1 RESTART
  //   0x21       : STATUS (read)  bit0 busy, bit1 run pending,
  //                bit2 plan readable, bit3 SPM full, bit4 plan done
  //                (sticky, cleared by reading STATUS), bits 6:5 number of
  //                plans stored in the SPM
  //   0x22       : ECLEN  (read/write) usable time of one EC
  //   0x23       : PLAN   (read) next EC byte of the oldest stored plan
  parameter int unsigned PSCOP_AW = 6;

  typedef enum logic [1:0] {
    FLD_P  = 2'd0,
    FLD_PH = 2'd1,
    FLD_C  = 2'd2,
    FLD_RS = 2'd3
  } slot_field_e;

  typedef enum logic [PSCOP_AW-1:0] {
    REG_CTRL   = 6'h20,
    REG_STATUS = 6'h21,
    REG_ECLEN  = 6'h22,
    REG_PLAN   = 6'h23
  } reg_addr_e;

  // Schedule Plan Builder states.
  typedef enum logic [2:0] {
    SPB_IDLE,
    SPB_EC_START,
    SPB_ARB,
    SPB_CHECK,
    SPB_WRITE,
    SPB_DONE
  } spb_state_e;

endpackage
