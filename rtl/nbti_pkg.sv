// nbti_pkg: types and constants shared by the per-entry proactive NBTI
// recovery controller.
//
// Every storage entry of a busy functional unit (reservation station,
// reorder buffer, physical register file) is in one of three steady states:
// BUSY (allocated to an instruction), READY (free and powered, can be
// allocated at once) or INACTIVE (free, with its virtual Vdd rail pulled to
// ground so that its PMOS transistors recover). Two transient states cover
// the way in and out of recovery. The latencies below are the ones the
// design is built around: a 2-cycle power-down decision, a 1-cycle wake-up
// decision and 1 cycle to drive a rail, giving 3 cycles to enter and 2 to
// leave recovery. Issue width 4 and a ready threshold of three times the
// issue width (12) are the main configuration. The 3-bit state encoding is
// this design's own choice.
package nbti_pkg;

  typedef enum logic [2:0] {
    ST_READY    = 3'd0,  // free, powered, allocatable
    ST_BUSY     = 3'd1,  // allocated to an instruction
    ST_ENTERING = 3'd2,  // power-down decided, rail being pulled down
    ST_INACTIVE = 3'd3,  // rail at ground: proactive recovery
    ST_EXITING  = 3'd4   // woken, rail being driven back up
  } entry_state_e;

  localparam int unsigned ISSUE_W       = 4;
  localparam int unsigned READY_THRESH  = 3 * ISSUE_W;  // 12
  localparam int unsigned PD_DECIDE_CYC = 2;  // power-down decision
  localparam int unsigned WU_DECIDE_CYC = 1;  // wake-up decision
  localparam int unsigned VDD_DRIVE_CYC = 1;  // rail fall or rise at 2 GHz

  // Cycles from the deallocation cycle to INACTIVE, and from the wake-up
  // decision cycle to READY.
  localparam int unsigned ENTER_LAT = PD_DECIDE_CYC + VDD_DRIVE_CYC;  // 3
  localparam int unsigned EXIT_LAT  = WU_DECIDE_CYC + VDD_DRIVE_CYC;  // 2

endpackage
