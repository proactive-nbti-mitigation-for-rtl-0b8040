// nbti_fu: one busy functional unit (reservation station, reorder buffer or
// physical register file) with per-entry proactive NBTI recovery.
//
// The unit's entries are power-gated one by one. When an entry is released
// (idle_detect), the power-down logic either leaves it READY or, when
// enough entries are already ready, pulls its virtual Vdd rail to ground so
// that it recovers while it is idle (INACTIVE); its content is lost, which
// is harmless because the entry is free. The ready entry count tracker
// keeps the number of ready entries; when it falls below THRESH (three
// times the issue width) the wake-up logic powers inactive entries back on
// so that dispatch rarely stalls. The dispatcher takes ready entries in
// round-robin order (rr_allocator). Entering recovery takes 3 cycles and
// leaving it 2 (entry_state_ctrl); going from busy to ready takes none.
// The structure (power-down logic, tracker, wake-up logic with an inactive
// pointer) follows the design; widths, the per-cycle wake-up cap and the
// port lists are this design's own.
//
// Interface:
//   dispatch side  n_req (<= avail) entries are granted this cycle, listed
//                  in gnt_idx[0..n_req-1]; entries become BUSY next cycle.
//   host side      busy_bit (RS/ROB) or rat_ref/consumer/spec (PR, IS_PR=1)
//                  per entry, valid from the cycle after the grant; squash
//                  marks entries released by a mis-speculation.
//   storage        WR_PORTS write and RD_PORTS read ports on the entries.
//   status         ready_cnt, per-entry state, number of entries sent to
//                  recovery (n_pd) and woken (n_woken) this cycle, and
//                  wake_req while the ready count is below THRESH.
module nbti_fu
  import nbti_pkg::*;
#(
  parameter int unsigned N        = 128,
  parameter int unsigned DW       = 64,
  parameter bit          IS_PR    = 1'b0,
  parameter int unsigned W        = ISSUE_W,
  parameter int unsigned THRESH   = READY_THRESH,
  parameter int unsigned MAX_WAKE = ISSUE_W,
  parameter int unsigned RD_PORTS = 4,
  parameter int unsigned WR_PORTS = 2,
  localparam int unsigned IW      = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW      = $clog2(W + 1),
  localparam int unsigned CNTW    = $clog2(N + 1),
  localparam int unsigned WW      = $clog2(MAX_WAKE + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // dispatch
  input  logic [AW-1:0]   n_req,
  output logic [AW-1:0]   avail,
  output logic [IW-1:0]   gnt_idx [W],
  // host pipeline
  input  logic [N-1:0]    busy_bit,
  input  logic [N-1:0]    rat_ref,
  input  logic [N-1:0]    consumer,
  input  logic [N-1:0]    spec,
  input  logic [N-1:0]    squash,
  // storage ports
  input  logic            wr_en   [WR_PORTS],
  input  logic [IW-1:0]   wr_idx  [WR_PORTS],
  input  logic [DW-1:0]   wr_data [WR_PORTS],
  input  logic [IW-1:0]   rd_idx  [RD_PORTS],
  output logic [DW-1:0]   rd_data [RD_PORTS],
  // status
  output logic [CNTW-1:0] ready_cnt,
  output logic [N-1:0]    is_ready,
  output logic [N-1:0]    is_busy,
  output logic [N-1:0]    is_inactive,
  output logic [N-1:0]    rail_up,
  output logic [CNTW-1:0] n_pd,
  output logic [WW-1:0]   n_woken,
  output logic            wake_req
);

  logic [N-1:0]    alloc, dealloc, to_inactive, wake, is_exiting, vdd_en;
  logic [CNTW-1:0] n_to_ready;
  logic [WW-1:0]   wake_n;

  rr_allocator #(.N(N), .W(W)) u_alloc (
    .clk, .rst_n,
    .ready  (is_ready),
    .n_req,
    .avail,
    .gnt    (alloc),
    .gnt_idx
  );

  idle_detect #(.N(N), .IS_PR(IS_PR)) u_idle (
    .entry_busy(is_busy),
    .busy_bit,
    .rat_ref,
    .consumer,
    .spec,
    .dealloc
  );

  power_down_logic #(.N(N), .THRESH(THRESH), .W(W)) u_pd (
    .dealloc,
    .squash,
    .ready_cnt,
    .n_alloc   (n_req),
    .to_inactive,
    .n_to_ready
  );

  ready_count_tracker #(.N(N), .THRESH(THRESH), .W(W), .MAX_WAKE(MAX_WAKE)) u_track (
    .clk, .rst_n,
    .n_alloc   (n_req),
    .n_to_ready,
    .n_woken,
    .ready_cnt,
    .wake_n,
    .below_thresh(wake_req)
  );

  wake_up_logic #(.N(N), .MAX_WAKE(MAX_WAKE)) u_wake (
    .clk, .rst_n,
    .inactive(is_inactive),
    .wake_n,
    .wake,
    .n_woken
  );

  entry_state_ctrl #(.N(N)) u_state (
    .clk, .rst_n,
    .alloc,
    .dealloc,
    .to_inactive,
    .wake,
    .is_ready,
    .is_busy,
    .is_inactive,
    .is_exiting,
    .vdd_en
  );

  vvdd_entry_array #(.N(N), .DW(DW), .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)) u_array (
    .clk, .rst_n,
    .vdd_en,
    .rail_up,
    .wr_en, .wr_idx, .wr_data,
    .rd_idx, .rd_data
  );

  always_comb n_pd = CNTW'($countones(to_inactive & dealloc));

  // The tracker's counter must equal the entries that are ready or waking.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (int'(ready_cnt) == $countones(is_ready | is_exiting))
        else $error("ready count %0d does not match entry states", ready_cnt);
    end
  end

endmodule
