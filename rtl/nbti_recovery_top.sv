// nbti_recovery_top: per-entry proactive NBTI recovery for the five busy
// storage structures of a 4-issue out-of-order core: the integer and
// floating-point reservation stations (60 entries of 256 bits each), the
// reorder buffer (128 x 64 bits) and the integer and floating-point
// physical register files (128 x 64 bits each).
//
// Each structure is an nbti_fu: its free entries are either kept READY or
// power-gated into INACTIVE, where the PMOS transistors of their cells
// recover from NBTI stress, and a ready count of at least READY_THRESH
// (three times the issue width) is maintained by waking entries ahead of
// need. dispatch_check admits each cycle the longest in-order prefix of up
// to ISSUE_W instructions for which a ROB entry, a reservation-station
// entry of the right class and, when the instruction writes a register, a
// physical register of the right class are ready; the rest stall.
// The sizes follow the processor configuration of the design; the
// instruction classes and the port lists are this design's own.
//
// Interface (all synchronous to clk, active-low synchronous reset):
//   dispatch   n_inst/is_fp/has_dest in, n_disp/stall and the entry index
//              each dispatched instruction got in each unit out; the
//              entries are BUSY from the next cycle.
//   per unit   host release signals (busy bits for RS/ROB; RAT reference,
//              pending consumer and unresolved-branch bits for PRs; squash
//              flags), WR_PORTS write and RD_PORTS read ports, and status
//              (ready count, inactive entries, rails, recovery events).
module nbti_recovery_top
  import nbti_pkg::*;
#(
  parameter int unsigned ISSUE_W_P    = ISSUE_W,
  parameter int unsigned THRESH       = READY_THRESH,
  parameter int unsigned RS_ENTRIES   = 60,
  parameter int unsigned ROB_ENTRIES  = 128,
  parameter int unsigned PR_ENTRIES   = 128,
  parameter int unsigned RS_DW        = 256,
  parameter int unsigned ROB_DW       = 64,
  parameter int unsigned PR_DW        = 64,
  parameter int unsigned RD_PORTS     = 4,
  parameter int unsigned WR_PORTS     = 2,
  localparam int unsigned W           = ISSUE_W_P,
  localparam int unsigned AW          = $clog2(W + 1),
  localparam int unsigned WW          = $clog2(W + 1),
  localparam int unsigned RS_IW       = $clog2(RS_ENTRIES),
  localparam int unsigned ROB_IW      = $clog2(ROB_ENTRIES),
  localparam int unsigned PR_IW       = $clog2(PR_ENTRIES),
  localparam int unsigned RS_CW       = $clog2(RS_ENTRIES + 1),
  localparam int unsigned ROB_CW      = $clog2(ROB_ENTRIES + 1),
  localparam int unsigned PR_CW       = $clog2(PR_ENTRIES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // dispatch
  input  logic [AW-1:0]     n_inst,
  input  logic [W-1:0]      is_fp,
  input  logic [W-1:0]      has_dest,
  output logic [AW-1:0]     n_disp,
  output logic              stall,
  output logic [ROB_IW-1:0] inst_rob_idx [W],
  output logic [RS_IW-1:0]  inst_rs_idx  [W],
  output logic [PR_IW-1:0]  inst_pr_idx  [W],
  // integer reservation station
  input  logic [RS_ENTRIES-1:0] irs_busy_bit,
  input  logic [RS_ENTRIES-1:0] irs_squash,
  input  logic           irs_wr_en   [WR_PORTS],
  input  logic [RS_IW-1:0] irs_wr_idx  [WR_PORTS],
  input  logic [RS_DW-1:0] irs_wr_data [WR_PORTS],
  input  logic [RS_IW-1:0] irs_rd_idx  [RD_PORTS],
  output logic [RS_DW-1:0] irs_rd_data [RD_PORTS],
  output logic [RS_CW-1:0] irs_ready_cnt,
  output logic [RS_ENTRIES-1:0] irs_inactive,
  output logic [RS_ENTRIES-1:0] irs_rail_up,
  output logic [RS_CW-1:0] irs_n_pd,
  output logic [WW-1:0]  irs_n_woken,
  output logic           irs_wake_req,
  // floating-point reservation station
  input  logic [RS_ENTRIES-1:0] frs_busy_bit,
  input  logic [RS_ENTRIES-1:0] frs_squash,
  input  logic           frs_wr_en   [WR_PORTS],
  input  logic [RS_IW-1:0] frs_wr_idx  [WR_PORTS],
  input  logic [RS_DW-1:0] frs_wr_data [WR_PORTS],
  input  logic [RS_IW-1:0] frs_rd_idx  [RD_PORTS],
  output logic [RS_DW-1:0] frs_rd_data [RD_PORTS],
  output logic [RS_CW-1:0] frs_ready_cnt,
  output logic [RS_ENTRIES-1:0] frs_inactive,
  output logic [RS_ENTRIES-1:0] frs_rail_up,
  output logic [RS_CW-1:0] frs_n_pd,
  output logic [WW-1:0]  frs_n_woken,
  output logic           frs_wake_req,
  // reorder buffer
  input  logic [ROB_ENTRIES-1:0] rob_busy_bit,
  input  logic [ROB_ENTRIES-1:0] rob_squash,
  input  logic           rob_wr_en   [WR_PORTS],
  input  logic [ROB_IW-1:0] rob_wr_idx  [WR_PORTS],
  input  logic [ROB_DW-1:0] rob_wr_data [WR_PORTS],
  input  logic [ROB_IW-1:0] rob_rd_idx  [RD_PORTS],
  output logic [ROB_DW-1:0] rob_rd_data [RD_PORTS],
  output logic [ROB_CW-1:0] rob_ready_cnt,
  output logic [ROB_ENTRIES-1:0] rob_inactive,
  output logic [ROB_ENTRIES-1:0] rob_rail_up,
  output logic [ROB_CW-1:0] rob_n_pd,
  output logic [WW-1:0]  rob_n_woken,
  output logic           rob_wake_req,
  // integer physical registers
  input  logic [PR_ENTRIES-1:0] ipr_rat_ref,
  input  logic [PR_ENTRIES-1:0] ipr_consumer,
  input  logic [PR_ENTRIES-1:0] ipr_spec,
  input  logic [PR_ENTRIES-1:0] ipr_squash,
  input  logic           ipr_wr_en   [WR_PORTS],
  input  logic [PR_IW-1:0] ipr_wr_idx  [WR_PORTS],
  input  logic [PR_DW-1:0] ipr_wr_data [WR_PORTS],
  input  logic [PR_IW-1:0] ipr_rd_idx  [RD_PORTS],
  output logic [PR_DW-1:0] ipr_rd_data [RD_PORTS],
  output logic [PR_CW-1:0] ipr_ready_cnt,
  output logic [PR_ENTRIES-1:0] ipr_inactive,
  output logic [PR_ENTRIES-1:0] ipr_rail_up,
  output logic [PR_CW-1:0] ipr_n_pd,
  output logic [WW-1:0]  ipr_n_woken,
  output logic           ipr_wake_req,
  // floating-point physical registers
  input  logic [PR_ENTRIES-1:0] fpr_rat_ref,
  input  logic [PR_ENTRIES-1:0] fpr_consumer,
  input  logic [PR_ENTRIES-1:0] fpr_spec,
  input  logic [PR_ENTRIES-1:0] fpr_squash,
  input  logic           fpr_wr_en   [WR_PORTS],
  input  logic [PR_IW-1:0] fpr_wr_idx  [WR_PORTS],
  input  logic [PR_DW-1:0] fpr_wr_data [WR_PORTS],
  input  logic [PR_IW-1:0] fpr_rd_idx  [RD_PORTS],
  output logic [PR_DW-1:0] fpr_rd_data [RD_PORTS],
  output logic [PR_CW-1:0] fpr_ready_cnt,
  output logic [PR_ENTRIES-1:0] fpr_inactive,
  output logic [PR_ENTRIES-1:0] fpr_rail_up,
  output logic [PR_CW-1:0] fpr_n_pd,
  output logic [WW-1:0]  fpr_n_woken,
  output logic           fpr_wake_req
);

  logic [AW-1:0] avail_irs, avail_frs, avail_rob, avail_ipr, avail_fpr;
  logic [AW-1:0] req_irs, req_frs, req_rob, req_ipr, req_fpr;
  logic [AW-1:0] rs_slot [W];
  logic [AW-1:0] pr_slot [W];
  logic [RS_IW-1:0]  gnt_irs [W];
  logic [RS_IW-1:0]  gnt_frs [W];
  logic [ROB_IW-1:0] gnt_rob [W];
  logic [PR_IW-1:0]  gnt_ipr [W];
  logic [PR_IW-1:0]  gnt_fpr [W];
  logic [RS_ENTRIES-1:0]  irs_ready, frs_ready, irs_busy, frs_busy;
  logic [ROB_ENTRIES-1:0] rob_ready, rob_busy;
  logic [PR_ENTRIES-1:0]  ipr_ready, fpr_ready, ipr_busy, fpr_busy;

  dispatch_check #(.W(W)) u_dispatch (
    .n_inst, .is_fp, .has_dest,
    .avail_irs, .avail_frs, .avail_rob, .avail_ipr, .avail_fpr,
    .n_disp, .stall,
    .req_irs, .req_frs, .req_rob, .req_ipr, .req_fpr,
    .rs_slot, .pr_slot
  );

  // Route each dispatched instruction to the grant slots it was given.
  always_comb begin
    for (int unsigned j = 0; j < W; j++) begin
      inst_rob_idx[j] = gnt_rob[j];
      inst_rs_idx[j]  = is_fp[j] ? gnt_frs[rs_slot[j][$clog2(W)-1:0]] : gnt_irs[rs_slot[j][$clog2(W)-1:0]];
      inst_pr_idx[j]  = is_fp[j] ? gnt_fpr[pr_slot[j][$clog2(W)-1:0]] : gnt_ipr[pr_slot[j][$clog2(W)-1:0]];
    end
  end

  nbti_fu #(
    .N(RS_ENTRIES), .DW(RS_DW), .IS_PR(1'b0), .W(W), .THRESH(THRESH), .MAX_WAKE(W),
    .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)
  ) u_irs (
    .clk, .rst_n,
    .n_req    (req_irs),
    .avail    (avail_irs),
    .gnt_idx  (gnt_irs),
    .busy_bit (irs_busy_bit),
    .rat_ref  ('0),
    .consumer ('0),
    .spec     ('0),
    .squash   (irs_squash),
    .wr_en    (irs_wr_en),
    .wr_idx   (irs_wr_idx),
    .wr_data  (irs_wr_data),
    .rd_idx   (irs_rd_idx),
    .rd_data  (irs_rd_data),
    .ready_cnt(irs_ready_cnt),
    .is_ready (irs_ready),
    .is_busy  (irs_busy),
    .is_inactive(irs_inactive),
    .rail_up  (irs_rail_up),
    .n_pd     (irs_n_pd),
    .n_woken  (irs_n_woken),
    .wake_req (irs_wake_req)
  );

  nbti_fu #(
    .N(RS_ENTRIES), .DW(RS_DW), .IS_PR(1'b0), .W(W), .THRESH(THRESH), .MAX_WAKE(W),
    .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)
  ) u_frs (
    .clk, .rst_n,
    .n_req    (req_frs),
    .avail    (avail_frs),
    .gnt_idx  (gnt_frs),
    .busy_bit (frs_busy_bit),
    .rat_ref  ('0),
    .consumer ('0),
    .spec     ('0),
    .squash   (frs_squash),
    .wr_en    (frs_wr_en),
    .wr_idx   (frs_wr_idx),
    .wr_data  (frs_wr_data),
    .rd_idx   (frs_rd_idx),
    .rd_data  (frs_rd_data),
    .ready_cnt(frs_ready_cnt),
    .is_ready (frs_ready),
    .is_busy  (frs_busy),
    .is_inactive(frs_inactive),
    .rail_up  (frs_rail_up),
    .n_pd     (frs_n_pd),
    .n_woken  (frs_n_woken),
    .wake_req (frs_wake_req)
  );

  nbti_fu #(
    .N(ROB_ENTRIES), .DW(ROB_DW), .IS_PR(1'b0), .W(W), .THRESH(THRESH), .MAX_WAKE(W),
    .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)
  ) u_rob (
    .clk, .rst_n,
    .n_req    (req_rob),
    .avail    (avail_rob),
    .gnt_idx  (gnt_rob),
    .busy_bit (rob_busy_bit),
    .rat_ref  ('0),
    .consumer ('0),
    .spec     ('0),
    .squash   (rob_squash),
    .wr_en    (rob_wr_en),
    .wr_idx   (rob_wr_idx),
    .wr_data  (rob_wr_data),
    .rd_idx   (rob_rd_idx),
    .rd_data  (rob_rd_data),
    .ready_cnt(rob_ready_cnt),
    .is_ready (rob_ready),
    .is_busy  (rob_busy),
    .is_inactive(rob_inactive),
    .rail_up  (rob_rail_up),
    .n_pd     (rob_n_pd),
    .n_woken  (rob_n_woken),
    .wake_req (rob_wake_req)
  );

  nbti_fu #(
    .N(PR_ENTRIES), .DW(PR_DW), .IS_PR(1'b1), .W(W), .THRESH(THRESH), .MAX_WAKE(W),
    .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)
  ) u_ipr (
    .clk, .rst_n,
    .n_req    (req_ipr),
    .avail    (avail_ipr),
    .gnt_idx  (gnt_ipr),
    .busy_bit ('0),
    .rat_ref  (ipr_rat_ref),
    .consumer (ipr_consumer),
    .spec     (ipr_spec),
    .squash   (ipr_squash),
    .wr_en    (ipr_wr_en),
    .wr_idx   (ipr_wr_idx),
    .wr_data  (ipr_wr_data),
    .rd_idx   (ipr_rd_idx),
    .rd_data  (ipr_rd_data),
    .ready_cnt(ipr_ready_cnt),
    .is_ready (ipr_ready),
    .is_busy  (ipr_busy),
    .is_inactive(ipr_inactive),
    .rail_up  (ipr_rail_up),
    .n_pd     (ipr_n_pd),
    .n_woken  (ipr_n_woken),
    .wake_req (ipr_wake_req)
  );

  nbti_fu #(
    .N(PR_ENTRIES), .DW(PR_DW), .IS_PR(1'b1), .W(W), .THRESH(THRESH), .MAX_WAKE(W),
    .RD_PORTS(RD_PORTS), .WR_PORTS(WR_PORTS)
  ) u_fpr (
    .clk, .rst_n,
    .n_req    (req_fpr),
    .avail    (avail_fpr),
    .gnt_idx  (gnt_fpr),
    .busy_bit ('0),
    .rat_ref  (fpr_rat_ref),
    .consumer (fpr_consumer),
    .spec     (fpr_spec),
    .squash   (fpr_squash),
    .wr_en    (fpr_wr_en),
    .wr_idx   (fpr_wr_idx),
    .wr_data  (fpr_wr_data),
    .rd_idx   (fpr_rd_idx),
    .rd_data  (fpr_rd_data),
    .ready_cnt(fpr_ready_cnt),
    .is_ready (fpr_ready),
    .is_busy  (fpr_busy),
    .is_inactive(fpr_inactive),
    .rail_up  (fpr_rail_up),
    .n_pd     (fpr_n_pd),
    .n_woken  (fpr_n_woken),
    .wake_req (fpr_wake_req)
  );

endmodule
