// ready_count_tracker: counts the entries of one functional unit that are
// ready or already being woken, and tells the wake-up logic how many
// inactive entries it must power on.
//
// The counter is updated when the dispatcher allocates ready entries
// (minus n_alloc), when the power-down logic leaves deallocated entries
// ready (plus n_to_ready) and when the wake-up logic powers entries on
// (plus n_woken). An entry is counted from its wake-up command, not from
// the end of its rail rise, so that the same shortfall is not answered
// twice. When the count after this cycle's allocations and deallocations
// is below THRESH, `wake_n` asks for the missing number, at most MAX_WAKE
// per cycle (this cap is this design's own choice). At reset every entry is
// ready and the counter holds N.
//
// Timing: `wake_n` is combinational from the register and this cycle's
// inputs; `ready_cnt` changes at the rising edge.
module ready_count_tracker #(
  parameter int unsigned N        = 128,
  parameter int unsigned THRESH   = 12,
  parameter int unsigned W        = 4,
  parameter int unsigned MAX_WAKE = 4,
  localparam int unsigned CNTW    = $clog2(N + 1),
  localparam int unsigned AW      = $clog2(W + 1),
  localparam int unsigned WW      = $clog2(MAX_WAKE + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   n_alloc,
  input  logic [CNTW-1:0] n_to_ready,
  input  logic [WW-1:0]   n_woken,
  output logic [CNTW-1:0] ready_cnt,
  output logic [WW-1:0]   wake_n,
  output logic            below_thresh
);

  logic [CNTW:0] projected;

  always_comb begin
    projected    = {1'b0, ready_cnt} - (CNTW+1)'(n_alloc) + (CNTW+1)'(n_to_ready);
    below_thresh = (projected < (CNTW+1)'(THRESH));
    if (!below_thresh)
      wake_n = '0;
    else if ((CNTW+1)'(THRESH) - projected > (CNTW+1)'(MAX_WAKE))
      wake_n = WW'(MAX_WAKE);
    else
      wake_n = WW'((CNTW+1)'(THRESH) - projected);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ready_cnt <= CNTW'(N);
    else        ready_cnt <= CNTW'(projected + (CNTW+1)'(n_woken));
  end

  // The dispatcher can only take entries that are counted.
  always_ff @(posedge clk) begin
    if (rst_n) assert (CNTW'(n_alloc) <= ready_cnt)
      else $error("allocation of %0d exceeds ready count %0d", n_alloc, ready_cnt);
  end

endmodule
