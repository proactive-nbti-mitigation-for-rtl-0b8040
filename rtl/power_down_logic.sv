// power_down_logic: decides, for every entry being deallocated this cycle,
// whether it stays READY or is sent into proactive recovery (INACTIVE).
//
// The decision keeps at least THRESH entries ready or on their way to
// ready. Starting from the tracker's count less the entries the dispatcher
// takes this cycle, each deallocated entry is left ready while the running
// count is below THRESH and sent to recovery otherwise. Entries released by
// a mis-speculation squash are always left ready, since the correct path
// will most likely reuse them at once; they are counted first. Entries are
// taken in index order. Combinational; the second cycle of the 2-cycle
// power-down decision is spent by the entry in ENTERING (entry_state_ctrl).
//
// Interface: `dealloc`/`squash` one bit per entry; `ready_cnt` from the
// tracker, `n_alloc` from the allocator. Outputs: per-entry `to_inactive`
// and the number of deallocated entries left ready (`n_to_ready`).
module power_down_logic #(
  parameter int unsigned N      = 128,
  parameter int unsigned THRESH = 12,
  parameter int unsigned W      = 4,
  localparam int unsigned CNTW  = $clog2(N + 1),
  localparam int unsigned AW    = $clog2(W + 1)
) (
  input  logic [N-1:0]    dealloc,
  input  logic [N-1:0]    squash,
  input  logic [CNTW-1:0] ready_cnt,
  input  logic [AW-1:0]   n_alloc,
  output logic [N-1:0]    to_inactive,
  output logic [CNTW-1:0] n_to_ready
);

  always_comb begin
    int unsigned running;
    int unsigned left_ready;
    running    = int'(ready_cnt) - int'(n_alloc);
    left_ready = 0;
    to_inactive = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (dealloc[i] && squash[i]) begin
        running    = running + 1;
        left_ready = left_ready + 1;
      end
    end
    for (int unsigned i = 0; i < N; i++) begin
      if (dealloc[i] && !squash[i]) begin
        if (running < THRESH) begin
          running    = running + 1;
          left_ready = left_ready + 1;
        end else begin
          to_inactive[i] = 1'b1;
        end
      end
    end
    n_to_ready = CNTW'(left_ready);
  end

endmodule
