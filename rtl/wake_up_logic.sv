// wake_up_logic: powers on inactive entries when the ready-entry tracker
// reports a shortfall.
//
// Entries are allocated and released in circular order, so the inactive
// entries form runs in that order. The logic keeps an inactive pointer and
// searches circularly from it for the first `wake_n` inactive entries (at
// most MAX_WAKE per cycle), issues a power-on command to each and moves
// the pointer past the last one woken. When entries go inactive while the
// pointer sits on a non-inactive entry, the search simply skips ahead.
// The search from a pointer follows the design; the single pointer and the
// MAX_WAKE cap are this design's own choices. The decision takes the
// 1 cycle in which `wake` is asserted; the entry's rail rises in the next.
//
// Interface: `inactive` one bit per entry, `wake_n` from the tracker.
// Outputs `wake` (one bit per entry, combinational) and `n_woken`.
module wake_up_logic #(
  parameter int unsigned N        = 128,
  parameter int unsigned MAX_WAKE = 4,
  localparam int unsigned IW      = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned WW      = $clog2(MAX_WAKE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  inactive,
  input  logic [WW-1:0] wake_n,
  output logic [N-1:0]  wake,
  output logic [WW-1:0] n_woken
);

  logic [IW-1:0] ptr;
  logic [WW-1:0] found;
  logic [IW-1:0] idx [MAX_WAKE];

  circ_find_k #(.N(N), .K(MAX_WAKE)) u_find (
    .vec  (inactive),
    .start(ptr),
    .count(found),
    .idx  (idx)
  );

  logic [IW-1:0] last;  // last entry woken this cycle

  always_comb begin
    n_woken = (found < wake_n) ? found : wake_n;
    wake    = '0;
    last    = idx[0];
    for (int unsigned j = 0; j < MAX_WAKE; j++)
      if (WW'(j) < n_woken) begin
        wake[idx[j]] = 1'b1;
        last         = idx[j];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (n_woken != '0) begin
      if (int'(last) == N - 1) ptr <= '0;
      else                     ptr <= last + 1'b1;
    end
  end

endmodule
