// rr_allocator: hands out ready entries of one functional unit to the
// dispatcher in round-robin order, up to W per cycle.
//
// Round-robin allocation spreads busy time, and so idle time, evenly over
// all entries. The allocator searches circularly from its pointer for the
// first W ready entries and reports how many it found (`avail`); the
// dispatcher then asks for `n_req` <= avail of them, which are granted in
// search order, and the pointer moves past the last one granted. Only
// READY entries are granted: an entry in or leaving recovery must first
// become ready. Round-robin order follows the design; the single pointer
// is this design's own choice.
//
// Timing: `avail`, `gnt` and `gnt_idx` are combinational; the pointer moves
// at the rising edge.
module rr_allocator #(
  parameter int unsigned N  = 128,
  parameter int unsigned W  = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW = $clog2(W + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  ready,
  input  logic [AW-1:0] n_req,
  output logic [AW-1:0] avail,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx [W]
);

  logic [IW-1:0] ptr;

  circ_find_k #(.N(N), .K(W)) u_find (
    .vec  (ready),
    .start(ptr),
    .count(avail),
    .idx  (gnt_idx)
  );

  logic [IW-1:0] last;  // last entry granted this cycle

  always_comb begin
    gnt  = '0;
    last = gnt_idx[0];
    for (int unsigned j = 0; j < W; j++)
      if (AW'(j) < n_req && AW'(j) < avail) begin
        gnt[gnt_idx[j]] = 1'b1;
        last            = gnt_idx[j];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (n_req != '0 && n_req <= avail) begin
      if (int'(last) == N - 1) ptr <= '0;
      else                     ptr <= last + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (n_req <= avail)
      else $error("request for %0d entries with %0d available", n_req, avail);
  end

endmodule
