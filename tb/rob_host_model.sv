// rob_host_model: a reorder-buffer-like unit (nbti_fu at its default
// 128 x 64-bit size) driven by a synthetic instruction stream, for the
// idle-profile testbench. The stream comes from an xorshift generator
// seeded by SEED, so two instances with the same SEED and PROFILE see the
// same offered instructions whatever the unit's threshold.
//   PROFILE 0  sparse front end: 0-2 instructions a cycle, 10-30 cycle
//              latencies; few entries in use, long idle periods.
//   PROFILE 1  busy front end: 2-4 instructions a cycle, 28-30 cycle
//              latencies and a 150-cycle miss every 2048 cycles; about 90
//              entries are in use, each idle for about a dozen cycles at
//              a time, and the buffer runs full behind each miss.
// Instructions retire in order, up to 4 a cycle, once finished. Outputs
// are running totals: dispatched instructions, cycles a dispatch was cut
// short, idle entry-cycles and inactive (recovering) entry-cycles.
module rob_host_model #(
  parameter int unsigned THRESH  = 12,
  parameter int unsigned PROFILE = 0,
  parameter int unsigned SEED    = 1
) (
  input  logic clk,
  input  logic rst_n,
  output longint dispatched,
  output longint short_cycles,
  output longint idle_cycles,
  output longint inactive_cycles
);
  localparam int N = 128, W = 4;
  logic [2:0] n_req, avail;
  logic [6:0] gnt_idx [W];
  logic [N-1:0] busy_bit, squash;
  logic wr_en [2];
  logic [6:0] wr_idx [2];
  logic [63:0] wr_data [2];
  logic [6:0] rd_idx [4];
  logic [63:0] rd_data [4];
  logic [7:0] ready_cnt, n_pd;
  logic [N-1:0] is_ready, is_busy, is_inactive, rail_up;
  logic [2:0] n_woken;
  logic wake_req;

  nbti_fu #(.THRESH(THRESH)) u_fu (
    .clk, .rst_n, .n_req, .avail, .gnt_idx,
    .busy_bit, .rat_ref('0), .consumer('0), .spec('0), .squash,
    .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data,
    .ready_cnt, .is_ready, .is_busy, .is_inactive, .rail_up, .n_pd, .n_woken, .wake_req);

  assign squash = '0;
  assign wr_en = '{1'b0, 1'b0};
  assign wr_idx = '{7'd0, 7'd0};
  assign wr_data = '{64'd0, 64'd0};
  assign rd_idx = '{7'd0, 7'd0, 7'd0, 7'd0};

  logic [31:0] rng;
  int order [N];
  int done_at [N];
  int head, count, cyc, pending;

  function automatic logic [31:0] xorshift(input logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  always @(negedge clk) begin
    if (!rst_n) begin
      rng = SEED; head = 0; count = 0; cyc = 0; pending = 0;
      dispatched = 0; short_cycles = 0; idle_cycles = 0; inactive_cycles = 0;
      busy_bit = '0; n_req = 0;
    end else begin
      int want, ret;
      idle_cycles += N - $countones(is_busy);
      inactive_cycles += $countones(is_inactive);
      // retire in order
      ret = 0;
      while (ret < W && count > 0 && done_at[order[head]] <= cyc) begin
        busy_bit[order[head]] = 1'b0;
        head = (head + 1) % N; count--; ret++;
      end
      // offered instructions accumulate while they cannot dispatch
      rng = xorshift(rng);
      if (PROFILE == 0) pending += int'(rng[1:0] % 3);
      else              pending += 2 + int'(rng[3:2] % 3);
      if (pending > 8) pending = 8;
      want = (pending > W) ? W : pending;
      if (want > N - count) want = N - count;
      n_req = 3'((want > int'(avail)) ? avail : want);
      if (want > int'(avail)) short_cycles++;
      #1;
      for (int j = 0; j < int'(n_req); j++) begin
        int e, lat;
        e = int'(gnt_idx[j]);
        rng = xorshift(rng);
        if (PROFILE == 0) lat = 10 + int'(rng[4:0] % 21);
        else lat = ((cyc % 2048) == 0 && j == 0) ? 150 : 28 + int'(rng[2:0] % 3);
        done_at[e] = cyc + 1 + lat;
        order[(head + count) % N] = e; count++;
      end
      pending -= int'(n_req);
      dispatched += longint'(n_req);
      cyc++;
    end
  end

  // busy bits follow the grants one cycle later
  always @(posedge clk) begin
    if (rst_n) for (int j = 0; j < int'(n_req); j++) busy_bit[gnt_idx[j]] <= 1'b1;
  end
endmodule
