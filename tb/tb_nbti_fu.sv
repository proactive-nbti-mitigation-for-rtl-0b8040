// tb_nbti_fu: one 32-entry unit with threshold 12 and issue width 4, driven
// by a host model that allocates up to 4 entries per cycle, writes each
// new entry, releases it after a random latency and sometimes squashes
// busy entries. Phases without releases (a long cache miss) drain the
// ready pool. Checked independently of the unit:
//   - a release goes to READY next cycle, or is INACTIVE exactly 3 cycles
//     later; an entry woken in cycle t is READY in cycle t+2;
//   - an entry is sent to recovery only if the ready count after this
//     cycle's allocations and the other releases is at least 12, and a
//     squashed entry never is;
//   - the ready count equals ready entries plus those woken last cycle;
//   - when the count is short and inactive entries exist, some are woken;
//   - data written to a busy entry reads back, and an entry that went
//     through recovery reads all ones until written.
module tb_nbti_fu;
  localparam int N = 32, DW = 16, W = 4, THRESH = 12;
  localparam int IW = 5;
  logic clk = 0, rst_n;
  logic [2:0] n_req, avail;
  logic [IW-1:0] gnt_idx [W];
  logic [N-1:0] busy_bit, rat_ref, consumer, spec, squash;
  logic          wr_en   [2];
  logic [IW-1:0] wr_idx  [2];
  logic [DW-1:0] wr_data [2];
  logic [IW-1:0] rd_idx  [4];
  logic [DW-1:0] rd_data [4];
  logic [5:0] ready_cnt, n_pd;
  logic [N-1:0] is_ready, is_busy, is_inactive, rail_up;
  logic [2:0] n_woken;
  logic wake_req;
  int checks = 0, failures = 0;

  nbti_fu #(.N(N), .DW(DW), .IS_PR(1'b0), .W(W), .THRESH(THRESH)) dut (
    .clk, .rst_n, .n_req, .avail, .gnt_idx,
    .busy_bit, .rat_ref, .consumer, .spec, .squash,
    .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data,
    .ready_cnt, .is_ready, .is_busy, .is_inactive, .rail_up, .n_pd, .n_woken, .wake_req);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL cyc: %s", msg); end
  endtask

  int release_at [N];    // remaining busy cycles per entry
  int pd_due [N];        // cycle at which the entry must be INACTIVE, -1 none
  int ready_due [N];     // cycle at which the entry must be READY, -1 none
  logic [DW-1:0] data [N];
  bit written [N];
  bit recovered [N];     // went through recovery since the last write
  bit pending_wr [N];
  bit pending_wr_q [N];

  initial begin
    int cyc;
    int cnt_pd = 0, cnt_wake = 0, cnt_stall = 0, cnt_squash = 0, cnt_flip = 0, cnt_keep = 0;
    int prev_woken;
    logic [N-1:0] prev_inactive;
    bit miss;
    rst_n = 0; n_req = 0; busy_bit = '0; rat_ref = '0; consumer = '0; spec = '0; squash = '0;
    for (int p = 0; p < 2; p++) begin wr_en[p] = 0; wr_idx[p] = 0; wr_data[p] = 0; end
    for (int p = 0; p < 4; p++) rd_idx[p] = 0;
    for (int i = 0; i < N; i++) begin
      release_at[i] = 0; pd_due[i] = -1; ready_due[i] = -1; written[i] = 0; recovered[i] = 0; data[i] = 0;
      pending_wr[i] = 0; pending_wr_q[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prev_woken = 0; prev_inactive = '0;
    for (cyc = 0; cyc < 6000; cyc++) begin
      int want, rel_total, rel_sq, left_ready;
      logic [N-1:0] rel;
      miss = ((cyc / 300) % 3 == 2);  // every third phase: no releases
      // --- checks on the state reached this cycle
      chk(int'(ready_cnt) == $countones(is_ready) + prev_woken, "ready count vs states");
      for (int i = 0; i < N; i++) begin
        if (pd_due[i] == cyc) begin chk(is_inactive[i], "entry not inactive 3 cycles after release"); pd_due[i] = -1; end
        if (ready_due[i] == cyc) begin chk(is_ready[i], "entry not ready 2 cycles after wake-up"); ready_due[i] = -1; end
        if (prev_inactive[i] && !is_inactive[i]) begin
          ready_due[i] = cyc + 1;  // woken in cycle cyc-1
          recovered[i] = 1;
        end
      end
      // --- read back: port 0 a written busy entry, port 1 a recovered ready entry
      rd_idx[0] = 0; rd_idx[1] = 0;
      for (int i = 0; i < N; i++) if (is_busy[i] && written[i]) rd_idx[0] = IW'(i);
      for (int i = 0; i < N; i++) if (is_ready[i] && recovered[i] && rail_up[i]) rd_idx[1] = IW'(i);
      #1;
      if (is_busy[rd_idx[0]] && written[rd_idx[0]]) begin
        chk(rd_data[0] == data[rd_idx[0]], "busy entry lost its data"); cnt_keep++;
      end
      if (is_ready[rd_idx[1]] && recovered[rd_idx[1]] && rail_up[rd_idx[1]]) begin
        chk(rd_data[1] == '1, "recovered entry does not read all ones"); cnt_flip++;
      end
      // --- releases seen by the unit this cycle (busy bit already low)
      rel = is_busy & ~busy_bit;
      rel_total = $countones(rel);
      rel_sq = $countones(rel & squash);
      // --- allocation request
      want = $urandom_range(0, W);
      if (want > int'(avail)) cnt_stall++;
      n_req = 3'((want > int'(avail)) ? avail : want);
      #1;
      left_ready = rel_total - int'(n_pd);
      if (n_pd != 0) begin
        chk(int'(ready_cnt) - int'(n_req) + left_ready >= THRESH, "recovery below threshold");
        cnt_pd++;
      end
      if (wake_req && $countones(is_inactive) > 0) chk(n_woken != 0, "short of ready entries but none woken");
      for (int i = 0; i < N; i++) if (rel[i]) written[i] = 0;
      prev_woken = int'(n_woken);
      if (n_woken != 0) cnt_wake++;
      prev_inactive = is_inactive;
      begin
        int pd_now, gl [W], ng;
        logic [N-1:0] sq_now;
        pd_now = int'(n_pd);
        sq_now = squash;
        ng = int'(n_req);
        for (int j = 0; j < W; j++) gl[j] = int'(gnt_idx[j]);
        @(posedge clk); #1;
        // outcome of this cycle's releases
        for (int i = 0; i < N; i++) begin
          if (rel[i]) begin
            if (sq_now[i]) chk(is_ready[i], "squashed entry not ready");
            if (!is_ready[i]) pd_due[i] = cyc + 3;
          end
        end
        chk($countones(rel & ~is_ready) == pd_now, "recovery count mismatch");
        // host registers: releases, squashes, new grants, writes
        squash = '0;
        wr_en[0] = 0; wr_en[1] = 0;
        for (int i = 0; i < N; i++) begin
          if (busy_bit[i] && !miss) begin
            if (release_at[i] > 0) release_at[i]--;
            else busy_bit[i] = 0;
          end
        end
        if (cyc % 97 == 50) begin
          for (int i = 0; i < N; i++) if (busy_bit[i] && $urandom_range(0, 2) == 0) begin
            busy_bit[i] = 0; squash[i] = 1; cnt_squash++;
          end
        end
        for (int j = 0; j < ng; j++) begin
          int e;
          e = gl[j];
          busy_bit[e] = 1;
          release_at[e] = $urandom_range(0, 12);
          if (j < 2) begin
            wr_en[j] = 1; wr_idx[j] = IW'(e); wr_data[j] = DW'($urandom);
            data[e] = wr_data[j]; written[e] = 0; recovered[e] = 0;
            pending_wr[e] = 1;
          end
        end
      end
      // a write becomes visible after the next edge
      for (int i = 0; i < N; i++) if (pending_wr_q[i]) begin written[i] = 1; pending_wr_q[i] = 0; end
      for (int i = 0; i < N; i++) begin pending_wr_q[i] = pending_wr[i]; pending_wr[i] = 0; end
    end
    $display("power-downs %0d wake-ups %0d stalls %0d squashes %0d flip reads %0d data reads %0d",
             cnt_pd, cnt_wake, cnt_stall, cnt_squash, cnt_flip, cnt_keep);
    chk(cnt_pd > 0, "no entry entered recovery");
    chk(cnt_wake > 0, "no wake-up");
    chk(cnt_stall > 0, "no stall");
    chk(cnt_squash > 0, "no squash");
    chk(cnt_flip > 0, "no recovered entry read");
    chk(cnt_keep > 0, "no busy entry read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
