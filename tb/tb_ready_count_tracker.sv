// tb_ready_count_tracker: random allocation, release and wake-up counts
// against a counter model; checks the count after every edge and the
// wake-up request (missing entries below THRESH, capped at MAX_WAKE).
module tb_ready_count_tracker;
  localparam int N = 40, THRESH = 12, W = 4, MAX_WAKE = 4;
  logic clk = 0, rst_n;
  logic [2:0] n_alloc, n_woken, wake_n;
  logic [5:0] n_to_ready, ready_cnt;
  logic below_thresh;
  int checks = 0, failures = 0;
  int model;

  ready_count_tracker #(.N(N), .THRESH(THRESH), .W(W), .MAX_WAKE(MAX_WAKE)) dut (
    .clk, .rst_n, .n_alloc, .n_to_ready, .n_woken, .ready_cnt, .wake_n, .below_thresh);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int woke_seen = 0;
    rst_n = 0; n_alloc = 0; n_to_ready = 0; n_woken = 0;
    @(posedge clk); #1;
    rst_n = 1;
    model = N;
    checks++;
    if (int'(ready_cnt) != N) begin failures++; $display("FAIL reset count %0d", ready_cnt); end
    for (int t = 0; t < 3000; t++) begin
      int proj, exp_wake;
      n_alloc    = 3'($urandom_range(0, (model < W) ? model : W));
      n_to_ready = 6'($urandom_range(0, 3));
      #1;
      proj = model - int'(n_alloc) + int'(n_to_ready);
      exp_wake = (proj < THRESH) ? ((THRESH - proj > MAX_WAKE) ? MAX_WAKE : THRESH - proj) : 0;
      checks += 2;
      if (int'(wake_n) != exp_wake) begin
        failures++; $display("FAIL wake_n %0d exp %0d (count %0d)", wake_n, exp_wake, model);
      end
      if (below_thresh != (proj < THRESH)) begin
        failures++; $display("FAIL below_thresh");
      end
      n_woken = 3'($urandom_range(0, int'(wake_n)));
      if (n_woken != 0) woke_seen++;
      @(posedge clk); #1;
      model = proj + int'(n_woken);
      if (model > N) model = N;  // keep the stimulus physical
      checks++;
      if (int'(ready_cnt) != proj + int'(n_woken)) begin
        failures++; $display("FAIL count %0d exp %0d", ready_cnt, proj + int'(n_woken));
      end
      model = int'(ready_cnt);
      if (model > N - 4) begin
        // drain so that the threshold region is exercised
        n_to_ready = 0;
      end
    end
    checks++;
    if (woke_seen == 0) begin failures++; $display("FAIL no wake-up requested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
