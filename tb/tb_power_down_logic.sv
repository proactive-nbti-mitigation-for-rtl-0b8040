// tb_power_down_logic: random deallocations, squashes, ready counts and
// allocations. The expected result is worked out by counting: squashed
// releases always stay ready; of the other releases, the first
// max(0, THRESH - (ready - alloc + squashed)) in index order stay ready and
// the rest go to recovery.
module tb_power_down_logic;
  localparam int N = 16, THRESH = 6, W = 4;
  logic [N-1:0] dealloc, squash, to_inactive;
  logic [4:0]   ready_cnt, n_to_ready;
  logic [2:0]   n_alloc;
  int checks = 0, failures = 0;

  power_down_logic #(.N(N), .THRESH(THRESH), .W(W)) dut (
    .dealloc, .squash, .ready_cnt, .n_alloc, .to_inactive, .n_to_ready);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_inact_seen = 0, n_ready_seen = 0;
    for (int t = 0; t < 2000; t++) begin
      int base, n_sq, quota, seen;
      logic [N-1:0] exp_inact;
      dealloc   = N'($urandom);
      squash    = (t % 4 == 0) ? N'($urandom) : '0;
      n_alloc   = 3'($urandom_range(0, W));
      ready_cnt = 5'($urandom_range(int'(n_alloc), 10));
      #1;
      n_sq = $countones(dealloc & squash);
      base = int'(ready_cnt) - int'(n_alloc) + n_sq;
      quota = (THRESH > base) ? THRESH - base : 0;
      seen = 0;
      exp_inact = '0;
      for (int i = 0; i < N; i++) begin
        if (dealloc[i] && !squash[i]) begin
          if (seen >= quota) exp_inact[i] = 1'b1;
          seen++;
        end
      end
      checks += 2;
      if (to_inactive !== exp_inact) begin
        failures++;
        $display("FAIL to_inactive %h exp %h (dealloc %h squash %h rc %0d al %0d)",
                 to_inactive, exp_inact, dealloc, squash, ready_cnt, n_alloc);
      end
      if (int'(n_to_ready) != $countones(dealloc) - $countones(exp_inact)) begin
        failures++;
        $display("FAIL n_to_ready %0d", n_to_ready);
      end
      n_inact_seen += $countones(exp_inact);
      n_ready_seen += $countones(dealloc) - $countones(exp_inact);
    end
    checks++;
    if (n_inact_seen == 0 || n_ready_seen == 0) begin
      failures++; $display("FAIL stimulus never covered both outcomes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
