// tb_wake_up_logic: random inactive vectors and wake-up requests. A model
// pointer is kept; the expected woken entries are the first
// min(wake_n, inactive found) inactive entries at or after the pointer in
// circular order, and the pointer moves past the last of them.
module tb_wake_up_logic;
  localparam int N = 12, MAX_WAKE = 4;
  logic clk = 0, rst_n;
  logic [N-1:0] inactive, wake;
  logic [2:0] wake_n, n_woken;
  int checks = 0, failures = 0;

  wake_up_logic #(.N(N), .MAX_WAKE(MAX_WAKE)) dut (
    .clk, .rst_n, .inactive, .wake_n, .wake, .n_woken);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr = 0, wraps = 0;
    rst_n = 0; inactive = '0; wake_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] exp;
      int want, got, last;
      inactive = N'($urandom & $urandom);
      wake_n   = 3'($urandom_range(0, MAX_WAKE));
      #1;
      exp = '0; want = int'(wake_n); got = 0; last = -1;
      for (int k = 0; k < N; k++) begin
        int p;
        p = (ptr + k) % N;
        if (inactive[p] && got < want) begin exp[p] = 1'b1; got++; last = p; end
      end
      checks += 2;
      if (wake !== exp) begin
        failures++; $display("FAIL wake %b exp %b ptr %0d inactive %b n %0d", wake, exp, ptr, inactive, wake_n);
      end
      if (int'(n_woken) != got) begin
        failures++; $display("FAIL n_woken %0d exp %0d", n_woken, got);
      end
      @(posedge clk); #1;
      if (last >= 0) begin
        if (last + 1 >= N) wraps++;
        ptr = (last + 1) % N;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL pointer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
