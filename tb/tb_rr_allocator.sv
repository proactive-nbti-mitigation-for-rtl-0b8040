// tb_rr_allocator: random ready vectors and requests. The expected grants
// are the first n_req ready entries at or after a model pointer in
// circular order; `avail` is the number of ready entries found, at most W.
module tb_rr_allocator;
  localparam int N = 10, W = 4;
  logic clk = 0, rst_n;
  logic [N-1:0] ready, gnt;
  logic [2:0] n_req, avail;
  logic [3:0] gnt_idx [W];
  int checks = 0, failures = 0;

  rr_allocator #(.N(N), .W(W)) dut (
    .clk, .rst_n, .ready, .n_req, .avail, .gnt, .gnt_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr = 0, wraps = 0;
    rst_n = 0; ready = '0; n_req = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int list [N];
      int nl;
      logic [N-1:0] exp;
      int exp_avail;
      ready = N'($urandom | $urandom);
      nl = 0;
      for (int k = 0; k < N; k++) if (ready[(ptr + k) % N]) begin list[nl] = (ptr + k) % N; nl++; end
      exp_avail = (nl > W) ? W : nl;
      n_req = 3'($urandom_range(0, exp_avail));
      #1;
      exp = '0;
      for (int j = 0; j < int'(n_req); j++) exp[list[j]] = 1'b1;
      checks += 2;
      if (int'(avail) != exp_avail) begin
        failures++; $display("FAIL avail %0d exp %0d", avail, exp_avail);
      end
      if (gnt !== exp) begin
        failures++; $display("FAIL gnt %b exp %b ptr %0d ready %b req %0d", gnt, exp, ptr, ready, n_req);
      end
      for (int j = 0; j < int'(n_req); j++) begin
        checks++;
        if (int'(gnt_idx[j]) != list[j]) begin
          failures++; $display("FAIL gnt_idx[%0d] %0d exp %0d", j, gnt_idx[j], list[j]);
        end
      end
      @(posedge clk); #1;
      if (n_req != 0) begin
        int last;
        last = list[int'(n_req) - 1];
        if (last == N - 1) wraps++;
        ptr = (last + 1) % N;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL pointer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
