// tb_dispatch_check: random instruction groups and unit availabilities.
// The model admits instructions in order, keeping per-unit use counts,
// and stops at the first one whose ROB, RS or PR need cannot be met.
module tb_dispatch_check;
  localparam int W = 4;
  logic [2:0] n_inst, avail_irs, avail_frs, avail_rob, avail_ipr, avail_fpr;
  logic [W-1:0] is_fp, has_dest;
  logic [2:0] n_disp, req_irs, req_frs, req_rob, req_ipr, req_fpr;
  logic stall;
  logic [2:0] rs_slot [W];
  logic [2:0] pr_slot [W];
  int checks = 0, failures = 0;

  dispatch_check #(.W(W)) dut (
    .n_inst, .is_fp, .has_dest, .avail_irs, .avail_frs, .avail_rob, .avail_ipr, .avail_fpr,
    .n_disp, .stall, .req_irs, .req_frs, .req_rob, .req_ipr, .req_fpr, .rs_slot, .pr_slot);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stalls = 0, full = 0;
    for (int t = 0; t < 3000; t++) begin
      int u [5];   // irs, frs, rob, ipr, fpr
      int av [5];
      int k, rsl [W], prl [W];
      n_inst = 3'($urandom_range(0, W));
      is_fp = W'($urandom); has_dest = W'($urandom);
      avail_irs = 3'($urandom_range(0, W)); avail_frs = 3'($urandom_range(0, W));
      avail_rob = 3'($urandom_range(0, W)); avail_ipr = 3'($urandom_range(0, W));
      avail_fpr = 3'($urandom_range(0, W));
      av = '{int'(avail_irs), int'(avail_frs), int'(avail_rob), int'(avail_ipr), int'(avail_fpr)};
      #1;
      u = '{0, 0, 0, 0, 0};
      k = 0;
      for (int j = 0; j < int'(n_inst); j++) begin
        int rs, pr;
        rs = is_fp[j] ? 1 : 0;
        pr = is_fp[j] ? 4 : 3;
        if (u[2] + 1 > av[2]) break;
        if (u[rs] + 1 > av[rs]) break;
        if (has_dest[j] && u[pr] + 1 > av[pr]) break;
        rsl[j] = u[rs]; prl[j] = u[pr];
        u[2]++; u[rs]++; if (has_dest[j]) u[pr]++;
        k++;
      end
      checks += 7;
      if (int'(n_disp) != k) begin failures++; $display("FAIL n_disp %0d exp %0d", n_disp, k); end
      if (stall != (k < int'(n_inst))) begin failures++; $display("FAIL stall"); end
      if (int'(req_irs) != u[0]) begin failures++; $display("FAIL req_irs"); end
      if (int'(req_frs) != u[1]) begin failures++; $display("FAIL req_frs"); end
      if (int'(req_rob) != u[2]) begin failures++; $display("FAIL req_rob"); end
      if (int'(req_ipr) != u[3]) begin failures++; $display("FAIL req_ipr"); end
      if (int'(req_fpr) != u[4]) begin failures++; $display("FAIL req_fpr"); end
      for (int j = 0; j < k; j++) begin
        checks++;
        if (int'(rs_slot[j]) != rsl[j] || (has_dest[j] && int'(pr_slot[j]) != prl[j])) begin
          failures++; $display("FAIL slot of instruction %0d", j);
        end
      end
      if (k < int'(n_inst)) stalls++;
      if (k == W) full++;
    end
    checks++;
    if (stalls == 0 || full == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
