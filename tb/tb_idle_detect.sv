// tb_idle_detect: random per-entry inputs for both the RS/ROB form (busy
// bit) and the physical-register form (RAT reference, consumer, branch),
// checked bit by bit against the release rules.
module tb_idle_detect;
  localparam int N = 16;
  logic [N-1:0] entry_busy, busy_bit, rat_ref, consumer, spec;
  logic [N-1:0] dealloc_q, dealloc_pr;
  int checks = 0, failures = 0;

  idle_detect #(.N(N), .IS_PR(1'b0)) dut_q (
    .entry_busy, .busy_bit, .rat_ref, .consumer, .spec, .dealloc(dealloc_q));
  idle_detect #(.N(N), .IS_PR(1'b1)) dut_pr (
    .entry_busy, .busy_bit, .rat_ref, .consumer, .spec, .dealloc(dealloc_pr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      entry_busy = N'($urandom); busy_bit = N'($urandom);
      rat_ref = N'($urandom);    consumer = N'($urandom & $urandom);
      spec = N'($urandom & $urandom & $urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        bit exp_q, exp_pr;
        exp_q  = entry_busy[i] && !busy_bit[i];
        exp_pr = entry_busy[i] && !(rat_ref[i] || consumer[i] || spec[i]);
        checks += 2;
        if (dealloc_q[i] !== exp_q) begin
          failures++; $display("FAIL rs/rob entry %0d got %b exp %b", i, dealloc_q[i], exp_q);
        end
        if (dealloc_pr[i] !== exp_pr) begin
          failures++; $display("FAIL pr entry %0d got %b exp %b", i, dealloc_pr[i], exp_pr);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
