// tb_idle_profiles: how much of a 128-entry buffer's idle time goes to
// recovery, and what it costs in dispatch, for two occupancy profiles.
// Each profile drives two identical streams: one unit with the 12-entry
// threshold and one baseline whose threshold equals the entry count, so
// that it never powers an entry down. Expected: the baseline never
// recovers; recovery stays within idle time; the sparse profile (long idle
// periods) turns a large share of idle time into recovery, the busy
// profile (about a dozen idle cycles at a time, 3-cycle entry and 2-cycle
// exit included) a smaller one; and recovery costs little dispatch
// bandwidth against the baseline.
module tb_idle_profiles;
  logic clk = 0, rst_n;
  longint d [4], s [4], idl [4], ina [4];
  int checks = 0, failures = 0;
  localparam longint CYCLES = 20000;

  rob_host_model #(.THRESH(12),  .PROFILE(0), .SEED(7)) h0 (.clk, .rst_n,
    .dispatched(d[0]), .short_cycles(s[0]), .idle_cycles(idl[0]), .inactive_cycles(ina[0]));
  rob_host_model #(.THRESH(128), .PROFILE(0), .SEED(7)) h1 (.clk, .rst_n,
    .dispatched(d[1]), .short_cycles(s[1]), .idle_cycles(idl[1]), .inactive_cycles(ina[1]));
  rob_host_model #(.THRESH(12),  .PROFILE(1), .SEED(9)) h2 (.clk, .rst_n,
    .dispatched(d[2]), .short_cycles(s[2]), .idle_cycles(idl[2]), .inactive_cycles(ina[2]));
  rob_host_model #(.THRESH(128), .PROFILE(1), .SEED(9)) h3 (.clk, .rst_n,
    .dispatched(d[3]), .short_cycles(s[3]), .idle_cycles(idl[3]), .inactive_cycles(ina[3]));

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    real share0, share2, ipc_loss0, ipc_loss2;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (CYCLES) @(posedge clk);
    for (int k = 0; k < 4; k++)
      $display("unit %0d: dispatched %0d short %0d idle %0d inactive %0d", k, d[k], s[k], idl[k], ina[k]);
    share0 = real'(ina[0]) / real'(idl[0]);
    share2 = real'(ina[2]) / real'(idl[2]);
    ipc_loss0 = 1.0 - real'(d[0]) / real'(d[1]);
    ipc_loss2 = 1.0 - real'(d[2]) / real'(d[3]);
    $display("sparse: idle %0.1f%%, inactive share of idle %0.1f%%, dispatch loss %0.2f%%",
             100.0 * real'(idl[0]) / (128.0 * CYCLES), 100.0 * share0, 100.0 * ipc_loss0);
    $display("busy:   idle %0.1f%%, inactive share of idle %0.1f%%, dispatch loss %0.2f%%",
             100.0 * real'(idl[2]) / (128.0 * CYCLES), 100.0 * share2, 100.0 * ipc_loss2);
    chk(ina[1] == 0 && ina[3] == 0, "baseline entered recovery");
    chk(ina[0] <= idl[0] && ina[2] <= idl[2], "recovery beyond idle time");
    chk(share0 > 0.5, "sparse profile recovers less than half its idle time");
    chk(share2 < share0, "short idle periods recover as much as long ones");
    chk(ina[2] > 0, "busy profile never recovered");
    chk(ipc_loss0 < 0.02 && ipc_loss0 > -0.02, "sparse profile dispatch loss above 2%");
    chk(ipc_loss2 < 0.05 && ipc_loss2 > -0.05, "busy profile dispatch loss above 5%");
    chk(d[0] > 1000 && d[2] > 1000, "too little work dispatched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
