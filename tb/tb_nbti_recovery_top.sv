// tb_nbti_recovery_top: end-to-end run of the recovery controller for all
// five units at the full configuration (60-entry RS pair, 128-entry ROB,
// two 128-entry register files, threshold 12, issue width 4).
//
// A host model plays the out-of-order core: it offers up to 4 instructions
// a cycle (integer or floating point, with or without a destination),
// keeps dispatched instructions in program order, releases each RS entry
// when its instruction finishes executing, retires up to 4 finished
// instructions a cycle from the ROB head in order, frees a physical
// register once it is unreferenced, has no pending reader and no older
// unresolved branch, and from time to time squashes every instruction
// younger than a mispredicted one. Long-miss phases stop retirement so
// that the units fill up. ROB entries are written at dispatch and read
// back at retirement; entries that come back from recovery are read
// before reuse and must hold all ones.
// Checked: each unit's ready count against its entries, that grants are
// distinct free entries, in-order dispatch, the 3-cycle entry into
// recovery, data integrity, and that power-down, wake-up, dispatch stall,
// squash, release-to-ready and bit flipping each happened.
module tb_nbti_recovery_top;
  import nbti_pkg::*;
  localparam int W = 4, RSN = 60, ROBN = 128, PRN = 128;
  localparam int CYCLES = 20000;

  logic clk = 0, rst_n;
  logic [2:0] n_inst, n_disp;
  logic [W-1:0] is_fp, has_dest;
  logic stall;
  logic [6:0] inst_rob_idx [W];
  logic [5:0] inst_rs_idx  [W];
  logic [6:0] inst_pr_idx  [W];

  logic [RSN-1:0] irs_busy_bit, irs_squash, frs_busy_bit, frs_squash;
  logic [ROBN-1:0] rob_busy_bit, rob_squash;
  logic [PRN-1:0] ipr_rat_ref, ipr_consumer, ipr_spec, ipr_squash;
  logic [PRN-1:0] fpr_rat_ref, fpr_consumer, fpr_spec, fpr_squash;

  logic irs_wr_en [2], frs_wr_en [2], rob_wr_en [2], ipr_wr_en [2], fpr_wr_en [2];
  logic [5:0] irs_wr_idx [2], frs_wr_idx [2];
  logic [6:0] rob_wr_idx [2], ipr_wr_idx [2], fpr_wr_idx [2];
  logic [255:0] irs_wr_data [2], frs_wr_data [2];
  logic [63:0] rob_wr_data [2], ipr_wr_data [2], fpr_wr_data [2];
  logic [5:0] irs_rd_idx [4], frs_rd_idx [4];
  logic [6:0] rob_rd_idx [4], ipr_rd_idx [4], fpr_rd_idx [4];
  logic [255:0] irs_rd_data [4], frs_rd_data [4];
  logic [63:0] rob_rd_data [4], ipr_rd_data [4], fpr_rd_data [4];

  logic [6:0] irs_ready_cnt, frs_ready_cnt, irs_n_pd, frs_n_pd;
  logic [7:0] rob_ready_cnt, ipr_ready_cnt, fpr_ready_cnt, rob_n_pd, ipr_n_pd, fpr_n_pd;
  logic [RSN-1:0] irs_inactive, frs_inactive, irs_rail_up, frs_rail_up;
  logic [ROBN-1:0] rob_inactive, rob_rail_up;
  logic [PRN-1:0] ipr_inactive, fpr_inactive, ipr_rail_up, fpr_rail_up;
  logic [2:0] irs_n_woken, frs_n_woken, rob_n_woken, ipr_n_woken, fpr_n_woken;
  logic irs_wake_req, frs_wake_req, rob_wake_req, ipr_wake_req, fpr_wake_req;

  nbti_recovery_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ---------------- host model state, indexed by ROB entry
  bit        r_valid [ROBN];
  bit        r_fp [ROBN], r_dest [ROBN], r_wr [ROBN];
  int        r_rs [ROBN], r_pr [ROBN], r_done [ROBN];
  logic [63:0] r_data [ROBN];
  int        order [ROBN];     // program order ring of ROB indices
  int        head, count;
  // per physical register release times
  int        ipr_ref_until [PRN], fpr_ref_until [PRN];
  int        ipr_cons_until [PRN], fpr_cons_until [PRN];
  bit        ipr_used [PRN], fpr_used [PRN];
  bit        rob_recovered [ROBN];
  int        rob_pd_due [ROBN];

  // mechanism counters
  int c_pd [5], c_wake [5], c_keep_ready, c_stall, c_partial, c_squash, c_flip, c_retire;

  function automatic bit miss_phase(input int cyc);
    return (cyc % 1500) >= 1100;
  endfunction

  initial begin
    int cyc;
    logic [ROBN-1:0] prev_rob_inactive, rob_busy_before;
    rst_n = 0;
    n_inst = 0; is_fp = '0; has_dest = '0;
    irs_busy_bit = '0; irs_squash = '0; frs_busy_bit = '0; frs_squash = '0;
    rob_busy_bit = '0; rob_squash = '0;
    ipr_rat_ref = '0; ipr_consumer = '0; ipr_spec = '0; ipr_squash = '0;
    fpr_rat_ref = '0; fpr_consumer = '0; fpr_spec = '0; fpr_squash = '0;
    for (int p = 0; p < 2; p++) begin
      irs_wr_en[p] = 0; frs_wr_en[p] = 0; rob_wr_en[p] = 0; ipr_wr_en[p] = 0; fpr_wr_en[p] = 0;
      irs_wr_idx[p] = 0; frs_wr_idx[p] = 0; rob_wr_idx[p] = 0; ipr_wr_idx[p] = 0; fpr_wr_idx[p] = 0;
      irs_wr_data[p] = 0; frs_wr_data[p] = 0; rob_wr_data[p] = 0; ipr_wr_data[p] = 0; fpr_wr_data[p] = 0;
    end
    for (int p = 0; p < 4; p++) begin
      irs_rd_idx[p] = 0; frs_rd_idx[p] = 0; rob_rd_idx[p] = 0; ipr_rd_idx[p] = 0; fpr_rd_idx[p] = 0;
    end
    for (int i = 0; i < ROBN; i++) begin
      r_valid[i] = 0; r_wr[i] = 0; rob_recovered[i] = 0; rob_pd_due[i] = -1;
    end
    for (int i = 0; i < PRN; i++) begin
      ipr_used[i] = 0; fpr_used[i] = 0;
    end
    for (int k = 0; k < 5; k++) begin c_pd[k] = 0; c_wake[k] = 0; end
    c_keep_ready = 0; c_stall = 0; c_partial = 0; c_squash = 0; c_flip = 0; c_retire = 0;
    head = 0; count = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prev_rob_inactive = '0;
    for (cyc = 0; cyc < CYCLES; cyc++) begin
      int nret;
      // ------------- host register updates for this cycle
      irs_squash = '0; frs_squash = '0; rob_squash = '0; ipr_squash = '0; fpr_squash = '0;
      for (int p = 0; p < 2; p++) begin rob_wr_en[p] = 0; irs_wr_en[p] = 0; frs_wr_en[p] = 0; end
      // RS release at the end of execution
      for (int k = 0; k < count; k++) begin
        int e;
        e = order[(head + k) % ROBN];
        if (r_done[e] == cyc) begin
          if (r_fp[e]) frs_busy_bit[r_rs[e]] = 0; else irs_busy_bit[r_rs[e]] = 0;
        end
      end
      // physical registers: readers and RAT references drain over time
      for (int i = 0; i < PRN; i++) begin
        if (ipr_used[i]) begin
          if (ipr_cons_until[i] <= cyc) ipr_consumer[i] = 0;
          if (ipr_ref_until[i] <= cyc) ipr_rat_ref[i] = 0;
          if (!ipr_rat_ref[i] && !ipr_consumer[i] && !ipr_spec[i]) ipr_used[i] = 0;
        end
        if (fpr_used[i]) begin
          if (fpr_cons_until[i] <= cyc) fpr_consumer[i] = 0;
          if (fpr_ref_until[i] <= cyc) fpr_rat_ref[i] = 0;
          if (!fpr_rat_ref[i] && !fpr_consumer[i] && !fpr_spec[i]) fpr_used[i] = 0;
        end
      end
      // in-order retirement, read ROB data back
      nret = 0;
      for (int p = 0; p < 4; p++) rob_rd_idx[p] = 0;
      if (!miss_phase(cyc)) begin
        while (nret < 4 && count > 0 && r_done[order[head]] < cyc) begin
          int e;
          e = order[head];
          rob_rd_idx[nret] = 7'(e);
          nret++;
          head = (head + 1) % ROBN; count--;
        end
      end
      #1;
      for (int p = 0; p < nret; p++) begin
        int e;
        e = int'(rob_rd_idx[p]);
        if (r_wr[e]) chk(rob_rd_data[p] == r_data[e], $sformatf("ROB entry %0d data at retire", e));
        rob_busy_bit[e] = 0;
        r_valid[e] = 0; r_wr[e] = 0;
        c_retire++;
        if (r_dest[e]) begin
          // the register leaves speculation; the RAT drops it later
          if (r_fp[e]) begin fpr_spec[r_pr[e]] = 0; fpr_ref_until[r_pr[e]] = cyc + $urandom_range(0, 40); end
          else         begin ipr_spec[r_pr[e]] = 0; ipr_ref_until[r_pr[e]] = cyc + $urandom_range(0, 40); end
        end
      end
      // occasional misprediction: squash everything younger than a random
      // in-flight instruction
      if (cyc % 211 == 100 && count > 2) begin
        int keep;
        keep = $urandom_range(1, count - 1);
        for (int k = keep; k < count; k++) begin
          int e;
          e = order[(head + k) % ROBN];
          rob_busy_bit[e] = 0; rob_squash[e] = 1; r_valid[e] = 0; r_wr[e] = 0;
          if (r_fp[e]) begin
            if (frs_busy_bit[r_rs[e]]) begin frs_busy_bit[r_rs[e]] = 0; frs_squash[r_rs[e]] = 1; end
          end else begin
            if (irs_busy_bit[r_rs[e]]) begin irs_busy_bit[r_rs[e]] = 0; irs_squash[r_rs[e]] = 1; end
          end
          if (r_dest[e]) begin
            if (r_fp[e]) begin
              fpr_rat_ref[r_pr[e]] = 0; fpr_consumer[r_pr[e]] = 0; fpr_spec[r_pr[e]] = 0;
              fpr_squash[r_pr[e]] = 1; fpr_used[r_pr[e]] = 0;
            end else begin
              ipr_rat_ref[r_pr[e]] = 0; ipr_consumer[r_pr[e]] = 0; ipr_spec[r_pr[e]] = 0;
              ipr_squash[r_pr[e]] = 1; ipr_used[r_pr[e]] = 0;
            end
          end
        end
        count = keep;
        c_squash++;
      end
      #1;
      // ------------- checks on the state of this cycle
      chk(int'(rob_ready_cnt) <= ROBN, "ROB ready count in range");
      for (int i = 0; i < ROBN; i++) begin
        if (rob_pd_due[i] == cyc) begin
          chk(rob_inactive[i], $sformatf("ROB entry %0d not inactive 3 cycles after release", i));
          rob_pd_due[i] = -1;
        end
        if (prev_rob_inactive[i] && !rob_inactive[i]) rob_recovered[i] = 1;
      end
      prev_rob_inactive = rob_inactive;
      // a recovered, powered ROB entry not yet reused reads all ones
      begin
        int pick;
        pick = -1;
        for (int i = 0; i < ROBN; i++) if (rob_recovered[i] && rob_rail_up[i] && !rob_inactive[i] && !r_valid[i]) pick = i;
        if (pick >= 0) begin
          rob_rd_idx[3] = 7'(pick);
          #1;
          chk(rob_rd_data[3] == '1, $sformatf("recovered ROB entry %0d reads %h", pick, rob_rd_data[3]));
          c_flip++;
          rob_recovered[pick] = 0;
        end
      end
      // ------------- dispatch
      if (count <= ROBN - W) n_inst = 3'($urandom_range(0, W));
      else n_inst = 0;
      if ($urandom_range(0, 3) == 0) n_inst = 3'(W);
      is_fp = W'($urandom & $urandom);
      has_dest = W'($urandom | $urandom);
      #1;
      chk(n_disp <= n_inst, "dispatch count");
      if (stall) c_stall++;
      if (stall && n_disp != 0) c_partial++;
      rob_busy_before = rob_busy_bit;
      for (int j = 0; j < int'(n_disp); j++) begin
        int e, rs, pr;
        e = int'(inst_rob_idx[j]); rs = int'(inst_rs_idx[j]); pr = int'(inst_pr_idx[j]);
        chk(!r_valid[e], $sformatf("ROB entry %0d granted while in use", e));
        chk(is_fp[j] ? !frs_busy_bit[rs] : !irs_busy_bit[rs], "RS entry granted while in use");
        if (has_dest[j]) chk(is_fp[j] ? !fpr_used[pr] : !ipr_used[pr], "PR granted while in use");
        r_valid[e] = 1; r_fp[e] = is_fp[j]; r_dest[e] = has_dest[j];
        r_rs[e] = rs; r_pr[e] = pr; r_done[e] = cyc + 1 + $urandom_range(1, 25);
        r_wr[e] = 0;
        rob_recovered[e] = 0;
        order[(head + count) % ROBN] = e; count++;
        if (j < 2) begin
          rob_wr_en[j] = 1; rob_wr_idx[j] = 7'(e); rob_wr_data[j] = {$urandom, $urandom};
          r_data[e] = rob_wr_data[j];
        end
      end
      // ------------- counters of the decisions taken this cycle
      if (irs_n_pd != 0) c_pd[0]++;
      if (frs_n_pd != 0) c_pd[1]++;
      if (rob_n_pd != 0) c_pd[2]++;
      if (ipr_n_pd != 0) c_pd[3]++;
      if (fpr_n_pd != 0) c_pd[4]++;
      if (irs_n_woken != 0) c_wake[0]++;
      if (frs_n_woken != 0) c_wake[1]++;
      if (rob_n_woken != 0) c_wake[2]++;
      if (ipr_n_woken != 0) c_wake[3]++;
      if (fpr_n_woken != 0) c_wake[4]++;
      begin
        int nrel;
        nrel = 0;
        for (int i = 0; i < ROBN; i++)
          if (dut.rob_busy[i] && !rob_busy_bit[i]) nrel++;
        if (nrel > int'(rob_n_pd)) c_keep_ready++;
      end
      begin
        logic [ROBN-1:0] rel;
        rel = dut.rob_busy & ~rob_busy_bit & ~rob_squash;
        @(posedge clk); #1;
        for (int i = 0; i < ROBN; i++)
          if (rel[i] && !dut.rob_ready[i]) rob_pd_due[i] = cyc + 3;
      end
      // entries granted last cycle become busy in the host
      for (int j = 0; j < W; j++) ;
      for (int i = 0; i < ROBN; i++) if (r_valid[i] && !rob_busy_before[i] && !rob_busy_bit[i]) begin
        rob_busy_bit[i] = 1;
        if (r_fp[i]) frs_busy_bit[r_rs[i]] = 1; else irs_busy_bit[r_rs[i]] = 1;
        if (r_dest[i]) begin
          if (r_fp[i]) begin
            fpr_used[r_pr[i]] = 1; fpr_rat_ref[r_pr[i]] = 1; fpr_spec[r_pr[i]] = 1; fpr_consumer[r_pr[i]] = 1;
            fpr_ref_until[r_pr[i]] = 1 << 30; fpr_cons_until[r_pr[i]] = r_done[i] + $urandom_range(0, 10);
          end else begin
            ipr_used[r_pr[i]] = 1; ipr_rat_ref[r_pr[i]] = 1; ipr_spec[r_pr[i]] = 1; ipr_consumer[r_pr[i]] = 1;
            ipr_ref_until[r_pr[i]] = 1 << 30; ipr_cons_until[r_pr[i]] = r_done[i] + $urandom_range(0, 10);
          end
        end
        r_wr[i] = 0;
      end
      // ROB writes issued in the previous cycle are now in the array
      for (int p = 0; p < 2; p++) if (rob_wr_en[p]) r_wr[rob_wr_idx[p]] = 1;
      // ready count consistency, sampled after the edge
      chk(int'(rob_ready_cnt) >= $countones(dut.rob_ready), "ROB ready count covers ready entries");
      chk(int'(ipr_ready_cnt) >= $countones(dut.ipr_ready), "IntPR ready count covers ready entries");
      chk(int'(irs_ready_cnt) >= $countones(dut.irs_ready), "IntRS ready count covers ready entries");
    end
    $display("power-down  irs %0d frs %0d rob %0d ipr %0d fpr %0d", c_pd[0], c_pd[1], c_pd[2], c_pd[3], c_pd[4]);
    $display("wake-up     irs %0d frs %0d rob %0d ipr %0d fpr %0d", c_wake[0], c_wake[1], c_wake[2], c_wake[3], c_wake[4]);
    $display("stalls %0d partial %0d squashes %0d release-to-ready %0d flip reads %0d retired %0d",
             c_stall, c_partial, c_squash, c_keep_ready, c_flip, c_retire);
    for (int k = 0; k < 5; k++) begin
      chk(c_pd[k] > 0, $sformatf("unit %0d never entered recovery", k));
      chk(c_wake[k] > 0, $sformatf("unit %0d never woke an entry", k));
    end
    chk(c_stall > 0, "dispatch never stalled");
    chk(c_partial > 0, "no partial dispatch");
    chk(c_squash > 0, "no squash");
    chk(c_keep_ready > 0, "no release kept ready");
    chk(c_flip > 0, "no recovered entry read");
    chk(c_retire > 1000, "too few instructions retired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
