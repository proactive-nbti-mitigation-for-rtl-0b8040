// tb_entry_state_ctrl: drives legal random commands to 8 entries and checks
// every cycle the entry states and rail enables against a timestamp model:
// an entry sent to recovery in cycle t is INACTIVE from t+3 with its rail
// off from t+2; an entry woken in cycle t is READY from t+2 with its rail
// on from t+1; a release without recovery is READY at t+1.
module tb_entry_state_ctrl;
  localparam int N = 8;
  logic clk = 0, rst_n;
  logic [N-1:0] alloc, dealloc, to_inactive, wake;
  logic [N-1:0] is_ready, is_busy, is_inactive, is_exiting, vdd_en;
  int checks = 0, failures = 0;

  entry_state_ctrl #(.N(N)) dut (
    .clk, .rst_n, .alloc, .dealloc, .to_inactive, .wake,
    .is_ready, .is_busy, .is_inactive, .is_exiting, .vdd_en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: 0 ready, 1 busy, 2 entering, 3 inactive, 4 exiting
  int mstate [N];
  int mstamp [N];   // cycle of the command that started the transition

  initial begin
    int cyc = 0, n_enter = 0, n_exit = 0;
    rst_n = 0; alloc = '0; dealloc = '0; to_inactive = '0; wake = '0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < N; i++) begin mstate[i] = 0; mstamp[i] = 0; end
    for (cyc = 0; cyc < 4000; cyc++) begin
      // check current outputs against the model
      for (int i = 0; i < N; i++) begin
        bit er, eb, ei, ee, ev;
        er = (mstate[i] == 0); eb = (mstate[i] == 1);
        ei = (mstate[i] == 3); ee = (mstate[i] == 4);
        ev = !(mstate[i] == 3 || (mstate[i] == 2 && cyc - mstamp[i] == 2));
        checks++;
        if ({is_ready[i], is_busy[i], is_inactive[i], is_exiting[i], vdd_en[i]} !== {er, eb, ei, ee, ev}) begin
          failures++;
          $display("FAIL cyc %0d entry %0d rbiev=%b%b%b%b%b exp %b%b%b%b%b", cyc, i,
                   is_ready[i], is_busy[i], is_inactive[i], is_exiting[i], vdd_en[i], er, eb, ei, ee, ev);
        end
      end
      // choose legal commands
      alloc = '0; dealloc = '0; to_inactive = '0; wake = '0;
      for (int i = 0; i < N; i++) begin
        case (mstate[i])
          // commands also follow the unit's own state, so that a faulty unit
          // is reported through the checks rather than its assertions
          0: alloc[i] = is_ready[i] && ($urandom_range(0, 3) == 0);
          1: if (is_busy[i] && $urandom_range(0, 3) == 0) begin
               dealloc[i] = 1'b1; to_inactive[i] = $urandom_range(0, 1) == 1;
             end
          3: wake[i] = is_inactive[i] && ($urandom_range(0, 4) == 0);
          default: ;
        endcase
      end
      @(posedge clk); #1;
      // advance the model to cycle cyc+1
      for (int i = 0; i < N; i++) begin
        case (mstate[i])
          0: if (alloc[i]) mstate[i] = 1;
          1: if (dealloc[i]) begin
               if (to_inactive[i]) begin mstate[i] = 2; mstamp[i] = cyc; end
               else mstate[i] = 0;
             end
          2: if (cyc + 1 - mstamp[i] == 3) begin mstate[i] = 3; n_enter++; end
          3: if (wake[i]) begin mstate[i] = 4; mstamp[i] = cyc; end
          4: if (cyc + 1 - mstamp[i] == 2) begin mstate[i] = 0; n_exit++; end
          default: ;
        endcase
      end
    end
    checks++;
    if (n_enter == 0 || n_exit == 0) begin failures++; $display("FAIL no recovery round trip"); end
    $display("recovery entries %0d exits %0d", n_enter, n_exit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
