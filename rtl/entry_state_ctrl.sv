// entry_state_ctrl: the per-entry recovery state machines of one functional
// unit, with the virtual-Vdd enable of every entry.
//
// Each entry moves READY -> BUSY on allocation. On deallocation it returns
// to READY in the next cycle (no overhead), or, when the power-down logic
// sends it to recovery, spends ENTER_LAT-1 = 2 cycles in ENTERING (the
// second cycle of the power-down decision, then one cycle for the rail to
// fall) and lands in INACTIVE three cycles after the deallocation cycle.
// A wake-up command moves INACTIVE -> EXITING for EXIT_LAT-1 = 1 cycle
// (rail rising) and the entry is READY two cycles after the wake-up
// decision cycle. The rail enable `vdd_en` drops for the last VDD_DRIVE_CYC
// cycles of ENTERING and through INACTIVE, and rises again on EXITING.
// These latencies are the design's; the counter-per-entry realisation and
// the synchronous active-low reset to READY are this design's own.
//
// Interface: `alloc`, `dealloc`, `to_inactive` and `wake` are one bit per
// entry, sampled at the rising clock edge. `dealloc` with `to_inactive`
// starts recovery, `dealloc` alone returns the entry to READY.
module entry_state_ctrl
  import nbti_pkg::*;
#(
  parameter int unsigned N = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] alloc,
  input  logic [N-1:0] dealloc,
  input  logic [N-1:0] to_inactive,
  input  logic [N-1:0] wake,
  output logic [N-1:0] is_ready,
  output logic [N-1:0] is_busy,
  output logic [N-1:0] is_inactive,
  output logic [N-1:0] is_exiting,
  output logic [N-1:0] vdd_en
);

  localparam int unsigned ENTER_HOLD = ENTER_LAT - 1;  // cycles in ENTERING
  localparam int unsigned EXIT_HOLD  = EXIT_LAT - 1;   // cycles in EXITING
  localparam int unsigned TW = $clog2(ENTER_HOLD + EXIT_HOLD + 1);

  entry_state_e        state [N];
  logic [TW-1:0]       timer [N];

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < N; i++) begin
      if (!rst_n) begin
        state[i] <= ST_READY;
        timer[i] <= '0;
      end else begin
        unique case (state[i])
          ST_READY:
            if (alloc[i]) state[i] <= ST_BUSY;
          ST_BUSY:
            if (dealloc[i]) begin
              if (to_inactive[i]) begin
                state[i] <= ST_ENTERING;
                timer[i] <= TW'(ENTER_HOLD - 1);
              end else begin
                state[i] <= ST_READY;
              end
            end
          ST_ENTERING:
            if (timer[i] == '0) state[i] <= ST_INACTIVE;
            else                timer[i] <= timer[i] - 1'b1;
          ST_INACTIVE:
            if (wake[i]) begin
              state[i] <= ST_EXITING;
              timer[i] <= TW'(EXIT_HOLD - 1);
            end
          ST_EXITING:
            if (timer[i] == '0) state[i] <= ST_READY;
            else                timer[i] <= timer[i] - 1'b1;
          default: state[i] <= ST_READY;
        endcase
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      is_ready[i]    = (state[i] == ST_READY);
      is_busy[i]     = (state[i] == ST_BUSY);
      is_inactive[i] = (state[i] == ST_INACTIVE);
      is_exiting[i]  = (state[i] == ST_EXITING);
      // The rail is switched off for the last VDD_DRIVE_CYC cycles of
      // ENTERING; it is switched on again as soon as EXITING begins.
      vdd_en[i] = !((state[i] == ST_INACTIVE) ||
                    (state[i] == ST_ENTERING && timer[i] < TW'(VDD_DRIVE_CYC)));
    end
  end

  // Commands must match the entry's current state.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int unsigned i = 0; i < N; i++) begin
        assert (!alloc[i]   || state[i] == ST_READY)
          else $error("entry %0d allocated while not READY", i);
        assert (!dealloc[i] || state[i] == ST_BUSY)
          else $error("entry %0d deallocated while not BUSY", i);
        assert (!wake[i]    || state[i] == ST_INACTIVE)
          else $error("entry %0d woken while not INACTIVE", i);
      end
    end
  end

endmodule
