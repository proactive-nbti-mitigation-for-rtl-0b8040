// idle_detect: finds the deallocation point of every busy entry of one
// functional unit, one AND gate per entry.
//
// For a reservation station or reorder buffer entry the host structure
// keeps a busy bit; the entry is deallocated in the first cycle it is BUSY
// in the recovery controller while its busy bit is clear (the bit is
// cleared after execution for the RS and after commit for the ROB). For a
// physical register (IS_PR = 1) the entry is freed when it is not
// referenced by the register alias table, has no pending consumer and
// there is no unresolved branch older than its last use (speculation bit).
// These conditions are the design's; the one-bit-per-entry form of the
// consumer list and of the speculation mode is this design's own.
//
// Interface: all inputs one bit per entry, from the host pipeline, valid
// from the cycle after the entry was granted. The output is combinational.
module idle_detect #(
  parameter int unsigned N     = 128,
  parameter bit          IS_PR = 1'b0
) (
  input  logic [N-1:0] entry_busy,   // entry is BUSY in the controller
  input  logic [N-1:0] busy_bit,     // RS/ROB busy bit
  input  logic [N-1:0] rat_ref,      // PR: referenced by the RAT
  input  logic [N-1:0] consumer,     // PR: a reader is still pending
  input  logic [N-1:0] spec,         // PR: an unresolved branch protects it
  output logic [N-1:0] dealloc
);

  always_comb begin
    if (IS_PR) dealloc = entry_busy & ~rat_ref & ~consumer & ~spec;
    else       dealloc = entry_busy & ~busy_bit;
  end

endmodule
