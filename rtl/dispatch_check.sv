// dispatch_check: the resource check made before instructions enter the
// out-of-order engine.
//
// An instruction may dispatch only if a ROB entry, an entry of its
// reservation station (integer or floating point) and, when it writes a
// register, a physical register of its class are free and ready. Up to W
// instructions are offered in program order; the check dispatches the
// longest prefix whose needs fit the entries each unit can grant this
// cycle, and stalls the rest without allocating anything for them. It
// also tells each instruction which grant slot of each unit it gets (the
// number of earlier dispatched instructions that use that unit). The three
// conditions follow the design; the in-order prefix rule and the
// instruction classes (is_fp, has_dest) are this design's own.
//
// Combinational.
module dispatch_check #(
  parameter int unsigned W  = 4,
  localparam int unsigned AW = $clog2(W + 1)
) (
  input  logic [AW-1:0] n_inst,      // instructions offered this cycle
  input  logic [W-1:0]  is_fp,
  input  logic [W-1:0]  has_dest,
  input  logic [AW-1:0] avail_irs,
  input  logic [AW-1:0] avail_frs,
  input  logic [AW-1:0] avail_rob,
  input  logic [AW-1:0] avail_ipr,
  input  logic [AW-1:0] avail_fpr,
  output logic [AW-1:0] n_disp,
  output logic          stall,
  output logic [AW-1:0] req_irs,
  output logic [AW-1:0] req_frs,
  output logic [AW-1:0] req_rob,
  output logic [AW-1:0] req_ipr,
  output logic [AW-1:0] req_fpr,
  output logic [AW-1:0] rs_slot  [W],    // slot in IntRS or FPRS grants
  output logic [AW-1:0] pr_slot  [W]     // slot in IntPR or FPPR grants
);

  always_comb begin
    int unsigned irs, frs, ipr, fpr;
    int unsigned k;
    irs = 0; frs = 0; ipr = 0; fpr = 0;
    k = 0;
    for (int unsigned j = 0; j < W; j++) begin
      rs_slot[j] = '0;
      pr_slot[j] = '0;
    end
    for (int unsigned j = 0; j < W; j++) begin
      if (j == k && j < int'(n_inst) && j + 1 <= int'(avail_rob) &&
          (is_fp[j] ? (frs + 1 <= int'(avail_frs)) : (irs + 1 <= int'(avail_irs))) &&
          (!has_dest[j] || (is_fp[j] ? (fpr + 1 <= int'(avail_fpr))
                                     : (ipr + 1 <= int'(avail_ipr))))) begin
        rs_slot[j] = AW'(is_fp[j] ? frs : irs);
        pr_slot[j] = AW'(is_fp[j] ? fpr : ipr);
        if (is_fp[j]) frs = frs + 1; else irs = irs + 1;
        if (has_dest[j]) begin
          if (is_fp[j]) fpr = fpr + 1; else ipr = ipr + 1;
        end
        k = k + 1;
      end
    end
    n_disp  = AW'(k);
    stall   = (k < int'(n_inst));
    req_rob = AW'(k);
    req_irs = AW'(irs);
    req_frs = AW'(frs);
    req_ipr = AW'(ipr);
    req_fpr = AW'(fpr);
  end

endmodule
