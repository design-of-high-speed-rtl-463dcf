// acs: add-compare-select element for one trellis state.
//
// Each state is reached from two predecessors, the upper one (decision 0)
// and the lower one (decision 1). The element adds each predecessor's path
// metric to the branch metric of its branch, compares the two candidates by
// subtracting them and looking at the MSB of the difference, and keeps the
// smaller one together with a decision bit naming the survivor.
//
// Metrics use modulo normalisation: they are PM_W-bit numbers that are
// allowed to wrap, and the difference of two of them, read as a signed
// number, gives their order as long as all live metrics lie within
// 2^(PM_W-1) of each other. No subtraction of a common minimum is needed.
//
// The valid flags come from the T-algorithm: a predecessor that was pruned
// does not take part. If only one is valid it wins; if neither is, the
// output is invalid and the caller leaves that state's stored metric
// untouched. A tie selects the upper branch.
//
// The compare-by-subtraction and the decision-bit meaning follow the
// original design, as do the widths (7 bits of metric range + 1 bit for
// modulo normalisation, 5-bit branch metrics); the tie rule and the valid
// flags are this design's choice.
//
// Purely combinational.
module acs #(
  parameter int unsigned PM_W = vd_pkg::PM_W_DEF,
  parameter int unsigned BM_W = vd_pkg::BM_W_DEF
) (
  input  logic [PM_W-1:0] pm_up,
  input  logic            ok_up,
  input  logic [BM_W-1:0] bm_up,
  input  logic [PM_W-1:0] pm_lo,
  input  logic            ok_lo,
  input  logic [BM_W-1:0] bm_lo,
  output logic [PM_W-1:0] pm_new,
  output logic            dec,
  output logic            ok_new
);

  logic [PM_W-1:0] cand_up, cand_lo, diff;

  always_comb begin
    cand_up = pm_up + PM_W'(bm_up);
    cand_lo = pm_lo + PM_W'(bm_lo);
    diff    = cand_lo - cand_up;          // negative: lower branch is smaller
    if (ok_up && ok_lo) dec = diff[PM_W-1];
    else                dec = !ok_up;
    pm_new = dec ? cand_lo : cand_up;
    ok_new = ok_up || ok_lo;
  end

endmodule
