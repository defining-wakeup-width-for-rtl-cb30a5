// select_logic: the select stage of the RWW scheduler, one fu_arbiter per FU.
//
// The arbiters are stacked: FU 0 chooses first among all ready entries, FU k chooses
// among the entries not taken by FUs 0 .. k-1. Every arbiter gives priority to the
// oldest entry (lowest index), so the oldest ready instructions are issued first.
// Each FU's arbiter receives that FU's blocking bit a[k] (waiting tag in its tag latch, or
// an FU-group limited by the reduced-tag-delay counter), see fu_arbiter.
//
// Interface: req = ready entries, ptype = their type bits, a = per-FU blocking bits,
// fu_enable = the FU can accept an instruction this cycle (the arbiter's enable).
// grant[k] is the one-hot choice of FU k (zero when the FU stays idle), fu_valid[k]
// says FU k got an instruction and issued is the OR of all grants, used to remove the
// issued entries from the window. Purely combinational; wakeup and select share one cycle.
// The stacking of per-FU arbiters follows the usual multi-FU select; the document gives
// only that each FU has its own arbiter.
module select_logic #(
  parameter int unsigned N       = 128,
  parameter int unsigned ISSUE_W = 6,
  parameter bit          RWIS_EN = 1'b1
) (
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         ptype,
  input  logic [ISSUE_W-1:0]   a,
  input  logic [ISSUE_W-1:0]   fu_enable,
  output logic [ISSUE_W-1:0][N-1:0] grant,
  output logic [ISSUE_W-1:0]   fu_valid,
  output logic [N-1:0]         issued
);
  // taken[k] = entries already granted to FUs 0 .. k-1
  logic [ISSUE_W:0][N-1:0] taken;
  assign taken[0] = '0;

  for (genvar k = 0; k < ISSUE_W; k++) begin : g_fu
    fu_arbiter #(.N(N), .RWIS_EN(RWIS_EN)) u_arb (
      .req    (req & ~taken[k]),
      .ptype  (ptype),
      .a      (a[k]),
      .enable (fu_enable[k]),
      .grant  (grant[k]),
      .granted(fu_valid[k])
    );
    assign taken[k+1] = taken[k] | grant[k];
  end

  assign issued = taken[ISSUE_W];
endmodule
