// rww_scheduler: a Reduced Wakeup Width (RWW) dynamic scheduler.
//
// A conventional scheduler drives one tag-line per issue slot, so every result tag can
// wake its dependants in the very next cycle. Few cycles actually produce that many
// useful tags, so here ISSUE_W functional units (FUs) share WAKE_W tag-lines: the FUs are
// split into FU-groups of GROUP = ISSUE_W / WAKE_W FUs, and each group drives at most one
// tag per cycle. The groups are interleaved, FU k belonging to group k % WAKE_W: the
// stacked select fills FU 0, 1, 2, ... in order, so in a cycle that issues only a few
// instructions each of them lands in a different group and no tag has to wait. The wakeup CAM then needs only WAKE_W comparators per operand.
//
// Cycle by cycle:
//   1. Each FU's tag latch that holds a tag (indicator set) asks for its group's tag-line;
//      tagline_ctrl enables one driver per group (round-robin), the rest keep waiting.
//   2. The issue_queue compares its source tags with the WAKE_W tag-lines (wakeup) and
//      the ready entries request FUs.
//   3. select_logic gives each FU the oldest request it may take. An FU whose tag latch
//      still holds a waiting tag has its blocking bit "a" set: it takes no instruction
//      (basic RWW) or only a non-tag-producing one (RWIS_EN = 1). With RTD_LIMIT > 0 the
//      rtd_limiter also sets "a" for a whole group while the previous cycle's count of
//      waiting tags in it is at or above the limit.
//   4. At the clock edge the chosen instructions go into the FUs' latches (presented on
//      fu_issue in the next cycle) and their destination tags into the tag latches; the
//      issued entries leave the window and newly dispatched ones are appended.
// A dependant can therefore issue in the cycle right after its producer when the
// producer's tag is not delayed, as in a conventional scheduler with a one-cycle
// wakeup-select loop.
//
// Default configuration: issue width 6, wakeup width 3 (I6W3), 128-entry window,
// dispatch width 8, RWIS on, RTD limit 1 (RTD-1), which is the configuration with the
// smallest loss against a full-width scheduler. WAKE_W = ISSUE_W gives the conventional
// scheduler. The interleaved grouping, the dispatch handshake and the FU enable inputs are
// this design's choices. Execution latency is outside the scheduler: a tag is broadcast
// as soon as its latch gets the tag-line, which suits single-cycle units.
//
// Ports: disp_* is the dispatch stream from rename (valid per slot, one ready for the
// whole group of slots); fu_enable[k] = FU k can accept an instruction this cycle;
// fu_issue[k] is the instruction FU k executes this cycle; tagline is the wakeup
// broadcast (also what the result bypass needs); tag_waiting, rtd_block and iq_count
// are status for performance counters.
module rww_scheduler
  import rww_pkg::*;
#(
  parameter int unsigned IQ_SIZE   = 128,
  parameter int unsigned ISSUE_W   = 6,
  parameter int unsigned WAKE_W    = 3,
  parameter int unsigned DISP_W    = 8,
  parameter bit          RWIS_EN   = 1'b1,
  parameter int unsigned RTD_LIMIT = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic      [DISP_W-1:0]        disp_valid,
  input  iq_entry_t [DISP_W-1:0]        disp_entry,
  output logic                          disp_ready,
  input  logic      [ISSUE_W-1:0]       fu_enable,
  output fu_issue_t [ISSUE_W-1:0]       fu_issue,
  output tagline_t  [WAKE_W-1:0]        tagline,
  output logic      [ISSUE_W-1:0]       tag_waiting,
  output logic      [WAKE_W-1:0]        rtd_block,
  output logic [$clog2(IQ_SIZE+1)-1:0]  iq_count
);
  localparam int unsigned GROUP = ISSUE_W / WAKE_W;

  initial begin
    assert (GROUP * WAKE_W == ISSUE_W)
      else $error("rww_scheduler: ISSUE_W (%0d) must be a multiple of WAKE_W (%0d)",
                  ISSUE_W, WAKE_W);
  end

  // ---------------- window and wakeup ----------------
  logic      [IQ_SIZE-1:0] req, ptype, issued;
  iq_entry_t [IQ_SIZE-1:0] entry;

  issue_queue #(.N(IQ_SIZE), .ISSUE_W(ISSUE_W), .WAKE_W(WAKE_W), .DISP_W(DISP_W)) u_iq (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (disp_valid),
    .in_entry (disp_entry),
    .in_ready (disp_ready),
    .tagline  (tagline),
    .req      (req),
    .ptype    (ptype),
    .entry    (entry),
    .issued   (issued),
    .count    (iq_count)
  );

  // ---------------- tag latches and tag-line control ----------------
  logic [ISSUE_W-1:0] indicator, drive, a;
  tag_t [ISSUE_W-1:0] tag;

  // FU k belongs to FU-group k % WAKE_W (see the header): group g holds FUs
  // g, g + WAKE_W, g + 2*WAKE_W, ...
  for (genvar g = 0; g < WAKE_W; g++) begin : g_group
    logic [GROUP-1:0] grp_ind, grp_drive, grp_wait;
    tag_t [GROUP-1:0] grp_tag;
    for (genvar j = 0; j < GROUP; j++) begin : g_member
      assign grp_ind[j]               = indicator[j*WAKE_W + g];
      assign grp_tag[j]               = tag[j*WAKE_W + g];
      assign grp_wait[j]              = tag_waiting[j*WAKE_W + g];
      assign drive[j*WAKE_W + g]      = grp_drive[j];
      assign a[j*WAKE_W + g]          = tag_waiting[j*WAKE_W + g] | rtd_block[g];
    end
    tagline_ctrl #(.GROUP(GROUP)) u_tlc (
      .clk      (clk),
      .rst_n    (rst_n),
      .indicator(grp_ind),
      .tag      (grp_tag),
      .drive    (grp_drive),
      .tagline  (tagline[g])
    );
    rtd_limiter #(.GROUP(GROUP), .LIMIT(RTD_LIMIT)) u_rtd (
      .clk    (clk),
      .rst_n  (rst_n),
      .waiting(grp_wait),
      .block  (rtd_block[g])
    );
  end

  // ---------------- select ----------------
  logic [ISSUE_W-1:0][IQ_SIZE-1:0] grant;
  logic [ISSUE_W-1:0]              fu_valid;

  select_logic #(.N(IQ_SIZE), .ISSUE_W(ISSUE_W), .RWIS_EN(RWIS_EN)) u_sel (
    .req      (req),
    .ptype    (ptype),
    .a        (a),
    .fu_enable(fu_enable),
    .grant    (grant),
    .fu_valid (fu_valid),
    .issued   (issued)
  );

  // ---------------- per-FU instruction and tag latches ----------------
  iq_entry_t [ISSUE_W-1:0] sel_entry;

  always_comb begin
    for (int unsigned k = 0; k < ISSUE_W; k++) begin
      sel_entry[k] = '0;
      for (int unsigned i = 0; i < IQ_SIZE; i++) begin
        sel_entry[k] |= entry[i] & {$bits(iq_entry_t){grant[k][i]}};
      end
    end
  end

  for (genvar k = 0; k < ISSUE_W; k++) begin : g_fu
    fu_issue_latch u_latch (
      .clk        (clk),
      .rst_n      (rst_n),
      .issue_valid(fu_valid[k]),
      .issue_entry(sel_entry[k]),
      .drive      (drive[k]),
      .indicator  (indicator[k]),
      .tag        (tag[k]),
      .waiting    (tag_waiting[k]),
      .fu_out     (fu_issue[k])
    );
  end
endmodule
