// tb_rww_scheduler: end-to-end test of the scheduler at its default configuration
// (issue width 6, wakeup width 3, 128-entry window, dispatch width 8, RWIS, RTD-1).
//
// The testbench plays rename: it generates a program of NINSTR instructions in phases
// (long dependence chains that fill the window, wide independent code that produces
// more tags than there are tag-lines, and mixes with branches/stores), assigns
// destination tags round-robin over the 256 physical tags and dispatches up to 8 per
// cycle. The payload carries the instruction number. A scoreboard then checks, from the
// outside only:
//   - every instruction is issued exactly once, and never before all its producers'
//     tags were on a tag-line (in the same cycle at the latest);
//   - every tag is broadcast exactly once, after its instruction issued, on the tag-line
//     of the FU-group of the FU that executed it, and a group's line is never idle while
//     the group holds a tag;
//   - no tag-producing instruction goes to an FU whose tag is waiting, and none to a
//     group that the RTD-1 rule blocks (previous cycle had a waiting tag in the group);
//   - the tag_waiting and rtd_block status outputs agree with the scoreboard.
// It also counts the mechanisms (delayed tags, RWIS issue past a waiting tag, RTD
// blocking, window full, FU disabled, back-to-back wakeup, wakeup of an entry in its
// dispatch cycle) and fails if one never happened.
module tb_rww_scheduler;
  import rww_pkg::*;
  localparam int I = 6, W = 3, D = 8, N = 128, G = I / W;
  localparam int NINSTR = 20000;
  localparam int NTAGS  = 1 << TAG_W;

  logic clk = 0, rst_n = 0;
  logic      [D-1:0] disp_valid;
  iq_entry_t [D-1:0] disp_entry;
  logic              disp_ready;
  logic      [I-1:0] fu_enable;
  fu_issue_t [I-1:0] fu_issue;
  tagline_t  [W-1:0] tagline;
  logic      [I-1:0] tag_waiting;
  logic      [W-1:0] rtd_block;
  logic [$clog2(N+1)-1:0] iq_count;

  rww_scheduler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("cycle %0d: %s", cyc, msg);
  endtask

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program ----------------
  bit prod   [NINSTR];          // tag-producing
  int src    [NINSTR][2];       // producer instruction of each source, -1 = none
  int dtag   [NINSTR];
  int issue_c[NINSTR];          // select cycle
  int bcast_c[NINSTR];          // cycle its tag was on a tag-line
  int fu_of  [NINSTR];
  int n_issue[NINSTR];
  int tag_owner[NTAGS];

  // per-FU pending tag (instruction number) and previous-cycle waiting state
  int  pend[I];
  bit  wait_prev[I];
  bit  blk_prev[W];
  int  grp_wait_prev[W];

  // mechanism counters
  int n_delayed = 0, n_rwis = 0, n_rtd = 0, n_full = 0, n_fu_off = 0;
  int n_b2b = 0, n_disp_wake = 0, n_issued = 0, n_bcast = 0, issue_slots = 0;

  function automatic void gen_program();
    int last_prod[$];
    int mode;
    for (int n = 0; n < NINSTR; n++) begin
      mode = (n / 250) % 4;   // 0 chains, 1 wide, 2 mixed, 3 wide with branches/stores
      prod[n] = (mode == 3) ? (($urandom % 10) < 6) : (($urandom % 10) < 8);
      for (int s = 0; s < 2; s++) begin
        src[n][s] = -1;
        if (last_prod.size() > 0) begin
          case (mode)
            0: if (s == 0) src[n][s] = last_prod[$];                       // serial chain
            1: if ($urandom % 8 == 0) src[n][s] = last_prod[$urandom % last_prod.size()];
            default: if ($urandom % 2 == 1) src[n][s] = last_prod[$urandom % last_prod.size()];
          endcase
        end
      end
      if (prod[n]) begin
        last_prod.push_back(n);
        if (last_prod.size() > 12) void'(last_prod.pop_front());
      end
    end
  endfunction

  initial begin
    int next_disp, next_tag, k, id, g, s, nslots;
    bit found, any_pend, rdy, stop;
    bit wait_now[I];
    int grp_wait[W];
    int c_issue;

    gen_program();
    for (int n = 0; n < NINSTR; n++) begin
      issue_c[n] = -1; bcast_c[n] = -1; n_issue[n] = 0; fu_of[n] = -1; dtag[n] = -1;
    end
    for (int t = 0; t < NTAGS; t++) tag_owner[t] = -1;
    for (int j = 0; j < I; j++) begin pend[j] = -1; wait_prev[j] = 0; end
    for (int j = 0; j < W; j++) begin blk_prev[j] = 0; grp_wait_prev[j] = 0; end
    disp_valid = '0; disp_entry = '0; fu_enable = '1;
    next_disp = 0; next_tag = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    forever begin
      @(negedge clk);
      cyc++;
      c_issue = cyc - 1;

      // ---- instructions selected in the previous cycle reach the FUs now ----
      for (k = 0; k < I; k++) begin
        if (fu_issue[k].valid) begin
          id = int'(fu_issue[k].payload);
          checks++;
          if (id >= next_disp) begin fail($sformatf("FU%0d got unknown instruction %0d", k, id)); continue; end
          n_issue[id]++;
          n_issued++;
          if (n_issue[id] != 1) fail($sformatf("instruction %0d issued twice", id));
          issue_c[id] = c_issue;
          fu_of[id]   = k;
          checks++;
          if (fu_issue[k].produces_tag !== prod[id] ||
              (prod[id] && int'(fu_issue[k].dest) != dtag[id]))
            fail($sformatf("instruction %0d: type/dest wrong on FU%0d", id, k));
          for (s = 0; s < 2; s++) begin
            if (src[id][s] >= 0) begin
              checks++;
              if (bcast_c[src[id][s]] < 0 || bcast_c[src[id][s]] > c_issue)
                fail($sformatf("instruction %0d issued before producer %0d broadcast", id, src[id][s]));
              else if (bcast_c[src[id][s]] == c_issue) n_b2b++;
            end
          end
          checks++;
          if (prod[id] && wait_prev[k]) fail($sformatf("tag-producer %0d sent to FU%0d with a waiting tag", id, k));
          if (!prod[id] && wait_prev[k]) n_rwis++;
          checks++;
          if (prod[id] && blk_prev[k % W]) fail($sformatf("tag-producer %0d sent to RTD-blocked group %0d", id, k % W));
          if (prod[id]) pend[k] = id;
        end
      end

      // ---- tag-lines of this cycle ----
      for (g = 0; g < W; g++) begin
        any_pend = 0;
        for (int j = 0; j < G; j++) if (pend[j*W + g] >= 0) any_pend = 1;
        checks++;
        if (tagline[g].valid) begin
          found = 0;
          for (int j = 0; j < G; j++) begin
            k = j*W + g;
            if (!found && pend[k] >= 0 && int'(tagline[g].tag) == dtag[pend[k]]) begin
              found = 1;
              bcast_c[pend[k]] = cyc;
              n_bcast++;
              if (cyc > issue_c[pend[k]] + 1) n_delayed++;
              pend[k] = -1;
            end
          end
          if (!found) fail($sformatf("tag-line %0d carries tag %0d that no FU of its group holds", g, tagline[g].tag));
        end else if (any_pend) begin
          fail($sformatf("tag-line %0d idle while its group holds a tag", g));
        end
      end
      for (g = 0; g < W; g++) grp_wait[g] = 0;
      for (k = 0; k < I; k++) begin
        wait_now[k] = pend[k] >= 0;
        if (wait_now[k]) grp_wait[k % W]++;
        checks++;
        if (tag_waiting[k] !== wait_now[k]) fail($sformatf("tag_waiting[%0d]=%b expected %b", k, tag_waiting[k], wait_now[k]));
      end
      for (g = 0; g < W; g++) begin
        checks++;
        if (rtd_block[g] !== (grp_wait_prev[g] >= 1)) fail($sformatf("rtd_block[%0d] wrong", g));
        if (rtd_block[g]) n_rtd++;
      end
      for (k = 0; k < I; k++) wait_prev[k] = wait_now[k];
      for (g = 0; g < W; g++) begin blk_prev[g] = rtd_block[g]; grp_wait_prev[g] = grp_wait[g]; end

      // ---- end of the program ----
      stop = (next_disp == NINSTR) && (iq_count == 0);
      for (k = 0; k < I; k++) if (pend[k] >= 0 || fu_issue[k].valid) stop = 0;
      if (stop) break;

      // ---- FU availability and dispatch for this cycle ----
      fu_enable = '1;
      if ($urandom % 16 == 0) begin
        fu_enable[$urandom % I] = 1'b0;
        n_fu_off++;
      end
      disp_valid = '0;
      if (next_disp < NINSTR && !disp_ready) n_full++;
      if (disp_ready) begin
        nslots = 1 + ($urandom % D);
        for (int d = 0; d < D; d++) begin
          if (d >= nslots || next_disp >= NINSTR) break;
          if ($urandom % 8 == 0) continue;   // leave a hole in the slot vector
          id = next_disp;
          if (prod[id]) begin
            // the previous owner of the tag must have broadcast in an earlier cycle before
            // the tag is reused (a broadcast in this cycle would wake the new consumers)
            if (tag_owner[next_tag] >= 0 &&
                (bcast_c[tag_owner[next_tag]] < 0 || bcast_c[tag_owner[next_tag]] >= cyc)) break;
            dtag[id] = next_tag;
            tag_owner[next_tag] = id;
            next_tag = (next_tag + 1) % NTAGS;
          end
          disp_entry[d] = '0;
          disp_entry[d].produces_tag = prod[id];
          disp_entry[d].dest    = tag_t'(prod[id] ? dtag[id] : 0);
          disp_entry[d].payload = payload_t'(id);
          for (s = 0; s < 2; s++) begin
            rdy = (src[id][s] < 0) || (bcast_c[src[id][s]] >= 0 && bcast_c[src[id][s]] < cyc);
            if (src[id][s] >= 0 && bcast_c[src[id][s]] == cyc) n_disp_wake++;
            if (s == 0) begin
              disp_entry[d].src1     = tag_t'(src[id][s] >= 0 ? dtag[src[id][s]] : 0);
              disp_entry[d].src1_rdy = rdy;
            end else begin
              disp_entry[d].src2     = tag_t'(src[id][s] >= 0 ? dtag[src[id][s]] : 0);
              disp_entry[d].src2_rdy = rdy;
            end
          end
          disp_valid[d] = 1'b1;
          next_disp++;
        end
      end
    end

    // ---- final accounting ----
    for (int n = 0; n < NINSTR; n++) begin
      checks++;
      if (n_issue[n] != 1) fail($sformatf("instruction %0d issued %0d times", n, n_issue[n]));
      if (prod[n]) begin
        checks++;
        if (bcast_c[n] < 0) fail($sformatf("tag of instruction %0d never broadcast", n));
      end
    end
    $display("cycles=%0d instructions=%0d IPC=%0.3f tags=%0d", cyc, n_issued, real'(n_issued) / real'(cyc), n_bcast);
    $display("delayed tags=%0d RWIS issues=%0d RTD-blocked group-cycles=%0d window-full cycles=%0d",
             n_delayed, n_rwis, n_rtd, n_full);
    $display("FU-disabled cycles=%0d back-to-back wakeups=%0d dispatch-cycle wakeups=%0d",
             n_fu_off, n_b2b, n_disp_wake);
    checks++; if (n_delayed == 0)   fail("no tag was delayed");
    checks++; if (n_rwis == 0)      fail("no RWIS issue past a waiting tag");
    checks++; if (n_rtd == 0)       fail("RTD never blocked a group");
    checks++; if (n_full == 0)      fail("window never full");
    checks++; if (n_fu_off == 0)    fail("no FU was ever disabled");
    checks++; if (n_b2b == 0)       fail("no back-to-back wakeup");
    checks++; if (n_disp_wake == 0) fail("no wakeup in the dispatch cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
