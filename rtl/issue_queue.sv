// issue_queue: the instruction window of the RWW scheduler and its wakeup logic.
//
// The window holds up to N instructions in age order: entry 0 is the oldest and the valid
// entries always occupy indices 0 .. count-1. Each entry keeps its two source tags with
// ready bits, its destination tag, its type bit (tag-producing or not) and a payload.
//
// Wakeup: every cycle each source tag is compared with the WAKE_W tag-lines (the wakeup
// width, which is smaller than the issue width in the RWW design: only WAKE_W
// comparators per source operand). A source is ready when its ready bit is set or a
// tag-line carries its tag this cycle; an entry requests an FU (req) when both sources
// are ready. Wakeup and select happen in the same cycle, so an instruction woken by a tag
// driven in cycle t can be selected in cycle t.
//
// Issue and dispatch: the select logic returns the entries it issued (issued). At the
// clock edge the surviving entries move down to close the holes (at most ISSUE_W holes
// per cycle, so every entry moves by 0 .. ISSUE_W places) and stored ready bits absorb
// this cycle's wakeups. New instructions from rename (in_valid/in_entry, up to DISP_W
// per cycle, any subset of the slots, kept in slot order) are appended behind the
// survivors; they are also compared with this cycle's tag-lines, so a tag driven in the
// cycle of their arrival is not missed. in_ready is high when at least DISP_W entries
// are free at the start of the cycle; slots presented while it is low are not taken.
//
// The window size, tag comparison and oldest-first order follow the document; the
// collapsing organisation, the dispatch handshake and the dispatch width (equal to the
// fetch width) are this design's choices.
module issue_queue
  import rww_pkg::*;
#(
  parameter int unsigned N       = 128,
  parameter int unsigned ISSUE_W = 6,
  parameter int unsigned WAKE_W  = 3,
  parameter int unsigned DISP_W  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // dispatch from rename
  input  logic      [DISP_W-1:0]    in_valid,
  input  iq_entry_t [DISP_W-1:0]    in_entry,
  output logic                      in_ready,
  // wakeup
  input  tagline_t  [WAKE_W-1:0]    tagline,
  // to / from select
  output logic      [N-1:0]         req,
  output logic      [N-1:0]         ptype,
  output iq_entry_t [N-1:0]         entry,
  input  logic      [N-1:0]         issued,
  output logic [$clog2(N+1)-1:0]    count
);
  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned HW = $clog2(ISSUE_W + 1);

  logic      [N-1:0] valid_q;
  iq_entry_t [N-1:0] ent_q;
  logic [CW-1:0]     count_q;

  function automatic logic tag_hit(input tag_t t, input tagline_t [WAKE_W-1:0] tl);
    logic hit;
    hit = 1'b0;
    for (int unsigned w = 0; w < WAKE_W; w++) hit |= tl[w].valid && (tl[w].tag == t);
    return hit;
  endfunction

  // ---------------- wakeup ----------------
  iq_entry_t [N-1:0] woke;       // entries with this cycle's wakeups applied
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      woke[i]          = ent_q[i];
      woke[i].src1_rdy = ent_q[i].src1_rdy | tag_hit(ent_q[i].src1, tagline);
      woke[i].src2_rdy = ent_q[i].src2_rdy | tag_hit(ent_q[i].src2, tagline);
      req[i]           = valid_q[i] & woke[i].src1_rdy & woke[i].src2_rdy;
      ptype[i]         = ent_q[i].produces_tag;
    end
  end
  assign entry = ent_q;
  assign count = count_q;

  // ---------------- compaction ----------------
  logic [N-1:0][HW-1:0] holes;     // issued entries below index j
  logic [N-1:0]         survive;
  logic [HW-1:0]        n_issued;
  always_comb begin
    logic [HW-1:0] acc;
    acc = '0;
    for (int unsigned j = 0; j < N; j++) begin
      holes[j]   = acc;
      survive[j] = valid_q[j] & ~issued[j];
      acc        = acc + HW'(issued[j] & valid_q[j]);
    end
    n_issued = acc;
  end

  // dispatch slots in order
  assign in_ready = (N - 32'(count_q)) >= DISP_W;
  logic [DISP_W-1:0] take;
  assign take = in_valid & {DISP_W{in_ready}};

  logic [CW-1:0]     count_after;
  logic [CW-1:0]     count_d;
  logic [N-1:0]      valid_d;
  iq_entry_t [N-1:0] ent_d;
  iq_entry_t [DISP_W-1:0] in_woke;

  always_comb begin
    logic [CW-1:0] rank;
    count_after = count_q - CW'(n_issued);
    valid_d     = '0;
    ent_d       = ent_q;
    for (int unsigned d = 0; d < DISP_W; d++) begin
      in_woke[d]          = in_entry[d];
      in_woke[d].src1_rdy = in_entry[d].src1_rdy | tag_hit(in_entry[d].src1, tagline);
      in_woke[d].src2_rdy = in_entry[d].src2_rdy | tag_hit(in_entry[d].src2, tagline);
    end
    // gather: destination i takes the survivor j = i + s that has exactly s holes below it
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned s = 0; s <= ISSUE_W; s++) begin
        if (i + s < N) begin
          if (survive[i+s] && holes[i+s] == HW'(s)) begin
            valid_d[i] = 1'b1;
            ent_d[i]   = woke[i+s];
          end
        end
      end
    end
    // append the accepted dispatch slots behind the survivors
    rank = count_after;
    for (int unsigned d = 0; d < DISP_W; d++) begin
      if (take[d]) begin
        for (int unsigned i = 0; i < N; i++) begin
          if (CW'(i) == rank) begin
            valid_d[i] = 1'b1;
            ent_d[i]   = in_woke[d];
          end
        end
        rank = rank + 1'b1;
      end
    end
    count_d = rank;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      count_q <= '0;
    end else begin
      valid_q <= valid_d;
      count_q <= count_d;
    end
  end

  // Entry contents need no reset: they are only used where valid_q is set.
  always_ff @(posedge clk) begin
    ent_q <= ent_d;
  end

  // Only ready entries may be issued, and at most ISSUE_W of them per cycle.
  a_issue_ready: assert property (@(posedge clk) disable iff (!rst_n)
    (issued & ~req) == '0);
  a_issue_width: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(issued) <= ISSUE_W);
endmodule
