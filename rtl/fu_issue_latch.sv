// fu_issue_latch: the tag latch, its indicator latch and the issued-instruction latch of
// one functional unit (FU).
//
// At the end of the select cycle the instruction chosen for this FU is latched; in the
// next cycle it is presented to the FU (fu_out). If it produces a register tag, its
// destination tag is written into the tag latch and the indicator latch is set. The
// indicator is cleared in the cycle the FU-group's tag-line driver is enabled for this
// latch (drive = 1), i.e. once the tag has been used for wakeup. While the indicator is
// set and the tag is not being driven, the tag is "waiting" and the select logic must not
// give this FU another tag-producing instruction; an assertion checks that no waiting tag
// is overwritten. A non-tag-producing instruction may pass through while a tag waits
// (RWIS); it leaves the tag latch alone.
//
// Timing: one register stage; indicator, tag and fu_out are all registered. Reset clears
// the indicator and the FU valid bit. The latches and the indicator follow the document;
// keeping the issued instruction in a latch separate from the tag is needed for RWIS.
module fu_issue_latch
  import rww_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      issue_valid,   // an instruction was selected for this FU
  input  iq_entry_t issue_entry,   // the selected window entry
  input  logic      drive,         // the tag-line driver of this latch is enabled
  output logic      indicator,     // indicator latch
  output tag_t      tag,           // tag latch
  output logic      waiting,       // tag present and not driven this cycle
  output fu_issue_t fu_out         // instruction dispatched to the FU this cycle
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      indicator <= 1'b0;
      tag       <= '0;
      fu_out    <= '0;
    end else begin
      fu_out.valid        <= issue_valid;
      fu_out.produces_tag <= issue_valid & issue_entry.produces_tag;
      fu_out.dest         <= issue_entry.dest;
      fu_out.payload      <= issue_entry.payload;
      if (issue_valid && issue_entry.produces_tag) begin
        tag       <= issue_entry.dest;
        indicator <= 1'b1;
      end else if (drive) begin
        indicator <= 1'b0;
      end
    end
  end

  assign waiting = indicator & ~drive;

  // A waiting tag must never be overwritten by a new tag-producing instruction.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    !(issue_valid && issue_entry.produces_tag && waiting));
  // The driver is only enabled for a latch that holds a tag.
  a_drive_needs_tag: assert property (@(posedge clk) disable iff (!rst_n)
    drive |-> indicator);
endmodule
