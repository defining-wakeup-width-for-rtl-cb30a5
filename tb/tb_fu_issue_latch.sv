// tb_fu_issue_latch: random issue/drive traffic into one FU's latches, compared with a
// behavioural model of the tag latch, indicator latch and instruction latch. Tag-producing
// issues are only sent when no tag is waiting, as the select logic guarantees.
module tb_fu_issue_latch;
  import rww_pkg::*;
  logic clk = 0, rst_n = 0;
  logic issue_valid, drive, indicator, waiting;
  iq_entry_t issue_entry;
  tag_t tag;
  fu_issue_t fu_out;
  int checks = 0, failures = 0;
  int n_rwis = 0, n_keep = 0;

  fu_issue_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic m_ind;
    tag_t m_tag;
    fu_issue_t m_out;
    issue_valid = 0; drive = 0; issue_entry = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (indicator !== 0 || fu_out.valid !== 0) begin failures++; $display("reset state wrong"); end
    rst_n = 1;
    m_ind = 0; m_tag = '0; m_out = '0;
    for (int t = 0; t < 3000; t++) begin
      // drive only a present tag; issue a tag-producer only when nothing would be lost
      drive       = m_ind && indicator && ($urandom % 2);  // the latch asserts drive -> indicator
      issue_valid = ($urandom % 4) != 0;
      issue_entry = iq_entry_t'({$urandom, $urandom});
      if (m_ind && !drive) issue_entry.produces_tag = 1'b0;
      #1;
      checks++;
      if (waiting !== (m_ind && !drive)) begin failures++; $display("t=%0d waiting wrong", t); end
      if (issue_valid && !issue_entry.produces_tag && m_ind && !drive) n_rwis++;
      if (m_ind && !drive) n_keep++;
      @(negedge clk);
      m_out.valid        = issue_valid;
      m_out.produces_tag = issue_valid && issue_entry.produces_tag;
      m_out.dest         = issue_entry.dest;
      m_out.payload      = issue_entry.payload;
      if (issue_valid && issue_entry.produces_tag) begin
        m_ind = 1; m_tag = issue_entry.dest;
      end else if (drive) begin
        m_ind = 0;
      end
      checks++;
      if (indicator !== m_ind || (m_ind && tag !== m_tag)) begin
        failures++; $display("t=%0d ind=%b tag=%h exp %b %h", t, indicator, tag, m_ind, m_tag);
      end
      checks++;
      if (fu_out.valid !== m_out.valid ||
          (m_out.valid && (fu_out.produces_tag !== m_out.produces_tag ||
                           fu_out.dest !== m_out.dest || fu_out.payload !== m_out.payload))) begin
        failures++; $display("t=%0d fu_out wrong", t);
      end
    end
    checks++;
    if (n_rwis == 0 || n_keep == 0) begin failures++; $display("waiting cases not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
