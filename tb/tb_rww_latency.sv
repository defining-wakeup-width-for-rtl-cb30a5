// tb_rww_latency: directed timing checks of the default scheduler (I6W3, RWIS, RTD-1).
//
// Test 1, wakeup-select loop: a chain of 8 dependent tag-producing instructions is
// dispatched in one cycle into an empty window. Each one must be selected exactly one
// cycle after its producer and each tag broadcast in the cycle after its selection.
// Test 2, shared tag-lines: 6 independent tag-producing instructions, then 6
// non-tag-producing consumers (consumer i reads producer i). All producers issue in one
// cycle s on FUs 0..5; FU k shares tag-line k % 3, so in each group one producer
// broadcasts in s+1 and the other waits and broadcasts in s+2. Each consumer must issue
// in the cycle its producer's tag is broadcast.
module tb_rww_latency;
  import rww_pkg::*;
  localparam int I = 6, W = 3, D = 8;
  logic clk = 0, rst_n = 0;
  logic      [D-1:0] disp_valid;
  iq_entry_t [D-1:0] disp_entry;
  logic              disp_ready;
  logic      [I-1:0] fu_enable;
  fu_issue_t [I-1:0] fu_issue;
  tagline_t  [W-1:0] tagline;
  logic      [I-1:0] tag_waiting;
  logic      [W-1:0] rtd_block;
  logic [7:0]        iq_count;
  int checks = 0, failures = 0;
  int cyc = 0;
  int sel_c[64], bc_c[64];

  rww_scheduler dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: selection cycle of each payload and broadcast cycle of each tag
  always @(negedge clk) begin
    cyc <= cyc + 1;
    for (int k = 0; k < I; k++)
      if (rst_n && fu_issue[k].valid) sel_c[fu_issue[k].payload] <= cyc - 1;
    for (int w = 0; w < W; w++)
      if (rst_n && tagline[w].valid) bc_c[tagline[w].tag] <= cyc;
  end

  function automatic iq_entry_t mk(input int id, input bit prod, input int s1);
    iq_entry_t e;
    e = '0;
    e.payload      = payload_t'(id);
    e.produces_tag = prod;
    e.dest         = tag_t'(id);
    e.src2_rdy     = 1'b1;
    e.src1_rdy     = (s1 < 0);
    e.src1         = tag_t'(s1 < 0 ? 0 : s1);
    return e;
  endfunction

  task automatic check_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: cycle %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int s;
    for (int i = 0; i < 64; i++) begin sel_c[i] = -1; bc_c[i] = -1; end
    disp_valid = '0; disp_entry = '0; fu_enable = '1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- test 1: chain 0 -> 1 -> ... -> 7 ----
    for (int d = 0; d < D; d++) disp_entry[d] = mk(d, 1'b1, d == 0 ? -1 : d - 1);
    disp_valid = '1;
    @(negedge clk);
    disp_valid = '0;
    repeat (15) @(negedge clk);
    for (int i = 1; i < 8; i++) begin
      check_eq($sformatf("chain %0d selection", i), sel_c[i], sel_c[i-1] + 1);
      check_eq($sformatf("chain %0d tag broadcast", i - 1), bc_c[i-1], sel_c[i-1] + 1);
    end
    // ---- test 2: 6 producers (ids 16..21), then 6 consumers (ids 32..37) ----
    for (int d = 0; d < D; d++) disp_entry[d] = mk(16 + d, 1'b1, -1);
    disp_valid = 8'b0011_1111;
    @(negedge clk);
    for (int d = 0; d < D; d++) disp_entry[d] = mk(32 + d, 1'b0, 16 + d);
    disp_valid = 8'b0011_1111;
    @(negedge clk);
    disp_valid = '0;
    repeat (10) @(negedge clk);
    s = sel_c[16];
    for (int i = 0; i < 6; i++) begin
      check_eq($sformatf("producer %0d selection", i), sel_c[16 + i], s);
      check_eq($sformatf("consumer %0d selection", i), sel_c[32 + i], bc_c[16 + i]);
    end
    // per group: one tag on time, the other one cycle late (which one depends on the
    // round-robin state left by test 1)
    for (int g = 0; g < W; g++) begin
      check_eq($sformatf("group %0d first broadcast", g),
               bc_c[16 + g] < bc_c[19 + g] ? bc_c[16 + g] : bc_c[19 + g], s + 1);
      check_eq($sformatf("group %0d second broadcast", g),
               bc_c[16 + g] < bc_c[19 + g] ? bc_c[19 + g] : bc_c[16 + g], s + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
