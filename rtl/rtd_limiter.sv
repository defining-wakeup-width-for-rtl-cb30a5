// rtd_limiter: Reduced Tag Delays (RTD) limit for one FU-group.
//
// Counting the tag-producing instructions sent to a group and limiting them in the same
// cycle would lengthen the select path, so the limit works on the previous cycle's count:
// every cycle the number of tags waiting in the group (indicator set, not driven) is
// counted in parallel with selection and registered. In the next cycle, if that count is
// equal to or above LIMIT, block is raised; the scheduler ORs it into the indicator bit
// "a" of every FU in the group, so no tag-producing instruction goes to the group that
// cycle while non-tag-producing ones still may. Below the limit the indicator bits are
// left alone. Because the count is one cycle old, a group can briefly hold more waiting
// tags than the limit.
//
// LIMIT = 1 is RTD-1, LIMIT = 2 is RTD-2, LIMIT = 0 turns RTD off (block stays 0).
// Interface: waiting from the group's fu_issue_latch instances; block is registered
// state compared with a constant, so it is ready early in the cycle.
module rtd_limiter #(
  parameter int unsigned GROUP = 2,
  parameter int unsigned LIMIT = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [GROUP-1:0] waiting,
  output logic             block
);
  localparam int unsigned CW = $clog2(GROUP + 1);

  logic [CW-1:0] cnt_d, cnt_q;

  always_comb begin
    cnt_d = '0;
    for (int unsigned j = 0; j < GROUP; j++) cnt_d += CW'(waiting[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else        cnt_q <= cnt_d;
  end

  assign block = (LIMIT != 0) && (32'(cnt_q) >= LIMIT);
endmodule
