// tagline_ctrl: driver-enable control for the tag-line shared by one FU-group.
//
// With wakeup width W below issue width I, GROUP = I/W tag latches share one tag-line.
// Each cycle at most one of the latches whose indicator is set is allowed to drive its
// tag onto the line; the others keep their tags latched and wait. Which one drives is
// chosen round-robin: the search starts just after the latch that drove last, so no
// latch can be starved by a neighbour that keeps receiving new tags. (The document leaves
// the choice open; round-robin is this design's choice.)
//
// Interface: indicator/tag come from the group's fu_issue_latch instances; drive is
// one-hot or zero and tells each latch that its tag is on the line this cycle; tagline is
// the value seen by the wakeup logic. Combinational from indicator to drive and tagline;
// the round-robin pointer is the only state.
module tagline_ctrl
  import rww_pkg::*;
#(
  parameter int unsigned GROUP = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [GROUP-1:0]       indicator,
  input  tag_t [GROUP-1:0]       tag,
  output logic [GROUP-1:0]       drive,
  output tagline_t               tagline
);
  localparam int unsigned PW = (GROUP > 1) ? $clog2(GROUP) : 1;

  logic [PW-1:0] ptr_q;   // highest-priority latch this cycle
  logic [PW-1:0] win;

  // latch examined at position o of the round-robin order starting at ptr
  function automatic int rr_index(input logic [PW-1:0] ptr, input int o);
    return (int'(ptr) + o) % int'(GROUP);
  endfunction

  always_comb begin
    drive   = '0;
    win     = ptr_q;
    tagline = '0;
    for (int o = 0; o < int'(GROUP); o++) begin
      if (drive == '0 && indicator[rr_index(ptr_q, o)]) begin
        drive[rr_index(ptr_q, o)] = 1'b1;
        win                       = PW'(rr_index(ptr_q, o));
      end
    end
    for (int unsigned j = 0; j < GROUP; j++) begin
      if (drive[j]) begin
        tagline.valid = 1'b1;
        tagline.tag   = tag[j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else if (|drive) begin
      ptr_q <= (int'(win) + 1 == GROUP) ? '0 : PW'(int'(win) + 1);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drive));
endmodule
