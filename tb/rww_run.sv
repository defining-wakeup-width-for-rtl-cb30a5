// rww_run: testbench harness that runs one synthetic program through one scheduler
// configuration and reports the cycle count.
//
// The program is a pure function of the instruction number (a fixed hash), so every
// configuration sees exactly the same instruction stream: about 30% of the instructions
// produce no register tag (branches and stores), and each source depends, with some
// probability, on one of the last few tag-producing instructions, with short distances
// more likely. The harness dispatches up to 8 instructions per cycle, checks that no
// instruction issues before its producers' tags were broadcast, that every instruction
// issues once and every tag is broadcast once, and raises done when all have finished.
module rww_run
  import rww_pkg::*;
#(
  parameter int unsigned ISSUE_W   = 6,
  parameter int unsigned WAKE_W    = 3,
  parameter bit          RWIS_EN   = 1'b1,
  parameter int unsigned RTD_LIMIT = 1,
  parameter int          NPROG     = 5000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   cycles,
  output int   checks,
  output int   failures,
  output int   delayed
);
  localparam int D = 8, N = 128;
  localparam int NTAGS = 1 << TAG_W;

  logic      [D-1:0]       disp_valid;
  iq_entry_t [D-1:0]       disp_entry;
  logic                    disp_ready;
  fu_issue_t [ISSUE_W-1:0] fu_issue;
  tagline_t  [WAKE_W-1:0]  tagline;
  logic      [ISSUE_W-1:0] tag_waiting;
  logic      [WAKE_W-1:0]  rtd_block;
  logic [$clog2(N+1)-1:0]  iq_count;

  rww_scheduler #(.IQ_SIZE(N), .ISSUE_W(ISSUE_W), .WAKE_W(WAKE_W), .DISP_W(D),
                  .RWIS_EN(RWIS_EN), .RTD_LIMIT(RTD_LIMIT)) dut (
    .clk(clk), .rst_n(rst_n), .disp_valid(disp_valid), .disp_entry(disp_entry),
    .disp_ready(disp_ready), .fu_enable('1), .fu_issue(fu_issue), .tagline(tagline),
    .tag_waiting(tag_waiting), .rtd_block(rtd_block), .iq_count(iq_count));

  function automatic int unsigned hash(input int unsigned n, input int unsigned salt);
    int unsigned x;
    x = n * 32'h9E3779B1 + salt * 32'h85EBCA6B + 32'h1234567;
    x ^= x >> 15; x *= 32'h2C1B3C6D; x ^= x >> 12; x *= 32'h297A2D39; x ^= x >> 15;
    return x;
  endfunction

  bit prod[NPROG];
  int src [NPROG][2];
  int dtag[NPROG];
  int issue_c[NPROG], bcast_c[NPROG], n_iss[NPROG];
  int tag_owner[NTAGS];

  initial begin
    int last[$];
    int dd;
    for (int n = 0; n < NPROG; n++) begin
      prod[n] = (hash(n, 1) % 100) >= 30;
      for (int s = 0; s < 2; s++) begin
        src[n][s] = -1;
        if (last.size() > 0 && (hash(n, 2 + s) % 100) < 75) begin
          dd = (hash(n, 4 + s) % 4 == 0) ? int'(hash(n, 6 + s) % 16) : int'(hash(n, 6 + s) % 2);
          if (dd >= last.size()) dd = last.size() - 1;
          src[n][s] = last[last.size() - 1 - dd];
        end
      end
      if (prod[n]) begin
        last.push_back(n);
        if (last.size() > 16) void'(last.pop_front());
      end
      issue_c[n] = -1; bcast_c[n] = -1; n_iss[n] = 0; dtag[n] = -1;
    end
    for (int t = 0; t < NTAGS; t++) tag_owner[t] = -1;
  end

  initial begin
    int cyc, next, next_tag, id, nb;
    bit rdy;
    done = 0; cycles = 0; checks = 0; failures = 0; delayed = 0;
    disp_valid = '0; disp_entry = '0;
    cyc = 0; next = 0; next_tag = 0; nb = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      cyc++;
      for (int k = 0; k < int'(ISSUE_W); k++) begin
        if (fu_issue[k].valid) begin
          id = int'(fu_issue[k].payload);
          n_iss[id]++;
          issue_c[id] = cyc - 1;
          for (int s = 0; s < 2; s++) begin
            if (src[id][s] >= 0) begin
              checks++;
              if (bcast_c[src[id][s]] < 0 || bcast_c[src[id][s]] > cyc - 1) begin
                failures++;
                $display("I%0dW%0d: instruction %0d issued before its producer", ISSUE_W, WAKE_W, id);
              end
            end
          end
        end
      end
      for (int w = 0; w < int'(WAKE_W); w++) begin
        if (tagline[w].valid) begin
          id = tag_owner[tagline[w].tag];
          checks++;
          if (id < 0 || issue_c[id] < 0 || bcast_c[id] >= 0) begin
            failures++;
            $display("I%0dW%0d: unexpected tag %0d", ISSUE_W, WAKE_W, tagline[w].tag);
          end else begin
            bcast_c[id] = cyc;
            nb++;
            if (cyc > issue_c[id] + 1) delayed++;
          end
        end
      end
      if (next == NPROG && iq_count == 0 && tag_waiting == '0 && fu_issue == '0 && tagline == '0) break;
      disp_valid = '0;
      if (disp_ready) begin
        for (int d = 0; d < D && next < NPROG; d++) begin
          id = next;
          if (prod[id]) begin
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
          rdy = (src[id][0] < 0) || (bcast_c[src[id][0]] >= 0 && bcast_c[src[id][0]] < cyc);
          disp_entry[d].src1     = tag_t'(src[id][0] >= 0 ? dtag[src[id][0]] : 0);
          disp_entry[d].src1_rdy = rdy;
          rdy = (src[id][1] < 0) || (bcast_c[src[id][1]] >= 0 && bcast_c[src[id][1]] < cyc);
          disp_entry[d].src2     = tag_t'(src[id][1] >= 0 ? dtag[src[id][1]] : 0);
          disp_entry[d].src2_rdy = rdy;
          disp_valid[d] = 1'b1;
          next++;
        end
      end
    end
    for (int n = 0; n < NPROG; n++) begin
      checks++;
      if (n_iss[n] != 1 || (prod[n] && bcast_c[n] < 0)) begin
        failures++;
        $display("I%0dW%0d: instruction %0d issued %0d times", ISSUE_W, WAKE_W, n, n_iss[n]);
      end
    end
    cycles = cyc;
    done = 1;
  end
endmodule
