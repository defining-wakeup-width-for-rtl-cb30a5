// tb_issue_queue: a 16-entry window with issue width 6, wakeup width 3 and dispatch width
// 4, driven by random dispatch slots, random tag-line broadcasts over a small tag space
// (so wakeups are frequent) and random issue choices among the ready entries. A queue
// model in the testbench keeps the expected age order, ready bits, requests and count.
module tb_issue_queue;
  import rww_pkg::*;
  localparam int N = 16, I = 6, W = 3, D = 4;
  logic clk = 0, rst_n = 0;
  logic      [D-1:0] in_valid;
  iq_entry_t [D-1:0] in_entry;
  logic              in_ready;
  tagline_t  [W-1:0] tagline;
  logic      [N-1:0] req, ptype, issued;
  iq_entry_t [N-1:0] entry;
  logic [$clog2(N+1)-1:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_wake = 0, n_issue = 0, n_same_cycle = 0;

  issue_queue #(.N(N), .ISSUE_W(I), .WAKE_W(W), .DISP_W(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  iq_entry_t q[$];

  function automatic logic hit(input tag_t t);
    for (int w = 0; w < W; w++) if (tagline[w].valid && tagline[w].tag == t) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    iq_entry_t nq[$];
    iq_entry_t e;
    logic r;
    logic exp_ready;
    int nis;
    in_valid = '0; in_entry = '0; tagline = '0; issued = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      // stimulus for this cycle
      in_valid = D'($urandom);
      for (int d = 0; d < D; d++) begin
        in_entry[d] = iq_entry_t'({$urandom, $urandom});
        in_entry[d].src1 = tag_t'($urandom % 24);
        in_entry[d].src2 = tag_t'($urandom % 24);
        in_entry[d].src1_rdy = ($urandom % 3) == 0;
        in_entry[d].src2_rdy = ($urandom % 3) == 0;
      end
      for (int w = 0; w < W; w++) begin
        tagline[w].valid = ($urandom % 2);
        tagline[w].tag   = tag_t'($urandom % 24);
      end
      #1;
      // requests and contents against the model
      issued = '0;
      nis = 0;
      for (int i = 0; i < N; i++) begin
        if (i < q.size()) begin
          r = (q[i].src1_rdy || hit(q[i].src1)) && (q[i].src2_rdy || hit(q[i].src2));
          if (r && !(q[i].src1_rdy && q[i].src2_rdy)) n_wake++;
        end else begin
          r = 1'b0;
        end
        checks++;
        if (req[i] !== r) begin failures++; $display("t=%0d req[%0d]=%b exp %b", t, i, req[i], r); end
        if (i < q.size()) begin
          checks++;
          if (entry[i].dest !== q[i].dest || entry[i].payload !== q[i].payload ||
              ptype[i] !== q[i].produces_tag) begin
            failures++; $display("t=%0d entry[%0d] wrong", t, i);
          end
        end
        // issue only what both the model and the window call ready (the window asserts this)
        if (r && req[i] && nis < I && ($urandom % 2)) begin issued[i] = 1'b1; nis++; end
      end
      exp_ready = (N - q.size()) >= D;
      checks++;
      if (in_ready !== exp_ready || count !== q.size()) begin
        failures++; $display("t=%0d in_ready=%b count=%0d model %0d", t, in_ready, count, q.size());
      end
      if (!exp_ready && in_valid != 0) n_full++;
      n_issue += nis;
      // model update at the clock edge
      nq = {};
      foreach (q[i]) begin
        if (!issued[i]) begin
          e = q[i];
          e.src1_rdy |= hit(e.src1);
          e.src2_rdy |= hit(e.src2);
          nq.push_back(e);
        end
      end
      if (exp_ready) begin
        for (int d = 0; d < D; d++) begin
          if (in_valid[d]) begin
            e = in_entry[d];
            if (!(e.src1_rdy && e.src2_rdy) && (hit(e.src1) || hit(e.src2))) n_same_cycle++;
            e.src1_rdy |= hit(e.src1);
            e.src2_rdy |= hit(e.src2);
            nq.push_back(e);
          end
        end
      end
      q = nq;
      @(negedge clk);
    end
    checks++;
    if (n_full == 0 || n_wake == 0 || n_issue == 0 || n_same_cycle == 0) begin
      failures++;
      $display("not exercised: full=%0d wake=%0d issue=%0d same=%0d", n_full, n_wake, n_issue, n_same_cycle);
    end
    $display("full stalls=%0d wakeups=%0d issued=%0d same-cycle wakeups=%0d", n_full, n_wake, n_issue, n_same_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
