// tb_fu_arbiter: random requests, type bits, blocking bit and enable into two 16-entry
// FU arbiters, one basic RWW (RWIS off) and one with RWIS. The expected grant is the
// lowest-index request allowed by the leaf rule, found by a plain scan.
module tb_fu_arbiter;
  localparam int N = 16;
  logic [N-1:0] req, ptype;
  logic         a, enable;
  logic [N-1:0] grant_rww, grant_rwis;
  logic         granted_rww, granted_rwis;
  int checks = 0, failures = 0;
  int n_blocked_rwis = 0;

  fu_arbiter #(.N(N), .RWIS_EN(1'b0)) u_rww (
    .req(req), .ptype(ptype), .a(a), .enable(enable), .grant(grant_rww), .granted(granted_rww));
  fu_arbiter #(.N(N), .RWIS_EN(1'b1)) u_rwis (
    .req(req), .ptype(ptype), .a(a), .enable(enable), .grant(grant_rwis), .granted(granted_rwis));

  function automatic logic [N-1:0] expect_grant(input logic [N-1:0] r, input logic [N-1:0] b,
                                                input logic blk, input logic en, input bit rwis);
    logic [N-1:0] g;
    g = '0;
    if (en) begin
      for (int i = 0; i < N; i++) begin
        if (r[i] && !(blk && (rwis ? b[i] : 1'b1))) begin
          g[i] = 1'b1;
          break;
        end
      end
    end
    return g;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] e1, e2;
    for (int t = 0; t < 4000; t++) begin
      req    = N'($urandom) & N'($urandom);   // sparse and dense mixes
      if (t % 3 == 0) req = N'($urandom);
      ptype  = N'($urandom);
      a      = ($urandom % 3) == 0;
      enable = ($urandom % 8) != 0;
      #1;
      e1 = expect_grant(req, ptype, a, enable, 1'b0);
      e2 = expect_grant(req, ptype, a, enable, 1'b1);
      checks++;
      if (grant_rww !== e1 || granted_rww !== (e1 != '0)) begin
        failures++;
        $display("RWW  req=%h type=%h a=%b en=%b grant=%h exp=%h", req, ptype, a, enable, grant_rww, e1);
      end
      checks++;
      if (grant_rwis !== e2 || granted_rwis !== (e2 != '0)) begin
        failures++;
        $display("RWIS req=%h type=%h a=%b en=%b grant=%h exp=%h", req, ptype, a, enable, grant_rwis, e2);
      end
      if (a && enable && e2 != '0 && (e2 & ptype) == '0 && (req & ptype) != '0) n_blocked_rwis++;
    end
    // the case RWIS exists for must have been exercised
    checks++;
    if (n_blocked_rwis == 0) begin failures++; $display("RWIS bypass never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
