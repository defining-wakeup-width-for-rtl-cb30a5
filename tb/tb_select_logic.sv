// tb_select_logic: random ready vectors, type bits, blocking bits and FU enables into a
// 32-entry, 6-FU select stage with RWIS. The reference gives FU 0 the oldest allowed
// request, FU 1 the oldest allowed one left, and so on.
module tb_select_logic;
  localparam int N = 32;
  localparam int I = 6;
  logic [N-1:0] req, ptype, issued;
  logic [I-1:0] a, fu_enable, fu_valid;
  logic [I-1:0][N-1:0] grant;
  int checks = 0, failures = 0;

  select_logic #(.N(N), .ISSUE_W(I), .RWIS_EN(1'b1)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] left, all;
    logic [I-1:0][N-1:0] eg;
    for (int t = 0; t < 3000; t++) begin
      req       = N'($urandom);
      if (t % 4 == 0) req = req & N'($urandom);
      ptype     = N'($urandom);
      a         = I'($urandom) & I'($urandom);
      fu_enable = ~(I'($urandom) & I'($urandom) & I'($urandom));
      #1;
      left = req;
      all  = '0;
      for (int k = 0; k < I; k++) begin
        eg[k] = '0;
        if (fu_enable[k]) begin
          for (int i = 0; i < N; i++) begin
            if (left[i] && !(a[k] && ptype[i])) begin
              eg[k][i] = 1'b1;
              left[i]  = 1'b0;
              break;
            end
          end
        end
        all |= eg[k];
        checks++;
        if (grant[k] !== eg[k] || fu_valid[k] !== (eg[k] != '0)) begin
          failures++;
          $display("t=%0d FU%0d grant=%h exp=%h", t, k, grant[k], eg[k]);
        end
      end
      checks++;
      if (issued !== all) begin failures++; $display("issued=%h exp=%h", issued, all); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
