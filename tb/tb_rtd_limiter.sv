// tb_rtd_limiter: random waiting-tag patterns into RTD-1 and RTD-2 limiters of a
// two-FU group and an RTD-1 limiter of a three-FU group; block must follow the
// previous cycle's count of waiting tags.
module tb_rtd_limiter;
  logic clk = 0, rst_n = 0;
  logic [1:0] w2;
  logic [2:0] w3;
  logic b21, b22, b31;
  int checks = 0, failures = 0;
  int prev2, prev3;
  int nblk = 0;

  rtd_limiter #(.GROUP(2), .LIMIT(1)) u21 (.clk(clk), .rst_n(rst_n), .waiting(w2), .block(b21));
  rtd_limiter #(.GROUP(2), .LIMIT(2)) u22 (.clk(clk), .rst_n(rst_n), .waiting(w2), .block(b22));
  rtd_limiter #(.GROUP(3), .LIMIT(1)) u31 (.clk(clk), .rst_n(rst_n), .waiting(w3), .block(b31));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w2 = 0; w3 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev2 = 0; prev3 = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // new waiting pattern first: block must still reflect the pattern of the last edge
      w2 = 2'($urandom);
      w3 = 3'($urandom);
      #1;
      checks++;
      if (b21 !== (prev2 >= 1) || b22 !== (prev2 >= 2) || b31 !== (prev3 >= 1)) begin
        failures++;
        $display("t=%0d blocks %b%b%b prev %0d %0d", t, b21, b22, b31, prev2, prev3);
      end
      if (b22) nblk++;
      prev2 = $countones(w2);
      prev3 = $countones(w3);
    end
    checks++;
    if (nblk == 0) begin failures++; $display("RTD-2 block never raised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
