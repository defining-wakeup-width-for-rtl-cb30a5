// tb_arbiter_cell: exhaustive check of the two-input select-tree cell against its
// priority equations (input 0 wins, grants only with enable).
module tb_arbiter_cell;
  logic req0, req1, enable, any_req, grant0, grant1;
  int checks = 0, failures = 0;

  arbiter_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {enable, req1, req0} = 3'(v);
      #1;
      checks++;
      if (any_req !== (req0 || req1)) begin failures++; $display("any_req wrong v=%0d", v); end
      checks++;
      if (grant0 !== (enable && req0)) begin failures++; $display("grant0 wrong v=%0d", v); end
      checks++;
      if (grant1 !== (enable && !req0 && req1)) begin failures++; $display("grant1 wrong v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
