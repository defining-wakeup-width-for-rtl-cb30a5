// tb_tagline_ctrl: random indicator patterns into tag-line controllers for groups of two
// and three latches. Expected: exactly one driver enabled whenever any indicator is set,
// chosen round-robin after the last winner, with that latch's tag on the line.
module tb_tagline_ctrl;
  import rww_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] ind2, drv2;
  logic [2:0] ind3, drv3;
  tag_t [1:0] tag2;
  tag_t [2:0] tag3;
  tagline_t tl2, tl3;
  int checks = 0, failures = 0;

  tagline_ctrl #(.GROUP(2)) u2 (.clk(clk), .rst_n(rst_n), .indicator(ind2), .tag(tag2), .drive(drv2), .tagline(tl2));
  tagline_ctrl #(.GROUP(3)) u3 (.clk(clk), .rst_n(rst_n), .indicator(ind3), .tag(tag3), .drive(drv3), .tagline(tl3));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rr_pick(input int ptr, input logic [2:0] ind, input int g);
    for (int o = 0; o < g; o++) if (ind[(ptr + o) % g]) return (ptr + o) % g;
    return -1;
  endfunction

  initial begin
    int p2, p3, w2, w3;
    ind2 = 0; ind3 = 0; tag2 = '0; tag3 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    p2 = 0; p3 = 0;
    for (int t = 0; t < 3000; t++) begin
      ind2 = 2'($urandom);
      ind3 = 3'($urandom);
      if (t % 5 == 0) begin ind2 = '1; ind3 = '1; end   // both/all waiting: contention
      for (int j = 0; j < 2; j++) tag2[j] = tag_t'($urandom);
      for (int j = 0; j < 3; j++) tag3[j] = tag_t'($urandom);
      #1;
      w2 = rr_pick(p2, {1'b0, ind2}, 2);
      w3 = rr_pick(p3, ind3, 3);
      checks++;
      if (w2 < 0 ? (drv2 !== 0 || tl2.valid !== 0)
                 : (drv2 !== 2'(1 << w2) || tl2.valid !== 1 || tl2.tag !== tag2[w2])) begin
        failures++; $display("t=%0d G2 ind=%b drv=%b exp winner %0d", t, ind2, drv2, w2);
      end
      checks++;
      if (w3 < 0 ? (drv3 !== 0 || tl3.valid !== 0)
                 : (drv3 !== 3'(1 << w3) || tl3.valid !== 1 || tl3.tag !== tag3[w3])) begin
        failures++; $display("t=%0d G3 ind=%b drv=%b exp winner %0d", t, ind3, drv3, w3);
      end
      @(negedge clk);
      if (w2 >= 0) p2 = (w2 + 1) % 2;
      if (w3 >= 0) p3 = (w3 + 1) % 3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
