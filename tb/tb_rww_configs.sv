// tb_rww_configs: the scheduler configurations compared in the evaluation, each running
// the same synthetic 5000-instruction program (rww_run): the full-width I6W6 scheduler,
// the basic reduced-wakeup-width I6W3 and I6W2, narrow schedulers of similar wakeup
// latency I3W3 and I2W2, and I6W3 / I6W2 with RWIS, RTD-1 and RTD-2. Every run is checked
// for correct dependences and completion; the instructions-per-cycle of each are printed.
// Expected trends, checked: the full-width scheduler is at least as fast as any reduced
// one; a reduced-wakeup scheduler beats the narrow scheduler with the same wakeup width
// (I6W3 vs I3W3, I6W2 vs I2W2). How RWIS and RTD compare with basic RWW depends on the
// program, so those results are only printed.
module tb_rww_configs;
  localparam int NC = 10;
  localparam int NPROG = 5000;
  logic clk = 0, rst_n = 0;
  logic done [NC];
  int cycles[NC], chk[NC], fl[NC], dly[NC];
  int checks = 0, failures = 0;
  string names[NC] = '{"I6W6", "I6W3 RWW", "I6W2 RWW", "I3W3", "I2W2",
                       "I6W3 RWIS", "I6W3 RTD-1", "I6W3 RTD-2", "I6W2 RWIS", "I6W2 RTD-1"};

  always #5 clk = ~clk;

  rww_run #(.ISSUE_W(6), .WAKE_W(6), .RWIS_EN(0), .RTD_LIMIT(0), .NPROG(NPROG)) r0 (clk, rst_n, done[0], cycles[0], chk[0], fl[0], dly[0]);
  rww_run #(.ISSUE_W(6), .WAKE_W(3), .RWIS_EN(0), .RTD_LIMIT(0), .NPROG(NPROG)) r1 (clk, rst_n, done[1], cycles[1], chk[1], fl[1], dly[1]);
  rww_run #(.ISSUE_W(6), .WAKE_W(2), .RWIS_EN(0), .RTD_LIMIT(0), .NPROG(NPROG)) r2 (clk, rst_n, done[2], cycles[2], chk[2], fl[2], dly[2]);
  rww_run #(.ISSUE_W(3), .WAKE_W(3), .RWIS_EN(0), .RTD_LIMIT(0), .NPROG(NPROG)) r3 (clk, rst_n, done[3], cycles[3], chk[3], fl[3], dly[3]);
  rww_run #(.ISSUE_W(2), .WAKE_W(2), .RWIS_EN(0), .RTD_LIMIT(0), .NPROG(NPROG)) r4 (clk, rst_n, done[4], cycles[4], chk[4], fl[4], dly[4]);
  rww_run #(.ISSUE_W(6), .WAKE_W(3), .RWIS_EN(1), .RTD_LIMIT(0), .NPROG(NPROG)) r5 (clk, rst_n, done[5], cycles[5], chk[5], fl[5], dly[5]);
  rww_run #(.ISSUE_W(6), .WAKE_W(3), .RWIS_EN(1), .RTD_LIMIT(1), .NPROG(NPROG)) r6 (clk, rst_n, done[6], cycles[6], chk[6], fl[6], dly[6]);
  rww_run #(.ISSUE_W(6), .WAKE_W(3), .RWIS_EN(1), .RTD_LIMIT(2), .NPROG(NPROG)) r7 (clk, rst_n, done[7], cycles[7], chk[7], fl[7], dly[7]);
  rww_run #(.ISSUE_W(6), .WAKE_W(2), .RWIS_EN(1), .RTD_LIMIT(0), .NPROG(NPROG)) r8 (clk, rst_n, done[8], cycles[8], chk[8], fl[8], dly[8]);
  rww_run #(.ISSUE_W(6), .WAKE_W(2), .RWIS_EN(1), .RTD_LIMIT(1), .NPROG(NPROG)) r9 (clk, rst_n, done[9], cycles[9], chk[9], fl[9], dly[9]);

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ipc(input int c);
    return real'(NPROG) / real'(c);
  endfunction

  task automatic expect_ge(input int fast, input int slow);
    checks++;
    if (cycles[fast] > cycles[slow]) begin
      failures++;
      $display("expected %s (%0d cycles) no slower than %s (%0d cycles)",
               names[fast], cycles[fast], names[slow], cycles[slow]);
    end
  endtask

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int i = 0; i < NC; i++) all &= done[i];
    end while (!all);
    for (int i = 0; i < NC; i++) begin
      checks += chk[i];
      failures += fl[i];
      $display("%-11s cycles=%6d IPC=%0.3f delayed tags=%0d (%0.1f%% of IPC of I6W6)", names[i],
               cycles[i], ipc(cycles[i]), dly[i], 100.0 * real'(cycles[0]) / real'(cycles[i]));
    end
    for (int i = 1; i < NC; i++) expect_ge(0, i);
    expect_ge(1, 3);
    expect_ge(2, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
