// Self-checking testbench of phase_reg_element.
//
// Drives j, ckj and ckk with random single-input changes (one input every
// 10 ns, as the element is specified for single input changes) and keeps a
// reference state: set on a rising ckj while j=1, cleared on a rising ckk,
// unchanged otherwise. q and q_n are compared with it after every change.
// Preset and clear are exercised at the start and a few times in between.
// A watchdog ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module tb_phase_reg_element;

  logic j, ckj, ckk, pr_n, clr_n;
  logic q, q_n;
  logic exp_q;
  int checks = 0, failures = 0;
  int sets = 0, resets = 0;

  phase_reg_element dut (.j, .ckj, .ckk, .pr_n, .clr_n, .q, .q_n);

  task automatic check(string what);
    checks++;
    if (q !== exp_q || q_n !== ~exp_q) begin
      failures++;
      $display("FAIL %s at %0t: q=%b q_n=%b expected %b", what, $time, q, q_n, exp_q);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    j = 0; ckj = 0; ckk = 0; pr_n = 1; clr_n = 1;
    #1 clr_n = 0; exp_q = 0;
    #9 check("clear");
    clr_n = 1; #10 check("clear released");
    pr_n = 0; exp_q = 1; #10 check("preset");
    pr_n = 1; #10 check("preset released");
    // ckj edge while set must not matter; ckk edge clears.
    j = 1; #10; ckj = 1; #10 check("ckj while set"); ckj = 0; #10;
    ckk = 1; exp_q = 0; #10 check("ckk clears"); resets++;
    // ckj rising while ckk still high sets (ckk value arbitrary).
    ckj = 1; exp_q = 1; #10 check("ckj sets with ckk high"); sets++;
    // ckk falling and rising again clears even though j=1 and ckj=1.
    ckk = 0; #10 check("ckk falls"); ckk = 1; exp_q = 0; #10 check("ckk clears with j=1"); resets++;
    ckj = 0; #10 check("ckj falls"); ckk = 0; #10;
    // j low: ckj edge does nothing.
    j = 0; #10; ckj = 1; #10 check("ckj with j=0"); ckj = 0; #10 check("ckj low");

    // Random single input changes.
    for (int n = 0; n < 4000; n++) begin
      int unsigned pick;
      pick = $urandom_range(0, 99);
      if (pick < 30) begin
        j = ~j;
      end else if (pick < 62) begin
        ckj = ~ckj;
        if (ckj && !exp_q && j) begin exp_q = 1; sets++; end
      end else if (pick < 95) begin
        ckk = ~ckk;
        if (ckk && exp_q) begin exp_q = 0; resets++; end
      end else if (pick < 97) begin
        clr_n = 0; exp_q = 0; #5 check("random clear"); clr_n = 1;
      end else begin
        pr_n = 0; exp_q = 1; #5 check("random preset"); pr_n = 1;
      end
      #10 check("random");
    end
    if (sets < 50 || resets < 50) begin
      failures++;
      $display("FAIL too few transitions: sets=%0d resets=%0d", sets, resets);
    end
    $display("sets=%0d resets=%0d", sets, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
