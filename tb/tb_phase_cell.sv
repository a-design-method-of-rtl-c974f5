// Self-checking testbench of phase_cell with three elements (M=3).
//
// Drives the per-element j/ckj pairs and the shared ckk with random single
// input changes and keeps a reference state per element (set on its own
// rising ckj while its j=1, all cleared on a rising ckk). Checks elem_q and
// that q is their OR, and that preset sets element 0 only while clear clears
// all. Ends with a watchdog.
`timescale 1ns/1ps
module tb_phase_cell;

  localparam int unsigned M = 3;

  logic [M-1:0] j, ckj, elem_q, exp_e;
  logic ckk, pr_n, clr_n, q;
  int checks = 0, failures = 0;
  int set_cnt [M];

  phase_cell #(.M(M)) dut (.j, .ckj, .ckk, .pr_n, .clr_n, .q, .elem_q);

  task automatic check(string what);
    checks++;
    if (elem_q !== exp_e || q !== (|exp_e)) begin
      failures++;
      $display("FAIL %s at %0t: elem_q=%b q=%b expected %b", what, $time, elem_q, q, exp_e);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    j = '0; ckj = '0; ckk = 0; pr_n = 1; clr_n = 1;
    foreach (set_cnt[k]) set_cnt[k] = 0;
    #1 clr_n = 0; exp_e = '0;
    #9 check("clear");
    clr_n = 1; #10;
    pr_n = 0; exp_e = 3'b001; #10 check("preset sets element 0 only");
    pr_n = 1; #10 check("preset released");
    ckk = 1; exp_e = '0; #10 check("shared ckk clears"); ckk = 0; #10;
    for (int n = 0; n < 6000; n++) begin
      int unsigned pick, k;
      pick = $urandom_range(0, 99);
      k = $urandom_range(0, M-1);
      if (pick < 35) begin
        j[k] = ~j[k];
      end else if (pick < 70) begin
        ckj[k] = ~ckj[k];
        if (ckj[k] && j[k] && !exp_e[k]) begin exp_e[k] = 1'b1; set_cnt[k]++; end
      end else if (pick < 98) begin
        ckk = ~ckk;
        if (ckk) exp_e = '0;
      end else begin
        clr_n = 0; exp_e = '0; #5 check("random clear"); clr_n = 1;
      end
      #10 check("random");
    end
    foreach (set_cnt[k])
      if (set_cnt[k] < 20) begin
        failures++;
        $display("FAIL element %0d set only %0d times", k, set_cnt[k]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
