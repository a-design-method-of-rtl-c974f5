// Self-checking testbench of two_phase_clock_gen.
//
// Drives a square clock whose half-periods vary randomly between 4 and 16 ns
// (the generator is asynchronous and must not depend on a fixed period).
// Reference: after init is released, the rising clock edges are numbered
// 1, 2, 3, ...; clock1 must be high exactly during the high half-period that
// follows an odd-numbered edge, clock2 during the one that follows an
// even-numbered edge, and both must be low in every low half-period. The
// outputs are checked 1 ns after every clock edge and again just before the
// next one, and the pulse counts give the rate: one clock1 and one clock2
// pulse per two clock periods. init is reapplied once mid-run. Watchdog.
`timescale 1ns/1ps
module tb_two_phase_clock_gen;

  localparam int unsigned PERIODS = 4000;

  logic clock, init, clock1, clock2;
  logic [3:0] phase;
  int checks = 0, failures = 0;
  int rises = 0, c1_pulses = 0, c2_pulses = 0, c1_exp = 0, c2_exp = 0;

  two_phase_clock_gen dut (.clock, .init, .clock1, .clock2, .phase);

  always @(posedge clock1) c1_pulses++;
  always @(posedge clock2) c2_pulses++;

  task automatic check(logic e1, logic e2, string what);
    checks++;
    if (clock1 !== e1 || clock2 !== e2 || !$onehot(phase)) begin
      failures++;
      $display("FAIL %s at %0t: clock1=%b clock2=%b phase=%b expected %b %b",
               what, $time, clock1, clock2, phase, e1, e2);
    end
  endtask

  task automatic run(int unsigned n);
    for (int unsigned k = 0; k < n; k++) begin
      int unsigned hi, lo;
      logic e1, e2;
      hi = $urandom_range(4, 16);
      lo = $urandom_range(4, 16);
      clock = 1'b1;
      rises++;
      e1 = rises[0];
      e2 = !rises[0];
      if (e1) c1_exp++; else c2_exp++;
      #1 check(e1, e2, "after rise");
      #(hi - 2) check(e1, e2, "end of high");
      #1 clock = 1'b0;
      #1 check(1'b0, 1'b0, "after fall");
      #(lo - 2) check(1'b0, 1'b0, "end of low");
      #1;
    end
  endtask

  initial begin
    #(PERIODS * 40ns + 10us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clock = 0; init = 0;
    #2 init = 1;
    #5 check(1'b0, 1'b0, "init");
    if (phase !== 4'b0001) begin failures++; $display("FAIL init phase %b", phase); end
    // clock keeps running while init is held: nothing may move
    for (int k = 0; k < 3; k++) begin
      #5 clock = 1; #1 check(1'b0, 1'b0, "held by init"); #4 clock = 0;
    end
    #5 init = 0;
    #5 run(PERIODS / 2);
    // re-initialise in the middle of a clock1 or clock2 pulse
    clock = 1;
    if (rises[0]) c2_exp++; else c1_exp++;  // this edge still starts a pulse
    #3 init = 1; #2 check(1'b0, 1'b0, "init mid-pulse");
    clock = 0; #5 init = 0; #5;
    rises = 0;
    run(PERIODS / 2);
    if (c1_pulses != c1_exp || c2_pulses != c2_exp) begin
      failures++;
      $display("FAIL pulse count clock1=%0d/%0d clock2=%0d/%0d", c1_pulses, c1_exp, c2_pulses, c2_exp);
    end
    $display("clock1 pulses=%0d clock2 pulses=%0d", c1_pulses, c2_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
