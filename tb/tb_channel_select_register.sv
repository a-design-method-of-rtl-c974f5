// Self-checking testbench of channel_select_register.
//
// The two clock phases are generated here: period 40 ns, clock1 high from 0
// to 10 ns, clock2 high from 20 to 30 ns. Channel requests and the release
// signals ar/br change at random, but only at 5, 15, 25 and 35 ns into a
// period, i.e. never at a clock edge (the sampled signals must meet the
// element's set-up and hold time). A request is often presented as the full
// selection condition (Select Out, Hold Out, Address Out, address
// recognised) and otherwise as a random mix of the four.
//
// Reference: in CS1 a rising clock1 moves to CS2 if channel A's condition
// holds, otherwise to CS3 if channel B's holds; CS2 returns to CS1 on a rising
// clock2 while ar=1, CS3 while br=1. sel_a, sel_b and the phase vector are
// compared with it 2 ns after every edge and every input change. Counted and
// required: grants to A and to B, simultaneous requests (A wins), requests of
// the other channel ignored while one is connected, releases, and init.
`timescale 1ns/1ps
module tb_channel_select_register;
  import asyncfd_pkg::*;

  localparam int unsigned PERIODS = 5000;

  logic init, clock1, clock2, ar, br, sel_a, sel_b;
  chan_req_t a_req, b_req;
  logic [2:0] phase;
  logic [2:0] exp_phase;  // {CS3, CS2, CS1}
  int checks = 0, failures = 0;
  int grant_a = 0, grant_b = 0, ties = 0, busy = 0, rel_a = 0, rel_b = 0, inits = 0;

  channel_select_register dut (.init, .clock1, .clock2, .a_req, .b_req, .ar, .br,
                               .sel_a, .sel_b, .phase);

  function automatic logic cond(chan_req_t r);
    return r.selo & r.hldo & r.adro & r.ident;
  endfunction

  task automatic check(string what);
    checks++;
    if (phase !== exp_phase || sel_a !== exp_phase[1] || sel_b !== exp_phase[2]) begin
      failures++;
      $display("FAIL %s at %0t: phase=%b sel_a=%b sel_b=%b expected phase %b",
               what, $time, phase, sel_a, sel_b, exp_phase);
    end
  endtask

  function automatic chan_req_t new_req();
    if ($urandom_range(0, 2) == 0) return '1;
    return chan_req_t'($urandom_range(0, 15));
  endfunction

  task automatic random_inputs();
    int unsigned p;
    p = $urandom_range(0, 99);
    if (p < 12)      a_req = new_req();
    else if (p < 24) b_req = new_req();
    else if (p < 30) begin a_req = new_req(); b_req = new_req(); end
    else if (p < 45) ar = ~ar;
    else if (p < 60) br = ~br;
    else if (p == 60) begin
      init = 1'b1; exp_phase = 3'b001; inits++;
    end else if (init && p < 90) init = 1'b0;
    #2 check("input change");
  endtask

  initial begin
    #(PERIODS * 40ns + 10us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clock1 = 0; clock2 = 0; ar = 0; br = 0; a_req = '0; b_req = '0; init = 0;
    exp_phase = 3'b001;
    #1 init = 1;
    #4 check("init");
    init = 0;
    #1;
    for (int n = 0; n < PERIODS; n++) begin
      // clock1 edge
      clock1 = 1'b1;
      if (!init && exp_phase == 3'b001) begin
        if (cond(a_req)) begin
          exp_phase = 3'b010; grant_a++;
          if (cond(b_req)) ties++;
        end else if (cond(b_req)) begin
          exp_phase = 3'b100; grant_b++;
        end
      end else if (!init && ((exp_phase[1] && cond(b_req)) || (exp_phase[2] && cond(a_req))))
        busy++;
      #2 check("clock1 rise");
      #3 random_inputs();
      #3 clock1 = 1'b0;
      #2 random_inputs();
      #3;
      // clock2 edge
      clock2 = 1'b1;
      if (!init && exp_phase[1] && ar) begin exp_phase = 3'b001; rel_a++; end
      if (!init && exp_phase[2] && br) begin exp_phase = 3'b001; rel_b++; end
      #2 check("clock2 rise");
      #3 random_inputs();
      #3 clock2 = 1'b0;
      #2 random_inputs();
      #3;
    end
    $display("grant_a=%0d grant_b=%0d ties=%0d busy=%0d rel_a=%0d rel_b=%0d inits=%0d",
             grant_a, grant_b, ties, busy, rel_a, rel_b, inits);
    if (grant_a < 5 || grant_b < 5 || ties < 2 || busy < 5 || rel_a < 5 || rel_b < 5 || inits < 2) begin
      failures++;
      $display("FAIL a mechanism was not exercised often enough");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
