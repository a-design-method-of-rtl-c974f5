// Self-checking testbench of dg_flipflop: random d, gate and init levels,
// one change at a time, compared with a reference (init -> 0, else follow d
// while gate=1, else hold). Ends with a watchdog.
`timescale 1ns/1ps
module tb_dg_flipflop;

  logic d, gate, init, z, exp_z;
  int checks = 0, failures = 0;
  int holds = 0;

  dg_flipflop dut (.d, .gate, .init, .z);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0; gate = 0; init = 1; exp_z = 0;
    #10;
    for (int n = 0; n < 3000; n++) begin
      int unsigned pick;
      pick = $urandom_range(0, 99);
      if (pick < 60)      d = ~d;
      else if (pick < 92) gate = ~gate;
      else                init = ~init;
      if (init)      exp_z = 0;
      else if (gate) exp_z = d;
      else if (d != exp_z) holds++;
      #10;
      checks++;
      if (z !== exp_z) begin
        failures++;
        $display("FAIL at %0t: d=%b gate=%b init=%b z=%b expected %b", $time, d, gate, init, z, exp_z);
      end
    end
    if (holds < 20) begin
      failures++;
      $display("FAIL hold case seen only %0d times", holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
