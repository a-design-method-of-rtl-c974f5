// Self-checking testbench of sr_flipflop: random s, r and init levels, one
// change at a time, compared with a reference (init -> 0, else s -> 1,
// else r -> 0, else hold). Ends with a watchdog.
`timescale 1ns/1ps
module tb_sr_flipflop;

  logic s, r, init, z, z_n, exp_z;
  int checks = 0, failures = 0;
  int sets = 0, resets = 0;

  sr_flipflop dut (.s, .r, .init, .z, .z_n);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 0; r = 0; init = 1; exp_z = 0;
    #10;
    for (int n = 0; n < 3000; n++) begin
      int unsigned pick;
      pick = $urandom_range(0, 99);
      if (pick < 45)      s = ~s;
      else if (pick < 90) r = ~r;
      else                init = ~init;
      if (init)   exp_z = 0;
      else if (s) begin if (!exp_z) sets++;   exp_z = 1; end
      else if (r) begin if (exp_z)  resets++; exp_z = 0; end
      #10;
      checks++;
      if (z !== exp_z || z_n !== ~exp_z) begin
        failures++;
        $display("FAIL at %0t: s=%b r=%b init=%b z=%b expected %b", $time, s, r, init, z, exp_z);
      end
    end
    if (sets < 20 || resets < 20) begin
      failures++;
      $display("FAIL too few transitions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
