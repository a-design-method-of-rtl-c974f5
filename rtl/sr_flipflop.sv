// S-R flip-flop of the output part.
//
// Holds an output that a SET instruction raises and a RESET instruction
// lowers. s is the OR of (phase AND K_S) over the phases holding a SET
// instruction for this output, r likewise for RESET. The output goes to 1
// while s=1, to 0 while r=1, and keeps its value while both are 0. A correct
// flow diagram never drives s and r together; should it happen, s wins.
// init forces 0 and overrides both (used to bring the output to its initial
// value together with the phase register).
//
// It is level-sensitive storage with no clock: written as a latch on purpose,
// which is what the cross-coupled-gate flip-flop of the reference network is.
// The init input is this design's own addition.
module sr_flipflop (
  input  logic s,
  input  logic r,
  input  logic init,
  output logic z,
  output logic z_n
);

  always_latch begin
    if (init)   z <= 1'b0;
    else if (s) z <= 1'b1;
    else if (r) z <= 1'b0;
  end

  assign z_n = ~z;

endmodule
