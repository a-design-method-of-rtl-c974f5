// D-G flip-flop of the output part (the D instruction).
//
// While gate=1 the output follows d; when gate falls the value present at
// that moment is held until gate rises again. gate is the OR of the phases
// that hold the D instruction for this output and d is the instruction's
// function K_D, so the output follows K_D during those phases and keeps the
// last value when the next phase appears. init forces 0.
//
// A transparent latch by intent; it has no clock. The init input is this
// design's own addition.
module dg_flipflop (
  input  logic d,
  input  logic gate,
  input  logic init,
  output logic z
);

  always_latch begin
    if (init)      z <= 1'b0;
    else if (gate) z <= d;
  end

endmodule
