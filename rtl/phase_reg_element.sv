// Phase register element: the edge-sensitive asynchronous cell from which
// every phase of a flow-diagram network is built.
//
// Behaviour: q rises when ckj rises while j=1; q falls when ckk rises. A rising
// ckj while q=1, a rising ckk while q=0 and any falling edge do nothing, and j
// may change freely while q=1. pr_n / clr_n are asynchronous, active low and
// override everything (clear wins if both are low;
// a clear that arrives while preset is already held does not act until
// preset is released), as on a 7474 D flip-flop.
//
// How: a single edge-triggered D flip-flop. Its clock is steered by its own
// state (ckj while q=0, ckk while q=1) and its data input is j AND NOT q, so
// a clock edge while q=0 loads j and a clock edge while q=1 loads 0. The
// steering never makes an edge of its own: when q changes because the
// selected input rose, that input is high, and the newly selected input is
// either high too (no edge) or low (a falling edge, which does nothing).
//
// Timing: fully asynchronous; q follows the triggering edge after one
// flip-flop delay. j must be stable around the rising ckj (set-up and hold of
// the flip-flop); that is the only timing rule. The set/reset behaviour is the
// one required of the element; building it on a 7474 D flip-flop follows the
// reference realisation, while the exact gating around the flip-flop is this
// design's own.
//
// Lint tools report q as used both as data and, through the steering, as
// part of a clock; that self-steered clock is the essence of the cell and is
// intended.
module phase_reg_element (
  input  logic j,      // enable: branch function G AND previous phase
  input  logic ckj,    // set trigger (trigger function F)
  input  logic ckk,    // reset trigger (OR of the next phases)
  input  logic pr_n,   // asynchronous preset, active low
  input  logic clr_n,  // asynchronous clear, active low
  output logic q,
  output logic q_n
);

  logic ck;  // steered clock of the flip-flop
  logic d;   // data of the flip-flop

  assign ck = q ? ckk : ckj;
  assign d  = j & ~q;

  // Preset and clear form one asynchronous load; the value loaded is 0
  // whenever clear is active, so clear wins.
  logic aload;
  assign aload = ~clr_n | ~pr_n;

  always_ff @(posedge ck or posedge aload) begin
    if (aload) q <= clr_n;
    else       q <= d;
  end

  assign q_n = ~q;

endmodule
