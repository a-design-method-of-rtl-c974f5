// Two-phase running clock generator, itself a four-phase phase register.
//
// From one square clock it derives two non-overlapping clocks for the
// clocked (sampling) phase register of the channel selection register. The
// phases run A -> B -> C -> D -> A:
//   B <- A  on clock rise,   C <- B  on clock fall,
//   D <- C  on clock rise,   A <- D  on clock fall.
// clock1 is phase B and clock2 is phase D (K0-type outputs equal to 1 in
// those phases), so clock1 is high during every second high half-period of
// clock and clock2 during the high half-periods in between. Both have half
// the frequency of clock, and they never overlap: between them lies a
// complete low half-period of clock (phases C and A).
//
// init (active high, asynchronous) forces phase A; the generator starts on
// the first rising clock edge after init falls, so clock1 comes first.
//
// The phase sequence and the outputs follow the reference flow diagram;
// the init input and the choice of A as initial phase are this design's own.
module two_phase_clock_gen (
  input  logic       clock,
  input  logic       init,
  output logic       clock1,
  output logic       clock2,
  output logic [3:0] phase   // {D, C, B, A}
);

  logic pa, pb, pc, pd;
  logic init_n, clock_n;

  assign init_n  = ~init;
  assign clock_n = ~clock;

  phase_cell #(.M(1)) u_a (
    .j(pd), .ckj(clock_n), .ckk(pb), .pr_n(init_n), .clr_n(1'b1),
    .q(pa), .elem_q());

  phase_cell #(.M(1)) u_b (
    .j(pa), .ckj(clock), .ckk(pc), .pr_n(1'b1), .clr_n(init_n),
    .q(pb), .elem_q());

  phase_cell #(.M(1)) u_c (
    .j(pb), .ckj(clock_n), .ckk(pd), .pr_n(1'b1), .clr_n(init_n),
    .q(pc), .elem_q());

  phase_cell #(.M(1)) u_d (
    .j(pc), .ckj(clock), .ckk(pa), .pr_n(1'b1), .clr_n(init_n),
    .q(pd), .elem_q());

  assign clock1 = pb;
  assign clock2 = pd;
  assign phase  = {pd, pc, pb, pa};

endmodule
