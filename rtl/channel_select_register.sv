// Channel selection register of a control unit shared by two IBM 360
// channels (A and B), built as a clocked phase register.
//
// Phase CS1 means "free": neither channel is connected. On every rising
// clock1 in CS1 the register samples both channels' initial-selection
// condition, Select Out AND Hold Out AND Address Out AND own-address-
// recognised. If channel A's holds it moves to CS2 (output sel_a=1, channel A
// is transferring data); otherwise, if channel B's holds, to CS3 (sel_b=1).
// In CS2 it returns to CS1 on a rising clock2 while ar=1 (final status sent
// on channel A); CS3 likewise with br. sel_a and sel_b are never 1 together.
//
// Because both channels are unrelated computers, their selection sequences
// may start at the same instant; sampling them with the running clock clock1
// (instead of triggering on their own edges) is what keeps the phase
// register one-hot. The sampled condition must be stable for the set-up and
// hold time of the element around the clock1 edge. ar/br may come at any time
// relative to clock1, hence the second clock phase clock2 for the return.
// For every request to be seen, inputs should last at least two periods of
// clock1/clock2.
//
// init (active high, asynchronous) forces CS1. The phase structure follows
// the reference flow diagram. Giving channel A precedence when both are
// sampled true at the same clock1 edge, and the init input, are this
// design's own choices. The busy answer to the second channel and the
// service request of the complete control unit are outside this register.
module channel_select_register
  import asyncfd_pkg::*;
(
  input  logic      init,
  input  logic      clock1,
  input  logic      clock2,
  input  chan_req_t a_req,
  input  chan_req_t b_req,
  input  logic      ar,
  input  logic      br,
  output logic      sel_a,
  output logic      sel_b,
  output logic [2:0] phase   // {CS3, CS2, CS1}
);

  logic cs1, cs2, cs3;
  logic ga, gb;
  logic init_n;

  assign init_n = ~init;
  assign ga = a_req.selo & a_req.hldo & a_req.adro & a_req.ident;
  assign gb = b_req.selo & b_req.hldo & b_req.adro & b_req.ident;

  // CS1: entered from CS2 (ar) or CS3 (br), one element each, both on clock2.
  phase_cell #(.M(2)) u_cs1 (
    .j({cs3 & br, cs2 & ar}), .ckj({clock2, clock2}),
    .ckk(cs2 | cs3), .pr_n(init_n), .clr_n(1'b1),
    .q(cs1), .elem_q());

  phase_cell #(.M(1)) u_cs2 (
    .j(cs1 & ga), .ckj(clock1),
    .ckk(cs1), .pr_n(1'b1), .clr_n(init_n),
    .q(cs2), .elem_q());

  phase_cell #(.M(1)) u_cs3 (
    .j(cs1 & gb & ~ga), .ckj(clock1),
    .ckk(cs1), .pr_n(1'b1), .clr_n(init_n),
    .q(cs3), .elem_q());

  assign sel_a = cs2;
  assign sel_b = cs3;
  assign phase = {cs3, cs2, cs1};

endmodule
