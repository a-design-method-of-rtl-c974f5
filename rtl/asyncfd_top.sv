// Top level: the two phase-register circuits side by side.
//
// 1. data_transfer_block: the asynchronous (clockless) data transfer block
//    between an IBM 360 selector channel and a high-speed peripheral, with all
//    its channel, peripheral and control-unit signals brought out.
// 2. The clocked channel selection register for two channels, fed by the
//    two-phase clock generator: one square clock in, the two derived clock
//    phases brought out for observation.
// 3. A D-G output flip-flop, the output cell for D instructions, which
//    neither circuit needs; it is brought out on its own ports so that the
//    complete set of output cells is available.
//
// The circuits share no signal. There is no clock in part 1; part 2 runs on
// 'clock'. Each part's timing is described in its own module.
module asyncfd_top
  import asyncfd_pkg::*;
(
  // data transfer block
  input  logic zer,
  input  logic start,
  input  logic rdy,
  input  logic infrdy,
  input  logic wr,
  input  logic parf,
  input  logic uc,
  input  logic sero,
  input  logic cmdo,
  input  logic adro,
  output logic seri,
  output logic infst,
  output logic [DT_NUM_PHASES:1] ph,
  // channel selection register
  input  logic      cs_init,
  input  logic      clock,
  input  chan_req_t chan_a_req,
  input  chan_req_t chan_b_req,
  input  logic      ar,
  input  logic      br,
  output logic      sel_a,
  output logic      sel_b,
  output logic      clock1,
  output logic      clock2,
  output logic [2:0] cs_phase,
  // D-G output cell
  input  logic dg_d,
  input  logic dg_gate,
  input  logic dg_init,
  output logic dg_q
);

  data_transfer_block u_dtb (
    .zer, .start, .rdy, .infrdy, .wr, .parf, .uc, .sero, .cmdo, .adro,
    .seri, .infst, .ph);

  logic [3:0] clk_phase;

  two_phase_clock_gen u_clkgen (
    .clock, .init(cs_init), .clock1, .clock2, .phase(clk_phase));

  channel_select_register u_csr (
    .init(cs_init), .clock1, .clock2,
    .a_req(chan_a_req), .b_req(chan_b_req), .ar, .br,
    .sel_a, .sel_b, .phase(cs_phase));

  dg_flipflop u_dg (.d(dg_d), .gate(dg_gate), .init(dg_init), .z(dg_q));

endmodule
