// Data transfer block between an IBM 360 selector channel and a high-speed
// peripheral, built as an asynchronous one-hot phase register.
//
// The block moves bytes one at a time. Reading (wr=0): the peripheral ends a
// byte with an INFRDY impulse, the block raises Service In (SERI) to the
// channel, the channel answers with Service Out (SERO) up and down, and the
// block tells the peripheral it may send the next byte (INFST). Writing
// (wr=1): the block raises SERI, the channel delivers a byte with SERO, the
// block passes it on with INFST and waits for the peripheral's INFRDY. The
// exits hand control back to the channel-side control unit: Command Out in
// answer to SERI (byte count done, PH7), Address Out while a read byte is
// offered (interface disconnect, PH5), a parity error on a written byte
// (PH8), or a peripheral error UC at the end of a byte (PH11). The next RDY
// impulse of the peripheral brings the block back to PH1.
//
// Phase transitions (each is one phase register element, J / CKJ):
//   PH1  <- (PH5+PH7+PH8+PH11)      on RDY rise     (one shared element)
//   PH2  <- PH1 & ~WR                on START rise
//   PH2  <- PH4                      on SERO fall
//   PH3  <- PH2 & ~UC                on INFRDY rise
//   PH4  <- PH3                      on SERO rise
//   PH5  <- PH3                      on ADRO rise
//   PH6  <- PH1 & WR                 on START rise
//   PH6  <- PH10 & ~UC               on INFRDY rise
//   PH7  <- PH3 + PH6                on CMDO rise
//   PH8  <- PH6 & PARF               on SERO rise
//   PH9  <- PH6 & ~PARF              on SERO rise
//   PH10 <- PH9                      on SERO fall
//   PH11 <- (PH2+PH10) & UC          on INFRDY rise
// Each phase is reset (CKK) by the OR of the phases that can follow it.
// Outputs: INFST is set in PH2, PH4, PH9 and reset in PH3, PH6, PH11;
// SERI = PH3 + PH6. ph[i] is phase PHi.
//
// Initialisation: while zer=1, PH1 is preset and every other phase and INFST
// are cleared; zer has priority over all other inputs.
//
// Timing: no clock. Each phase change follows its triggering input edge after
// one element delay plus the OR of the phase; the preceding phase clears one
// OR-gate and element delay later. Inputs must change one at a time (single
// input changes) and slower than that settling time.
//
// The phase functions, the output functions and the initialisation follow the
// worked example. ADRO is an input the example's tables use but its signal
// list omits. Clearing INFST with zer is this design's own choice.
module data_transfer_block
  import asyncfd_pkg::*;
(
  input  logic zer,     // initialise (A function of the flow diagram)
  input  logic start,   // channel-side control unit starts a transfer
  input  logic rdy,     // peripheral ready impulse
  input  logic infrdy,  // peripheral end-of-byte impulse
  input  logic wr,      // 1 write, 0 read
  input  logic parf,    // parity error on the byte from the channel
  input  logic uc,      // data transfer error from the peripheral
  input  logic sero,    // Service Out
  input  logic cmdo,    // Command Out
  input  logic adro,    // Address Out
  output logic seri,    // Service In
  output logic infst,   // next byte may be transferred (to the peripheral)
  output logic [DT_NUM_PHASES:1] ph
);

  logic init_n;
  assign init_n = ~zer;


  // PH1: initial phase, preset by zer.
  phase_cell #(.M(1)) u_ph1 (
    .j(ph[PH5] | ph[PH7] | ph[PH8] | ph[PH11]), .ckj(rdy),
    .ckk(ph[PH2] | ph[PH6]), .pr_n(init_n), .clr_n(1'b1),
    .q(ph[PH1]), .elem_q());

  phase_cell #(.M(2)) u_ph2 (
    .j({ph[PH4], ph[PH1] & ~wr}), .ckj({~sero, start}),
    .ckk(ph[PH3] | ph[PH11]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH2]), .elem_q());

  phase_cell #(.M(1)) u_ph3 (
    .j(ph[PH2] & ~uc), .ckj(infrdy),
    .ckk(ph[PH4] | ph[PH5] | ph[PH7]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH3]), .elem_q());

  phase_cell #(.M(1)) u_ph4 (
    .j(ph[PH3]), .ckj(sero),
    .ckk(ph[PH2]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH4]), .elem_q());

  phase_cell #(.M(1)) u_ph5 (
    .j(ph[PH3]), .ckj(adro),
    .ckk(ph[PH1]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH5]), .elem_q());

  phase_cell #(.M(2)) u_ph6 (
    .j({ph[PH10] & ~uc, ph[PH1] & wr}), .ckj({infrdy, start}),
    .ckk(ph[PH7] | ph[PH8] | ph[PH9]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH6]), .elem_q());

  phase_cell #(.M(1)) u_ph7 (
    .j(ph[PH3] | ph[PH6]), .ckj(cmdo),
    .ckk(ph[PH1]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH7]), .elem_q());

  phase_cell #(.M(1)) u_ph8 (
    .j(ph[PH6] & parf), .ckj(sero),
    .ckk(ph[PH1]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH8]), .elem_q());

  phase_cell #(.M(1)) u_ph9 (
    .j(ph[PH6] & ~parf), .ckj(sero),
    .ckk(ph[PH10]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH9]), .elem_q());

  phase_cell #(.M(1)) u_ph10 (
    .j(ph[PH9]), .ckj(~sero),
    .ckk(ph[PH6] | ph[PH11]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH10]), .elem_q());

  phase_cell #(.M(1)) u_ph11 (
    .j((ph[PH2] | ph[PH10]) & uc), .ckj(infrdy),
    .ckk(ph[PH1]), .pr_n(1'b1), .clr_n(init_n),
    .q(ph[PH11]), .elem_q());

  // Output part.
  sr_flipflop u_infst (
    .s   (ph[PH2] | ph[PH4] | ph[PH9]),
    .r   (ph[PH3] | ph[PH6] | ph[PH11]),
    .init(zer),
    .z   (infst),
    .z_n ());

  assign seri = ph[PH3] | ph[PH6];

endmodule
