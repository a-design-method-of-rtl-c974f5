// Phase cell: one phase of a one-hot ("1 out of n") phase register.
//
// A phase that can be entered by M different trigger/branch pairs holds one
// phase register element per pair. Element k is set by a rising ckj[k] while
// j[k]=1 (j[k] is the branch function ANDed with the previous phase, ckj[k]
// the trigger function). All elements share the reset trigger ckk, the OR of
// every phase that can follow this one, so the phase clears itself as soon as
// its successor appears. The phase output is the OR of the element outputs;
// because only one element of the whole register is ever set, at most one
// phase is 1 at a time.
//
// Initialisation: pr_n presets element 0 only (one preset suffices, the
// outputs being ORed); clr_n clears all elements. Both are asynchronous and
// active low. Timing is that of phase_reg_element.
//
// The structure (elements per trigger, shared CKK, OR output, single preset)
// follows the phase-register structure of the method; parameter M is free.
module phase_cell #(
  parameter int unsigned M = 1  // number of entering trigger/branch pairs
) (
  input  logic [M-1:0] j,
  input  logic [M-1:0] ckj,
  input  logic         ckk,
  input  logic         pr_n,
  input  logic         clr_n,
  output logic         q,
  output logic [M-1:0] elem_q
);

  for (genvar k = 0; k < M; k++) begin : g_elem
    phase_reg_element u_elem (
      .j     (j[k]),
      .ckj   (ckj[k]),
      .ckk   (ckk),
      .pr_n  ((k == 0) ? pr_n : 1'b1),
      .clr_n (clr_n),
      .q     (elem_q[k]),
      .q_n   ()
    );
  end

  assign q = |elem_q;

endmodule
