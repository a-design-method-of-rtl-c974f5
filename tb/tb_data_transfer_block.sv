// Self-checking testbench of data_transfer_block.
//
// Stimulus: random single input changes (one of the ten inputs toggles every
// 20 ns; the block is specified for single input changes only), including
// changes that the channel or peripheral would never make in that phase, so
// that the block is also shown to ignore them. zer is raised rarely.
//
// Reference: a phase-transition table kept here as a state machine over input
// events (which input changed, in which direction, with what levels on the
// others). It predicts the phase, INFST and SERI after every change; the
// block's one-hot phase vector, INFST and SERI are compared with it, and the
// phase vector must be one-hot. Every one of the 18 phase transitions must
// occur at least a few times, or the test fails. A watchdog ends the run.
`timescale 1ns/1ps
module tb_data_transfer_block;
  import asyncfd_pkg::*;

  localparam int unsigned STEPS = 20000;

  // inputs, in the order they are picked by the random walk
  typedef enum int {I_ZER, I_START, I_RDY, I_INFRDY, I_WR, I_PARF, I_UC,
                    I_SERO, I_CMDO, I_ADRO, I_NUM} in_e;

  logic [I_NUM-1:0] in;
  logic seri, infst;
  logic [DT_NUM_PHASES:1] ph;

  data_transfer_block dut (
    .zer(in[I_ZER]), .start(in[I_START]), .rdy(in[I_RDY]), .infrdy(in[I_INFRDY]),
    .wr(in[I_WR]), .parf(in[I_PARF]), .uc(in[I_UC]), .sero(in[I_SERO]),
    .cmdo(in[I_CMDO]), .adro(in[I_ADRO]), .seri, .infst, .ph);

  dt_phase_e exp_ph;
  logic      exp_infst;
  int checks = 0, failures = 0;
  int trans [DT_NUM_PHASES+1][DT_NUM_PHASES+1];

  // Reference phase transition for one input change.
  function automatic dt_phase_e model_next(dt_phase_e p, in_e which, logic rose,
                                           logic [I_NUM-1:0] lv);
    logic fell;
    fell = !rose;
    if (lv[I_ZER]) return PH1;
    case (p)
      PH1:  if (which == I_START  && rose) return lv[I_WR] ? PH6 : PH2;
      PH2:  if (which == I_INFRDY && rose) return lv[I_UC] ? PH11 : PH3;
      PH3:  begin
              if (which == I_SERO && rose) return PH4;
              if (which == I_ADRO && rose) return PH5;
              if (which == I_CMDO && rose) return PH7;
            end
      PH4:  if (which == I_SERO && fell) return PH2;
      PH5, PH7, PH8, PH11:
            if (which == I_RDY && rose) return PH1;
      PH6:  begin
              if (which == I_SERO && rose) return lv[I_PARF] ? PH8 : PH9;
              if (which == I_CMDO && rose) return PH7;
            end
      PH9:  if (which == I_SERO && fell) return PH10;
      PH10: if (which == I_INFRDY && rose) return lv[I_UC] ? PH11 : PH6;
      default: ;
    endcase
    return p;
  endfunction

  task automatic check(string what);
    logic [DT_NUM_PHASES:1] exp_vec;
    exp_vec = '0;
    exp_vec[exp_ph] = 1'b1;
    checks++;
    if (ph !== exp_vec || infst !== exp_infst || seri !== (exp_vec[PH3] | exp_vec[PH6])) begin
      failures++;
      $display("FAIL %s at %0t: ph=%b infst=%b seri=%b expected ph=%b infst=%b",
               what, $time, ph, infst, seri, exp_vec, exp_infst);
    end
  endtask

  task automatic apply(in_e which);
    dt_phase_e nxt;
    in[which] = ~in[which];
    nxt = model_next(exp_ph, which, in[which], in);
    if (nxt != exp_ph) trans[exp_ph][nxt]++;
    exp_ph = nxt;
    if (in[I_ZER]) exp_infst = 1'b0;
    else if (exp_ph inside {PH2, PH4, PH9}) exp_infst = 1'b1;
    else if (exp_ph inside {PH3, PH6, PH11}) exp_infst = 1'b0;
    #20 check(which.name());
  endtask

  initial begin
    #(STEPS * 20ns + 100us);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (trans[a, b]) trans[a][b] = 0;
    in = '0;
    exp_ph = PH1;
    exp_infst = 1'b0;
    #5 in[I_ZER] = 1'b1;   // initial position: ZER=1, all other inputs 0
    #20 check("initialise");
    apply(I_ZER);          // release
    for (int n = 0; n < STEPS; n++) begin
      int unsigned pick;
      in_e which;
      pick = $urandom_range(0, 999);
      if (pick < 4) which = I_ZER;
      else which = in_e'(1 + (pick % (I_NUM - 1)));
      // keep zer pulses short
      if (in[I_ZER] && pick >= 4 && pick < 300) which = I_ZER;
      apply(which);
    end
    if (in[I_ZER]) apply(I_ZER);

    // every transition of the phase register must have happened
    begin
      int need [$][2];
      need = '{'{PH1, PH2}, '{PH1, PH6}, '{PH2, PH3}, '{PH2, PH11}, '{PH3, PH4},
               '{PH3, PH5}, '{PH3, PH7}, '{PH4, PH2}, '{PH5, PH1}, '{PH6, PH7},
               '{PH6, PH8}, '{PH6, PH9}, '{PH7, PH1}, '{PH8, PH1}, '{PH9, PH10},
               '{PH10, PH6}, '{PH10, PH11}, '{PH11, PH1}};
      foreach (need[k]) begin
        $display("PH%0d -> PH%0d : %0d", need[k][0], need[k][1], trans[need[k][0]][need[k][1]]);
        if (trans[need[k][0]][need[k][1]] < 3) begin
          failures++;
          $display("FAIL transition PH%0d -> PH%0d seen too rarely", need[k][0], need[k][1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
