// End-to-end testbench of asyncfd_top, with the top at its default
// configuration.
//
// Three processes run at the same time:
//  * Data transfer: behaves as the channel-side control unit, the selector
//    channel and the peripheral, and runs complete transfers. Reads and
//    writes of several bytes each, ended by Command Out (byte count done),
//    by interface disconnect (Address Out, reads), by a parity error
//    (writes) and by a peripheral error UC (both directions), then the
//    peripheral's RDY returns the block to PH1. One transfer is broken off
//    by ZER. After every step the phase, SERI and INFST are compared with
//    the values the interface protocol calls for at that step.
//  * Channel selection: a square clock runs the two-phase clock generator
//    and the selection register. Channels A and B raise and drop their
//    selection condition at random (never at a clock edge), and the
//    controller releases a connected channel at random. The expected
//    selection is derived here from the clock edge count alone (odd rising
//    edges are clock1, even ones clock2), independently of the generator.
//  * D-G output cell: random d/gate, compared with follow-and-hold.
// Every mechanism is counted; one that never happened counts as a failure.
// A watchdog ends the run.
`timescale 1ns/1ps
module tb_asyncfd_top;
  import asyncfd_pkg::*;

  // data transfer block
  logic zer, start, rdy, infrdy, wr, parf, uc, sero, cmdo, adro, seri, infst;
  logic [DT_NUM_PHASES:1] ph;
  // channel selection
  logic cs_init, clock, ar, br, sel_a, sel_b, clock1, clock2;
  chan_req_t chan_a_req, chan_b_req;
  logic [2:0] cs_phase;
  // D-G cell
  logic dg_d, dg_gate, dg_init, dg_q;

  asyncfd_top dut (.*);

  int checks = 0, failures = 0;
  bit dt_done = 0, cs_done = 0, dg_done = 0;

  // mechanism counters
  int n_read_bytes = 0, n_write_bytes = 0, n_cmdo_read = 0, n_cmdo_write = 0,
      n_disconnect = 0, n_parity = 0, n_uc_read = 0, n_uc_write = 0, n_zer = 0,
      n_rdy = 0;
  int n_grant_a = 0, n_grant_b = 0, n_tie = 0, n_busy = 0, n_rel_a = 0, n_rel_b = 0,
      n_clock1 = 0, n_clock2 = 0;
  int n_dg_follow = 0, n_dg_hold = 0;

  task automatic fail(string msg);
    failures++;
    $display("FAIL at %0t: %s", $time, msg);
  endtask

  // ---------------------------------------------------------------- data transfer
  localparam time STEP = 25ns;

  task automatic expect_dt(dt_phase_e p, logic e_infst, string what);
    logic [DT_NUM_PHASES:1] v;
    v = '0;
    v[p] = 1'b1;
    checks++;
    if (ph !== v || seri !== (p == PH3 || p == PH6) || infst !== e_infst)
      fail($sformatf("%s: ph=%b seri=%b infst=%b, expected %s infst=%b",
                     what, ph, seri, infst, p.name(), e_infst));
  endtask

  task automatic pulse(ref logic sig);
    sig = 1'b1; #STEP;
    sig = 1'b0; #STEP;
  endtask

  task automatic back_to_ready(logic e_infst);
    // the control unit has taken over; the peripheral reports ready
    pulse(rdy);
    n_rdy++;
    expect_dt(PH1, e_infst, "RDY returns to PH1");
  endtask

  typedef enum {END_CMDO, END_ADRO, END_PARF, END_UC, END_ZER} end_e;

  task automatic do_read(int nbytes, end_e how);
    wr = 1'b0; #STEP;
    start = 1'b1; #STEP;
    expect_dt(PH2, 1'b1, "read start");
    start = 1'b0; #STEP;
    for (int b = 0; b < nbytes; b++) begin
      if (how == END_UC && b == nbytes - 1) begin
        uc = 1'b1; #STEP;
        pulse(infrdy);
        expect_dt(PH11, 1'b0, "read: UC at end of byte");
        n_uc_read++;
        uc = 1'b0; #STEP;
        back_to_ready(1'b0);
        return;
      end
      pulse(infrdy);                       // peripheral delivered a byte
      expect_dt(PH3, 1'b0, "read: byte ready, Service In");
      if (how == END_ZER && b == nbytes - 1) begin
        zer = 1'b1; #STEP;
        expect_dt(PH1, 1'b0, "ZER during read");
        n_zer++;
        zer = 1'b0; #STEP;
        expect_dt(PH1, 1'b0, "ZER released");
        return;
      end
      if (b == nbytes - 1 && how == END_CMDO) begin
        cmdo = 1'b1; #STEP;
        expect_dt(PH7, 1'b0, "read: Command Out stops");
        n_cmdo_read++;
        cmdo = 1'b0; #STEP;
        back_to_ready(1'b0);
        return;
      end
      if (b == nbytes - 1 && how == END_ADRO) begin
        adro = 1'b1; #STEP;
        expect_dt(PH5, 1'b0, "read: interface disconnect");
        n_disconnect++;
        adro = 1'b0; #STEP;
        back_to_ready(1'b0);
        return;
      end
      sero = 1'b1; #STEP;
      expect_dt(PH4, 1'b1, "read: Service Out up");
      sero = 1'b0; #STEP;
      expect_dt(PH2, 1'b1, "read: Service Out down");
      n_read_bytes++;
    end
  endtask

  task automatic do_write(int nbytes, end_e how);
    wr = 1'b1; #STEP;
    start = 1'b1; #STEP;
    expect_dt(PH6, 1'b0, "write start, Service In");
    start = 1'b0; #STEP;
    for (int b = 0; b < nbytes; b++) begin
      if (b == nbytes - 1 && how == END_CMDO) begin
        cmdo = 1'b1; #STEP;
        expect_dt(PH7, 1'b0, "write: Command Out stops");
        n_cmdo_write++;
        cmdo = 1'b0; #STEP;
        back_to_ready(1'b0);
        return;
      end
      if (b == nbytes - 1 && how == END_PARF) begin
        parf = 1'b1; #STEP;
        sero = 1'b1; #STEP;
        expect_dt(PH8, 1'b0, "write: parity error");
        n_parity++;
        sero = 1'b0; #STEP;
        parf = 1'b0; #STEP;
        expect_dt(PH8, 1'b0, "write: parity error held");
        back_to_ready(1'b0);
        return;
      end
      sero = 1'b1; #STEP;
      expect_dt(PH9, 1'b1, "write: byte from channel, INFST");
      sero = 1'b0; #STEP;
      expect_dt(PH10, 1'b1, "write: Service Out down");
      if (b == nbytes - 1 && how == END_UC) begin
        uc = 1'b1; #STEP;
        pulse(infrdy);
        expect_dt(PH11, 1'b0, "write: UC at end of byte");
        n_uc_write++;
        uc = 1'b0; #STEP;
        back_to_ready(1'b0);
        return;
      end
      pulse(infrdy);
      expect_dt(PH6, 1'b0, "write: peripheral took byte, next Service In");
      n_write_bytes++;
    end
  endtask

  initial begin : data_transfer
    {start, rdy, infrdy, wr, parf, uc, sero, cmdo, adro} = '0;
    zer = 1'b0;
    #3 zer = 1'b1;                     // initial position
    #STEP expect_dt(PH1, 1'b0, "initial position");
    dt_started = 1;
    zer = 1'b0; #STEP;
    expect_dt(PH1, 1'b0, "initial position released");
    for (int t = 0; t < 40; t++) begin
      int unsigned nb;
      nb = $urandom_range(1, 12);
      case (t % 8)
        0: do_read(nb, END_CMDO);
        1: do_write(nb, END_CMDO);
        2: do_read(nb, END_ADRO);
        3: do_write(nb, END_PARF);
        4: do_read(nb, END_UC);
        5: do_write(nb, END_UC);
        6: do_read(nb, END_ZER);
        default: do_write(nb, END_CMDO);
      endcase
    end
    dt_done = 1;
  end

  // ---------------------------------------------------------------- channel selection
  logic [2:0] exp_cs;   // {CS3, CS2, CS1}
  int rises = 0;

  function automatic logic cond(chan_req_t r);
    return r.selo & r.hldo & r.adro & r.ident;
  endfunction

  initial begin : channel_selection
    clock = 1'b0; cs_init = 1'b0; ar = 1'b0; br = 1'b0;
    chan_a_req = '0; chan_b_req = '0;
    #2 cs_init = 1'b1;
    exp_cs = 3'b001;
    #10 cs_init = 1'b0;
    #8;
    for (int n = 0; n < 8000; n++) begin
      logic c1;
      // rising clock edge: odd-numbered ones are clock1, even ones clock2
      clock = 1'b1;
      rises++;
      c1 = rises[0];
      if (c1) begin
        n_clock1++;
        if (exp_cs == 3'b001) begin
          if (cond(chan_a_req)) begin
            exp_cs = 3'b010; n_grant_a++;
            if (cond(chan_b_req)) n_tie++;
          end else if (cond(chan_b_req)) begin
            exp_cs = 3'b100; n_grant_b++;
          end
        end else if ((exp_cs[1] && cond(chan_b_req)) || (exp_cs[2] && cond(chan_a_req)))
          n_busy++;
      end else begin
        n_clock2++;
        if (exp_cs[1] && ar) begin exp_cs = 3'b001; n_rel_a++; end
        if (exp_cs[2] && br) begin exp_cs = 3'b001; n_rel_b++; end
      end
      #2;
      checks++;
      if (cs_phase !== exp_cs || sel_a !== exp_cs[1] || sel_b !== exp_cs[2] ||
          clock1 !== c1 || clock2 !== !c1)
        fail($sformatf("selection: phase=%b sel=%b%b clk=%b%b expected %b clk1=%b",
                       cs_phase, sel_a, sel_b, clock1, clock2, exp_cs, c1));
      #8 clock = 1'b0;
      #5;
      // inputs change mid-way through the low half-period only
      case ($urandom_range(0, 9))
        0: chan_a_req = ($urandom_range(0, 1) == 0) ? '1 : chan_req_t'($urandom_range(0, 15));
        1: chan_b_req = ($urandom_range(0, 1) == 0) ? '1 : chan_req_t'($urandom_range(0, 15));
        2: begin chan_a_req = '1; chan_b_req = '1; end
        3, 4: ar = ~ar;
        5, 6: br = ~br;
        default: ;
      endcase
      #5;
    end
    cs_done = 1;
  end

  // ---------------------------------------------------------------- D-G cell
  initial begin : dg_cell
    logic exp_q;
    dg_d = 0; dg_gate = 0; dg_init = 1; exp_q = 0;
    #7 dg_init = 0;
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(0, 2) == 0) dg_gate = ~dg_gate; else dg_d = ~dg_d;
      if (dg_gate) begin exp_q = dg_d; n_dg_follow++; end
      else if (dg_d != exp_q) n_dg_hold++;
      #9;
      checks++;
      if (dg_q !== exp_q) fail($sformatf("D-G cell q=%b expected %b", dg_q, exp_q));
    end
    dg_done = 1;
  end

  // ---------------------------------------------------------------- one-hot rule
  bit dt_started = 0;
  always @(ph) begin
    #1;
    if (dt_started && !$onehot(ph)) fail($sformatf("phase vector not one-hot: %b", ph));
  end

  // ---------------------------------------------------------------- end
  initial begin
    #5ms;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (dt_done && cs_done && dg_done);
    #50;
    $display("read bytes=%0d write bytes=%0d cmdo(read)=%0d cmdo(write)=%0d disconnect=%0d",
             n_read_bytes, n_write_bytes, n_cmdo_read, n_cmdo_write, n_disconnect);
    $display("parity=%0d uc(read)=%0d uc(write)=%0d zer=%0d rdy=%0d",
             n_parity, n_uc_read, n_uc_write, n_zer, n_rdy);
    $display("clock1=%0d clock2=%0d grant A=%0d grant B=%0d tie=%0d busy=%0d release A=%0d release B=%0d",
             n_clock1, n_clock2, n_grant_a, n_grant_b, n_tie, n_busy, n_rel_a, n_rel_b);
    $display("D-G follow=%0d hold=%0d", n_dg_follow, n_dg_hold);
    if (n_read_bytes == 0) fail("no read byte transferred");
    if (n_write_bytes == 0) fail("no write byte transferred");
    if (n_cmdo_read == 0) fail("no Command Out stop on read");
    if (n_cmdo_write == 0) fail("no Command Out stop on write");
    if (n_disconnect == 0) fail("no interface disconnect");
    if (n_parity == 0) fail("no parity error");
    if (n_uc_read == 0) fail("no UC error on read");
    if (n_uc_write == 0) fail("no UC error on write");
    if (n_zer == 0) fail("no ZER initialisation");
    if (n_rdy == 0) fail("no RDY return");
    if (n_clock1 == 0 || n_clock2 == 0) fail("two-phase clock did not run");
    if (n_grant_a == 0) fail("channel A never granted");
    if (n_grant_b == 0) fail("channel B never granted");
    if (n_tie == 0) fail("no simultaneous request");
    if (n_busy == 0) fail("no request while busy");
    if (n_rel_a == 0 || n_rel_b == 0) fail("no release");
    if (n_dg_follow == 0 || n_dg_hold == 0) fail("D-G cell not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
