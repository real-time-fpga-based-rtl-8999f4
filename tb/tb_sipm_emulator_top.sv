// End-to-end testbench of the SiPM emulator, at the default sizes.
//
// Event lists go in through the two event ports and every DAC sample that
// comes out is compared against the floating-point reference of
// sipm_ref_pkg, fed with the sub-phase frames this testbench predicts from
// the same event lists (absolute time = LEAD*8 + running sum of dt, cycle =
// time/8, sub-phase = time%8). A frame scheduled for output cycle c must
// appear on `dac` 14 clocks after the cycle starts (1 scheduler clock plus the
// 13-clock shaper latency). Tolerance: 2 codes.
//
// Workloads:
//   1. processor port: a 20-photo-electron scintillation event (20 hits of
//      about 800 codes over ~12 ns), then three overlapping events of 20, 15
//      and 25 photo-electrons at 10, 80 and 200 ns; tau_r = 1 ns,
//      tau_ff = 50 ns, tau_fs = 100 ns, Sf = 0.2;
//   2. network port, after a parameter reload to tau_r = 2 ns, tau_ff = 30 ns,
//      tau_fs = 300 ns, Sf = 0.45: a dense train of 1100 hits that fills the
//      event FIFO, ending with a burst that clips the output;
//   3. network port, after the source fell behind: events that arrive too
//      late and must be dropped.
// Mechanisms counted (each must occur): pile-up in one sub-phase, scheduler
// hold-off, FIFO full, source switch, coefficient reload, clipping, late drop.
module tb_sipm_emulator_top;
  import sipm_pkg::*;
  import sipm_ref_pkg::*;

  localparam int LEAD = 24;
  localparam int OUT_LAT = 14;
  localparam int TOL = 2;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic src_sel, ps_valid, ps_ready, net_valid, net_ready;
  event_t ps_data, net_data;
  logic start, stop, cfg_load;
  coef_t [NBANK-1:0] cfg_m;
  logic [SF_W-1:0] cfg_sf;
  dac_t [NOUT-1:0] dac;
  logic running, coef_busy, coef_updated, clipped;
  logic [10:0] fifo_level;
  logic [31:0] late_cnt, pileup_cnt;

  sipm_emulator_top dut (.*);

  int checks = 0, failures = 0;

  // predicted frames, by output cycle
  int  fr_amp[int][8];
  bit  fr_trig[int][8];
  longint t_acc;
  int  switch_cycle;                  // first cycle of the second shape
  int  n_pile = 0, n_late_exp = 0;
  int  n_stall = 0, n_full = 0, n_upd = 0, n_clip = 0, n_ps = 0, n_net = 0;
  int  j = -1;                        // output cycle (clocks since start)
  bit  done = 0;
  bit  started = 0;

  event_t seg1[$], seg2[$], seg3[$];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // predict where an event lands; late events only advance the time line
  function automatic void place(event_t e, bit late);
    int c, ph, s;
    bit zt[8];
    int za[8];
    zt = '{default: 1'b0};
    za = '{default: 0};
    t_acc += longint'(e.dt);
    if (late) return;
    c  = int'(t_acc >> 3);
    ph = int'(t_acc % 8);
    if (!fr_trig.exists(c)) begin
      fr_trig[c] = zt;
      fr_amp[c]  = za;
    end
    if (fr_trig[c][ph]) n_pile++;
    s = fr_amp[c][ph] + int'(e.amp);
    fr_amp[c][ph]  = (s > 65535) ? 65535 : s;
    fr_trig[c][ph] = 1'b1;
  endfunction

  // a scintillation event of npe hits starting t0 sub-phases after the
  // previous event; hit spacing 0..2 sub-phases, amplitude 760..840
  function automatic void add_pulse(ref event_t q[$], input int t0, input int npe);
    event_t e;
    for (int i = 0; i < npe; i++) begin
      e.dt  = DT_W'((i == 0) ? t0 : $urandom_range(2));
      e.amp = amp_t'(760 + $urandom_range(80));
      q.push_back(e);
    end
  endfunction

  task automatic set_shape(real tr, real tff, real tfs, real sfr);
    cfg_m[BANK_R]  = coef_t'(q27(m_of_tau(tr)));
    cfg_m[BANK_FF] = coef_t'(q27(m_of_tau(tff)));
    cfg_m[BANK_FS] = coef_t'(q27(m_of_tau(tfs)));
    cfg_sf = SF_W'(longint'($floor(sfr * 65536.0)));
  endtask

  task automatic send(input bit net, ref event_t q[$]);
    foreach (q[i]) begin
      @(negedge clk);
      if (net) begin net_valid = 1; net_data = q[i]; end
      else     begin ps_valid  = 1; ps_data  = q[i]; end
      do @(posedge clk); while (!(net ? net_ready : ps_ready));
      if (net) n_net++; else n_ps++;
    end
    @(negedge clk);
    ps_valid = 0; net_valid = 0;
  endtask

  // ---------------------------------------------------------------- checker
  initial begin
    shape_ref ra, rb;
    int e[16];
    int x[8];
    ra = new(1.0, 50.0, 100.0, real'(16'd13107) / 65536.0);
    rb = new(2.0, 30.0, 300.0, real'(16'd29491) / 65536.0);
    wait (j >= 0);
    while (!done) begin
      @(negedge clk);
      if (dut.u_sched.in_valid && !dut.u_sched.in_ready) n_stall++;
      if (fifo_level == 11'd1024) n_full++;
      if (coef_updated) n_upd++;
      if (clipped) n_clip++;
      if (j - OUT_LAT >= 0) begin
        int c;
        c = j - OUT_LAT;
        for (int k = 0; k < 8; k++) x[k] = fr_trig.exists(c) ? fr_amp[c][k] : 0;
        if (c < switch_cycle) ra.cycle(x, e);
        else                  rb.cycle(x, e);
        for (int s = 0; s < 16; s++) begin
          int d;
          d = int'(dac[s]) - e[s];
          checks++;
          if (d > TOL || d < -TOL) begin
            failures++;
            if (failures < 10) $display("cycle %0d sample %0d: got %0d want %0d", c, s, dac[s], e[s]);
          end
        end
      end
    end
  end

  always @(posedge clk) if (started) j <= j + 1;

  // --------------------------------------------------------------- stimulus
  initial begin
    event_t ev;
    int last_cycle;
    src_sel = 0; ps_valid = 0; net_valid = 0; ps_data = '0; net_data = '0;
    start = 0; stop = 0; cfg_load = 0;
    set_shape(1.0, 50.0, 100.0, 0.2);
    switch_cycle = 1 << 30;

    // workload 1: one 20 p.e. event at ~5 ns, then 20/15/25 p.e. at 10, 80,
    // 200 ns after a 400 ns gap
    add_pulse(seg1, 6, 20);
    add_pulse(seg1, 500, 20);
    add_pulse(seg1, 88 - 20, 15);      // hits of the previous event span ~20 sub-phases
    add_pulse(seg1, 150 - 15, 25);

    // workload 2: 9000 sub-phases of silence, then a dense train and a
    // clipping burst
    ev.dt = DT_W'(9000); ev.amp = amp_t'(500); seg2.push_back(ev);
    for (int i = 0; i < 1100; i++) begin
      ev.dt  = DT_W'((i % 50 == 0) ? 0 : 4 + $urandom_range(16));
      ev.amp = amp_t'($urandom_range(1500));
      seg2.push_back(ev);
    end
    for (int i = 0; i < 16; i++) begin
      ev.dt = DT_W'(i == 0 ? 40 : (i % 2)); ev.amp = amp_t'(65535);
      seg2.push_back(ev);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (!coef_busy && n_upd == 0);
    repeat (2) @(posedge clk);

    // preload the processor path, then start the time line
    t_acc = LEAD * 8;
    foreach (seg1[i]) place(seg1[i], 0);
    send(0, seg1);
    @(negedge clk); start = 1; started = 1;   // j becomes 0 at this edge
    @(negedge clk); start = 0;

    // wait for the first segment to be consumed, then switch source and shape
    wait (fifo_level == 0);
    repeat (20) @(negedge clk);
    src_sel = 1;
    switch_cycle = int'(t_acc >> 3) + 800;    // late in the gap, all filters at rest
    foreach (seg2[i]) place(seg2[i], 0);
    fork
      send(1, seg2);
      begin
        wait (j >= switch_cycle - 100);
        @(negedge clk);
        set_shape(2.0, 30.0, 300.0, 0.45);
        cfg_load = 1;
        @(negedge clk);
        cfg_load = 0;
      end
    join

    // workload 3: let the time line run past the last event, then send a
    // few events whose times are already gone
    last_cycle = int'(t_acc >> 3);
    wait (fifo_level == 0 && j > last_cycle + 100);
    for (int i = 0; i < 5; i++) begin
      ev.dt = DT_W'(3); ev.amp = amp_t'(1000);
      seg3.push_back(ev);
      place(ev, 1);
      n_late_exp++;
    end
    send(1, seg3);
    repeat (OUT_LAT + 40) @(negedge clk);
    done = 1;
    @(negedge clk);

    checks += 3;
    if (int'(late_cnt) != n_late_exp) begin failures++; $display("late_cnt %0d want %0d", late_cnt, n_late_exp); end
    if (int'(pileup_cnt) != n_pile) begin failures++; $display("pileup_cnt %0d want %0d", pileup_cnt, n_pile); end
    if (!running) failures++;
    $display("mechanisms: pileup %0d stall %0d fifo_full %0d reload %0d clip %0d late %0d ps %0d net %0d",
             n_pile, n_stall, n_full, n_upd, n_clip, late_cnt, n_ps, n_net);
    checks += 8;
    if (n_pile  == 0) begin failures++; $display("no pile-up"); end
    if (n_stall == 0) begin failures++; $display("no scheduler hold-off"); end
    if (n_full  == 0) begin failures++; $display("FIFO never full"); end
    if (n_upd   == 0) begin failures++; $display("no coefficient reload"); end
    if (n_clip  == 0) begin failures++; $display("no clipping"); end
    if (late_cnt == 0) begin failures++; $display("no late event"); end
    if (n_ps    == 0) begin failures++; $display("processor path unused"); end
    if (n_net   == 0) begin failures++; $display("network path unused"); end
    $display("output cycles checked: %0d", j - OUT_LAT);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
