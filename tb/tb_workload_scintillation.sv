// Workload testbench: scintillation events against the ideal pulse shape.
//
// Photon hits are generated with continuous arrival times, binned into
// 0.8 ns sub-phases the way the upstream software does it (hits in the same
// bin summed, only non-empty nz_bins sent, each as (dt, amplitude)), and sent
// through the emulator at its default sizes. The DAC output is compared with
// the ideal, unbinned response sum_i A_i H(t - t_i),
//   H(t) = (1 - Sf) exp(-t/tau_ff) + Sf exp(-t/tau_fs) - exp(-t/tau_r),
// with tau_r = 1 ns, tau_ff = 50 ns, tau_fs = 100 ns, Sf = 0.2 and about
// 800 codes per photo-electron. Two workloads, each over 1.3 us:
//   A. one 20 photo-electron event at 10 ns;
//   B. three overlapping events of 20, 15 and 25 photo-electrons at 10, 80
//      and 200 ns.
// Hit times within an event follow an exponential of 3 ns mean. Because
// binning moves a hit by at most 0.8 ns, the checks are: peak within 3 % of
// the ideal peak, area within 1 %, and, away from the rising edges (more than
// 6 ns after the last hit of an event), every sample within 1 % of the peak.
module tb_workload_scintillation;
  import sipm_pkg::*;
  import sipm_ref_pkg::*;

  localparam int  LEAD    = 24;          // the top's default head start
  localparam int  OUT_LAT = 14;
  localparam int  NCYC    = 204;         // 1.3 us of output
  localparam real TR = 1.0, TFF = 50.0, TFS = 100.0, SF = 0.2;
  localparam real PE = 800.0;

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
  real hit_t[$];                  // ns
  real hit_a[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real h(real t);
    if (t < 0.0) return 0.0;
    return (1.0 - SF) * $exp(-t / TFF) + SF * $exp(-t / TFS) - $exp(-t / TR);
  endfunction

  function automatic void add_event(real t0, int npe);
    for (int i = 0; i < npe; i++) begin
      real u;
      u = (real'($urandom_range(1000000)) + 0.5) / 1000001.0;
      hit_t.push_back(t0 - 3.0 * $ln(u));
      hit_a.push_back(PE * (0.9 + 0.2 * real'($urandom_range(1000)) / 1000.0));
    end
  endfunction

  task automatic run_workload(string name, real ev_t[$]);
    int bin_amp[int];
    int nz_bins[$];
    int prev;
    real peak_hw, peak_id, area_hw, area_id, maxerr;
    real last_hit[$];
    // bin the hits: bin m covers [0.8 m, 0.8 (m+1)) ns
    foreach (hit_t[i]) begin
      int m;
      m = int'($floor(hit_t[i] / 0.8));
      if (!bin_amp.exists(m)) bin_amp[m] = 0;
      bin_amp[m] += int'(hit_a[i]);
    end
    foreach (bin_amp[m]) nz_bins.push_back(m);
    nz_bins.sort();
    // the last hit of each event, to mark its rising edge
    foreach (ev_t[e]) begin
      real lh;
      lh = ev_t[e];
      foreach (hit_t[i]) if (hit_t[i] >= ev_t[e] && hit_t[i] < ev_t[e] + 60.0 && hit_t[i] > lh) lh = hit_t[i];
      last_hit.push_back(lh);
    end
    // send the non-empty nz_bins, then start the time line
    src_sel = 0;
    prev = 0;
    foreach (nz_bins[i]) begin
      @(negedge clk);
      ps_valid = 1;
      ps_data.dt  = DT_W'(nz_bins[i] - prev);
      ps_data.amp = amp_t'(bin_amp[nz_bins[i]] > 65535 ? 65535 : bin_amp[nz_bins[i]]);
      prev = nz_bins[i];
      do @(posedge clk); while (!ps_ready);
    end
    @(negedge clk); ps_valid = 0;
    start = 1;
    @(negedge clk); start = 0;                     // output cycle 0 ran
    // output cycle c appears OUT_LAT clocks after it starts; sub-phase m
    // sits at absolute bin LEAD*8 + m
    repeat (OUT_LAT + LEAD - 1) @(negedge clk);
    peak_hw = 0; peak_id = 0; area_hw = 0; area_id = 0; maxerr = 0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      for (int s = 0; s < 16; s++) begin
        real t, id, d;
        bit edge_zone;
        t = (real'(8 * c) + real'(s) / 2.0 - 0.5) * 0.8;   // sample time, ns
        id = 0.0;
        foreach (hit_t[i]) id += hit_a[i] * h(t - hit_t[i]);
        if (id > 65535.0) id = 65535.0;
        if (id < 0.0) id = 0.0;
        if (real'(dac[s]) > peak_hw) peak_hw = real'(dac[s]);
        if (id > peak_id) peak_id = id;
        area_hw += real'(dac[s]);
        area_id += id;
        edge_zone = 0;
        foreach (ev_t[e]) if (t >= ev_t[e] - 1.0 && t <= last_hit[e] + 6.0) edge_zone = 1;
        d = real'(dac[s]) - id;
        if (!edge_zone && (d > maxerr || -d > maxerr)) maxerr = (d > 0.0) ? d : -d;
      end
    end
    $display("%s: peak hw %0.0f ideal %0.0f, area ratio %0.4f, max error off the edges %0.1f codes",
             name, peak_hw, peak_id, area_hw / area_id, maxerr);
    checks += 3;
    if (peak_hw < 0.97 * peak_id || peak_hw > 1.03 * peak_id) begin failures++; $display("peak off"); end
    if (area_hw < 0.99 * area_id || area_hw > 1.01 * area_id) begin failures++; $display("area off"); end
    if (maxerr > 0.01 * peak_id) begin failures++; $display("tail off"); end
    checks++;
    if (late_cnt != 0) begin failures++; $display("late events"); end
    stop = 1;
    @(negedge clk); stop = 0;
    repeat (800) @(negedge clk);                   // let the filters come to rest
  endtask

  initial begin
    real evs[$];
    src_sel = 0; ps_valid = 0; net_valid = 0; ps_data = '0; net_data = '0;
    start = 0; stop = 0; cfg_load = 0;
    cfg_m[BANK_R]  = coef_t'(q27(m_of_tau(TR)));
    cfg_m[BANK_FF] = coef_t'(q27(m_of_tau(TFF)));
    cfg_m[BANK_FS] = coef_t'(q27(m_of_tau(TFS)));
    cfg_sf = SF_W'(longint'($floor(SF * 65536.0)));
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);

    add_event(10.0, 20);
    evs = '{10.0};
    run_workload("20 p.e. event", evs);

    hit_t.delete(); hit_a.delete();
    add_event(10.0, 20);
    add_event(80.0, 15);
    add_event(200.0, 25);
    evs = '{10.0, 80.0, 200.0};
    run_workload("pile-up of 20, 15 and 25 p.e.", evs);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
