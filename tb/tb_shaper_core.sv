// Self-checking testbench of the three-exponential shaper core.
//
// Drives trigger frames (single hits, a 20-hit scintillation burst with
// several hits per sub-phase cycle, random sparse hits, a burst large enough
// to clip, and amplitudes on lanes without a trigger, which must be ignored)
// under two shape parameter sets, and compares every DAC sample against the
// sequential floating-point reference of sipm_ref_pkg, delayed by exactly the
// 13-cycle latency. Tolerance: 2 codes.
module tb_shaper_core;
  import sipm_pkg::*;
  import sipm_ref_pkg::*;

  localparam int LAT = 13;
  localparam int TOL = 2;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic [NPH-1:0]         trig;
  amp_t [NPH-1:0]         amp;
  bank_coef_t [NBANK-1:0] coef;
  logic [SF_W-1:0]        sf;
  dac_t [NOUT-1:0]        dac;
  logic                   clipped;

  shaper_core dut (.*);

  int checks = 0, failures = 0, clip_seen = 0;
  int expbuf[32][16];   // expected samples, by frame number modulo 32
  int nframe = 0;
  shape_ref rf;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_params(real tr, real tff, real tfs, real sfr);
    real taus[3];
    taus = '{tr, tff, tfs};
    for (int b = 0; b < 3; b++) begin
      real m;
      m = m_of_tau(taus[b]);
      for (int d = 1; d < 8; d++) coef[b].pw[d] = coef_t'(q27(m ** d));
      coef[b].p  = coef_t'(q27(m ** 8));
      coef[b].p2 = coef_t'(q27(m ** 16));
    end
    sf = SF_W'(longint'($floor(sfr * 65536.0)));
    rf = new(tr, tff, tfs, real'(sf) / 65536.0);
  endtask

  // one clock: compare the oldest due expectation, then present a frame
  task automatic step(input int x[8], input logic [7:0] t);
    int e[16];
    @(negedge clk);
    if (nframe >= LAT) begin
      e = expbuf[(nframe - LAT) % 32];
      for (int j = 0; j < 16; j++) begin
        int d;
        d = int'(dac[j]) - e[j];
        checks++;
        if (d > TOL || d < -TOL) begin
          failures++;
          if (failures < 10) $display("mismatch frame %0d sample %0d: got %0d want %0d", nframe - LAT, j, dac[j], e[j]);
        end
      end
    end
    if (clipped) clip_seen++;
    for (int k = 0; k < 8; k++) begin
      trig[k] = t[k];
      // lanes without a trigger carry junk that must be ignored
      amp[k]  = t[k] ? amp_t'(x[k]) : amp_t'($urandom);
      if (!t[k]) x[k] = 0;
    end
    rf.cycle(x, e);
    expbuf[nframe % 32] = e;
    nframe++;
  endtask

  task automatic idle(int n);
    int z[8];
    z = '{default: 0};
    repeat (n) step(z, 8'h00);
  endtask

  task automatic run_set();
    int x[8];
    logic [7:0] t;
    nframe = 0;
    // single 1000-count hit at sub-phase 3, then let it decay
    x = '{default: 0}; x[3] = 1000;
    step(x, 8'b0000_1000);
    idle(150);
    // 20-hit burst over three cycles, several hits sharing a cycle
    for (int c = 0; c < 3; c++) begin
      t = '0; x = '{default: 0};
      for (int h = 0; h < 7; h++) begin
        int k;
        k = $urandom_range(7);
        t[k] = 1'b1;
        x[k] += 700 + $urandom_range(200);
      end
      step(x, t);
    end
    idle(100);
    // random sparse hits
    repeat (300) begin
      t = '0; x = '{default: 0};
      if ($urandom_range(9) == 0) begin
        int k;
        k = $urandom_range(7);
        t[k] = 1'b1;
        x[k] = $urandom_range(3000);
      end
      step(x, t);
    end
    // a burst that drives the output into clipping
    x = '{default: 60000}; t = 8'hFF;
    step(x, t); step(x, t);
    idle(200);
  endtask

  initial begin
    trig = '0; amp = '0;
    set_params(1.0, 50.0, 100.0, 0.20);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_set();
    // second shape: slower rise, shorter decays, larger slow fraction
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    set_params(2.5, 20.0, 300.0, 0.45);
    rf.reset();
    run_set();
    checks++;
    if (clip_seen == 0) begin
      failures++;
      $display("clipping never reported");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
