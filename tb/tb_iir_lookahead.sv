// Self-checking testbench of the look-ahead IIR bank.
//
// Drives random pre-convolved inputs and compares each lane with the plain
// first-order recursion y(n) = P*y(n-1) + v(n) computed in floating point
// (not the look-ahead form), with P = M^8 for two different decay constants.
// Allowed error: 0.5 amplitude LSB (128 state LSBs) plus 1e-7 of the value
// for coefficient rounding. Checks the 2-clock
// latency, and that a large input saturates the state instead of wrapping.
module tb_iir_lookahead;
  import sipm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  vdat_t [NPH-1:0] v;
  coef_t p, p2;
  ydat_t [NPH-1:0] y;

  iir_lookahead dut (.*);

  int checks = 0, failures = 0;
  real yr[8];
  real expy[32][8];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real tau, int ncyc, int vmax, bit dense);
    real pr;
    pr = $exp(-6.4 / tau);
    p  = coef_t'(longint'($floor(pr * 134217728.0)));
    p2 = coef_t'(longint'($floor(pr * pr * 134217728.0)));
    pr = real'(p) / 134217728.0;    // follow the quantized pole
    @(negedge clk); rst_n = 0; v = '0;
    @(negedge clk); rst_n = 1;
    yr = '{default: 0.0};
    for (int n = 0; n < ncyc; n++) begin
      @(negedge clk);
      if (n >= 2)
        for (int k = 0; k < 8; k++) begin
          real d;
          real e;
          e = expy[(n-2)%32][k];
          if (e > 4294967295.0) e = 4294967295.0;
          d = real'(y[k]) - e;
          checks++;
          if (d > 128.0 + 1.0e-7 * e || d < -128.0 - 1.0e-7 * e) begin
            failures++;
            if (failures < 8) $display("tau %0f frame %0d lane %0d: got %0d want %0f", tau, n-2, k, y[k], e);
          end
        end
      for (int k = 0; k < 8; k++) begin
        if (dense) v[k] = vdat_t'(vmax);
        else       v[k] = ($urandom_range(4) == 0) ? vdat_t'($urandom_range(vmax)) : '0;
        yr[k] = pr * yr[k] + real'(v[k]);
        expy[n%32][k] = yr[k];
      end
    end
  endtask

  initial begin
    v = '0; p = '0; p2 = '0;
    repeat (2) @(posedge clk);
    run(50.0, 400, 1 << 20, 0);
    run(2.0, 200, 1 << 20, 0);
    run(1000.0, 300, (1 << 27) - 1, 1);       // drives the state into saturation
    checks++;
    if (y[0] != '1) begin
      failures++;
      $display("state did not saturate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
