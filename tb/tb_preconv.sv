// Self-checking testbench of the sub-phase pre-convolution.
//
// Feeds random sparse impulse frames and checks each output lane against
// v[k](n) = sum_d M^d x(8n+k-d), computed here over a flat sub-phase history
// with the same Q0.27 taps and per-product truncation to FRAC bits, so the
// comparison is exact. Also checks the 2-clock latency.
module tb_preconv;
  import sipm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  amp_t  [NPH-1:0] x;
  coef_t [NPH-1:1] pw;
  vdat_t [NPH-1:0] v;

  preconv dut (.*);

  int checks = 0, failures = 0;
  longint hist[$];             // flat sub-phase input history
  longint expv[32][8];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint tapv(longint a, longint c);
    return (a * c) >>> (CW - FRAC);
  endfunction

  initial begin
    real m;
    x = '0;
    m = 0.92;
    for (int d = 1; d < 8; d++) pw[d] = coef_t'(longint'($floor((m ** d) * 134217728.0)));
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n >= 2) begin
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (longint'(v[k]) != expv[(n-2)%32][k]) begin
            failures++;
            if (failures < 8) $display("frame %0d lane %0d: got %0d want %0d", n-2, k, v[k], expv[(n-2)%32][k]);
          end
        end
      end
      for (int k = 0; k < 8; k++) begin
        x[k] = ($urandom_range(3) == 0) ? amp_t'($urandom) : '0;
        hist.push_back(longint'(x[k]));
      end
      for (int k = 0; k < 8; k++) begin
        longint acc;
        int i;
        i = 8*n + k;
        acc = hist[i] << FRAC;
        for (int d = 1; d < 8; d++)
          if (i - d >= 0) acc += tapv(hist[i-d], longint'(pw[d]));
        expv[n%32][k] = acc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
