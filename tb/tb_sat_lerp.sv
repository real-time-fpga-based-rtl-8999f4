// Self-checking testbench of the saturation and 2x interpolation stage.
//
// Random signed combiner outputs spanning negative values, the DAC range and
// overflow. Expected codes are computed here: round to nearest integer, clamp
// to 0..65535, odd positions carry the lane value and even positions the
// floor of the mean of the previous and current lane, across the cycle
// boundary for lane 0. Checks the 2-clock latency and the clip flag.
module tb_sat_lerp;
  import sipm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic signed [NPH-1:0][Y_W+1:0] yo;
  dac_t [NOUT-1:0] dac;
  logic clipped;

  sat_lerp dut (.*);

  int checks = 0, failures = 0, nclip = 0;
  int expd[32][16];
  bit expc[32];
  int s_last = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    yo = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int s[8];
      bit c;
      @(negedge clk);
      if (n >= 2) begin
        for (int j = 0; j < 16; j++) begin
          checks++;
          if (int'(dac[j]) != expd[(n-2)%32][j]) begin
            failures++;
            if (failures < 8) $display("frame %0d sample %0d: got %0d want %0d", n-2, j, dac[j], expd[(n-2)%32][j]);
          end
        end
        checks++;
        if (clipped != expc[(n-2)%32]) failures++;
        if (clipped) nclip++;
      end
      c = 0;
      for (int k = 0; k < 8; k++) begin
        longint val, r;
        case ($urandom_range(9))
          0:       val = -longint'($urandom_range(100000));
          1:       val = longint'($urandom_range(1 << 30));
          default: val = longint'($urandom_range(65535 * 256 + 255));
        endcase
        yo[k] = (Y_W+2)'(val);
        r = (val + 128) >>> 8;
        if (r < 0)          begin s[k] = 0;     c = 1; end
        else if (r > 65535) begin s[k] = 65535; c = 1; end
        else                s[k] = int'(r);
      end
      for (int k = 0; k < 8; k++) begin
        expd[n%32][2*k]   = ((k == 0 ? s_last : s[k-1]) + s[k]) / 2;
        expd[n%32][2*k+1] = s[k];
      end
      expc[n%32] = c;
      s_last = s[7];
    end
    checks++;
    if (nclip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
