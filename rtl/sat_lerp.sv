// Output stage: saturation to the DAC code and 2x linear interpolation.
//
// The combiner delivers 8 samples per fabric cycle, one per 0.8 ns sub-phase;
// the DAC runs at 2.5 GS/s, 16 samples per cycle. First each lane is rounded
// to an integer and clamped to the 16-bit unsigned DAC range [0, 65535].
// Then every sub-phase sample s[k] is output at odd position 2k+1, and the
// even position 2k gets the midpoint (s[k-1] + s[k]) / 2, where s[-1] is the
// last lane of the previous cycle, so no look-ahead into the next cycle is
// needed. dac[0] is the earliest sample of the cycle.
//
// Pipeline: saturation registered, then interpolation: 2 clocks. `clipped`
// flags the cycle whose samples on `dac` include a clamped lane.
// Saturate-then-interpolate to 16 bits follows the emulator; rounding, the
// unsigned code and the causal midpoint placement are this design's choice.
module sat_lerp
  import sipm_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic signed [NPH-1:0][Y_W+1:0] yo,
  output dac_t [NOUT-1:0]               dac,
  output logic                          clipped   // a sample was clamped this cycle
);

  localparam logic signed [Y_W+2:0] HALF = (Y_W+3)'(2**(FRAC-1));
  localparam logic signed [Y_W+2:0] CMAX = (Y_W+3)'(2**DAC_W - 1);

  dac_t [NPH-1:0]     s;
  dac_t               s_last;      // lane 7 of the previous cycle
  dac_t [NPH-1:0]     s_nx;        // clamped samples
  logic [NPH-1:0]     clip_nx;
  dac_t [NOUT-1:0]    dac_nx;
  logic               clip_s;      // clip flag of the samples in s

  always_comb begin
    for (int k = 0; k < NPH; k++) begin
      logic signed [Y_W+2:0] r;
      r = ($signed({yo[k][Y_W+1], yo[k]}) + HALF) >>> FRAC;
      clip_nx[k] = 1'b1;
      if (r < 0)         s_nx[k] = '0;
      else if (r > CMAX) s_nx[k] = '1;
      else begin
        s_nx[k]    = r[DAC_W-1:0];
        clip_nx[k] = 1'b0;
      end
    end
    for (int k = 0; k < NPH; k++) begin
      logic [DAC_W:0] m;
      m = {1'b0, (k == 0) ? s_last : s[(k+NPH-1)%NPH]} + {1'b0, s[k]};
      dac_nx[2*k]   = m[DAC_W:1];
      dac_nx[2*k+1] = s[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s       <= '0;
      s_last  <= '0;
      dac     <= '0;
      clip_s  <= 1'b0;
      clipped <= 1'b0;
    end else begin
      s       <= s_nx;
      clip_s  <= |clip_nx;
      clipped <= clip_s;
      s_last  <= s[NPH-1];
      dac     <= dac_nx;
    end
  end

endmodule
