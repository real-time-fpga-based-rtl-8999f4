// Sub-phase pre-convolution of one exponential bank.
//
// The bank's exponential is sampled every 0.8 ns sub-phase, but the filter
// runs at one fabric cycle (8 sub-phases) per clock, with one recursion per
// sub-phase lane. An impulse at sub-phase j must therefore be spread over the
// later sub-phases of its own cycle and the earlier ones of the next cycle,
// weighted by the decay it has undergone. This block is the length-8 FIR
// that does it, over the sub-phase sample stream:
//
//   v[k](n) = sum_{d=0..7} M^d * x(8n + k - d)
//
// where x(8n + i) is x[i] of cycle n and a negative i reaches into cycle n-1.
// The d = 0 tap is exactly 1 (no multiply); taps 1..7 use the pre-loaded
// Q0.27 powers, which is 7 multiplies per lane, 56 per bank.
//
// Output v carries FRAC fraction bits below the amplitude LSB. Each product is
// truncated to that precision. Pipeline: products registered, then the sums:
// v of cycle n appears 2 clocks after x of cycle n.
//
// The kernel 1, M, ..., M^7 follows the emulator; the widths, truncation and
// pipeline split are this design's choice.
module preconv
  import sipm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  amp_t [NPH-1:0]  x,       // impulse frame of this cycle
  input  coef_t [NPH-1:1] pw,      // pw[d] = M^d, d = 1..7
  output vdat_t [NPH-1:0] v
);

  localparam int unsigned PW = AMP_W + FRAC;   // product width

  amp_t [NPH-1:0]                 x_prev;
  logic [NPH-1:0][NPH-1:0][PW-1:0] prod;      // [lane][tap]
  vdat_t [NPH-1:0]                sum;

  function automatic logic [PW-1:0] tap(input amp_t a, input coef_t c);
    logic [AMP_W+CW-1:0] p;
    p = (AMP_W+CW)'(a) * (AMP_W+CW)'(c);
    return p[AMP_W+CW-1:CW-FRAC];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_prev <= '0;
      prod   <= '0;
      v      <= '0;
    end else begin
      x_prev <= x;
      for (int k = 0; k < NPH; k++) begin
        prod[k][0] <= {x[k], FRAC'(0)};
        for (int d = 1; d < NPH; d++) begin
          // sub-phase k-d, wrapping into the previous cycle when negative
          prod[k][d] <= tap((d <= k) ? x[(k-d+NPH)%NPH] : x_prev[(k-d+NPH)%NPH], pw[d]);
        end
      end
      v <= sum;
    end
  end

  always_comb begin
    for (int k = 0; k < NPH; k++) begin
      sum[k] = '0;
      for (int d = 0; d < NPH; d++) sum[k] = sum[k] + V_W'(prod[k][d]);
    end
  end

endmodule
