// One exponential bank: eight per-lane 1-pole IIR filters in look-ahead form.
//
// Lane k holds the bank's exponential at sub-phase k of every fabric cycle.
// With M = exp(-0.8 ns / tau), a lane decays by the pole P = M^8 per cycle and
// is driven by the pre-convolved input v[k], so the plain recursion would be
//
//   y(n) = P * y(n-1) + v(n)        feedback distance 1.
//
// A multiply and an add inside a one-clock loop leave no room for a multiplier
// pipeline register, so the recursion is unrolled once:
//
//   y(n) = P^2 * y(n-2) + P * v(n-1) + v(n)     feedback distance 2,
//
// which has the same impulse response. The feed-forward part w(n) = v(n) +
// P*v(n-1) is computed outside the loop; inside it, the product P^2*y is
// registered (the multiplier's M register) and added to w on the next clock.
// P and P^2 come precomputed from the coefficient generator.
//
// State is unsigned, Y_W bits with FRAC fraction bits, saturating at its
// maximum. Timing: y of cycle n appears 2 clocks after v of cycle n.
//
// The look-ahead form, the per-lane structure and the precomputed squared
// pole follow the emulator; widths and saturation are this design's choice.
module iir_lookahead
  import sipm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  vdat_t [NPH-1:0] v,
  input  coef_t           p,       // M^8
  input  coef_t           p2,      // M^16
  output ydat_t [NPH-1:0] y
);

  vdat_t [NPH-1:0] v_d;      // v(n-1)
  ydat_t [NPH-1:0] w;        // v(n) + P*v(n-1)
  ydat_t [NPH-1:0] fb;       // P^2 * y(n-2), multiplier output register
  logic [NPH-1:0][Y_W:0] s;  // fb + w with carry

  always_comb
    for (int k = 0; k < NPH; k++) s[k] = {1'b0, fb[k]} + {1'b0, w[k]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= '0;
      w   <= '0;
      fb  <= '0;
      y   <= '0;
    end else begin
      for (int k = 0; k < NPH; k++) begin
        v_d[k] <= v[k];
        w[k]   <= Y_W'(v[k]) + mul_coef(Y_W'(v_d[k]), p);
        fb[k]  <= mul_coef(y[k], p2);
        y[k]   <= s[k][Y_W] ? '1 : s[k][Y_W-1:0];
      end
    end
  end

endmodule
