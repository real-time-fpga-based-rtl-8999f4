// Coefficient generator for the three exponential banks.
//
// Software programs four runtime parameters: the per-sub-phase decay factors
// M = exp(-0.8 ns / tau) of the rise, fast-fall and slow-fall exponentials
// (unsigned Q0.27) and the slow fraction Sf (Q0.16). The filters need, per
// bank, the pre-convolution taps M^1..M^7, the per-cycle pole M^8 and the
// look-ahead pole M^16. This block computes them with one 27x27 multiplier
// per bank, one power per clock (M^2..M^8, then M^16 = M^8 * M^8), each
// product truncated to 27 bits, into a shadow set. When the set is complete
// it is latched into the active registers in a single clock together with Sf,
// so the filters never see a mix of old and new coefficients and never need
// cascaded multiplies within a cycle.
//
// Interface: `load` (pulse) samples m_in and sf_in and starts a computation;
// `busy` is high meanwhile and `updated` pulses for one clock when the new set
// becomes active, 10 clocks after `load`. A computation is also started by
// reset, from the values on m_in and sf_in at that time. A `load` during a
// computation restarts it.
//
// Precomputed and latched powers and 27-bit coefficients follow the
// emulator; computing the powers in hardware from M (rather than having
// software write every power) is this design's choice.
module coeff_gen
  import sipm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  coef_t [NBANK-1:0]    m_in,
  input  logic [SF_W-1:0]      sf_in,
  output bank_coef_t [NBANK-1:0] coef,
  output logic [SF_W-1:0]      sf,
  output logic                 busy,
  output logic                 updated
);

  function automatic coef_t mul27(input coef_t a, input coef_t b);
    logic [2*CW-1:0] prod;
    prod = (2*CW)'(a) * (2*CW)'(b);
    return prod[2*CW-1:CW];
  endfunction

  coef_t [NBANK-1:0][NPH:1] sh;       // shadow powers M^1..M^8
  coef_t [NBANK-1:0]        m_lat;
  logic  [SF_W-1:0]         sf_lat;
  logic  [3:0]              step;     // next power to compute, 2..9 (9 = M^16)
  logic                     pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef    <= '0;
      sf      <= '0;
      sh      <= '0;
      m_lat   <= '0;
      sf_lat  <= '0;
      step    <= '0;
      busy    <= 1'b0;
      pending <= 1'b1;
      updated <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (load || pending) begin
        pending <= 1'b0;
        busy    <= 1'b1;
        step    <= 4'd2;
        m_lat   <= m_in;
        sf_lat  <= sf_in;
        for (int b = 0; b < NBANK; b++) sh[b][1] <= m_in[b];
      end else if (busy) begin
        if (step <= 4'd8) begin
          for (int b = 0; b < NBANK; b++)
            sh[b][step] <= mul27(sh[b][step-1], m_lat[b]);
          step <= step + 1'b1;
        end else begin
          // step 9: look-ahead pole, then latch the complete set at once
          for (int b = 0; b < NBANK; b++) begin
            coef[b].pw    <= sh[b][NPH-1:1];
            coef[b].p     <= sh[b][8];
            coef[b].p2    <= mul27(sh[b][8], sh[b][8]);
          end
          sf      <= sf_lat;
          busy    <= 1'b0;
          updated <= 1'b1;
        end
      end
    end
  end

endmodule
