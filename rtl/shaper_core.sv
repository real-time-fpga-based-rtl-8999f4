// Three-exponential IIR shaper: the real-time SiPM pulse generator.
//
// Every 6.4 ns fabric cycle it takes a frame of 8 sub-phase triggers and
// amplitudes and produces 16 DAC samples (0.4 ns apart) of
//
//   H(t) = (1 - Sf) exp(-t/tau_ff) + Sf exp(-t/tau_fs) - exp(-t/tau_r)
//
// scaled by each hit's amplitude and summed over all hits, so pile-up is
// plain superposition. Each exponential is a bank of 8 per-sub-phase 1-pole
// IIR filters (iir_lookahead) fed by a sub-phase pre-convolution (preconv),
// which gives every hit its exact 0.8 ns position although the logic runs at
// one clock per 8 sub-phases. A weighted combiner forms H, and the output
// stage saturates to 16 bits and interpolates 8 to 16 samples.
//
// Coefficients: coef[b] holds M^1..M^7, M^8 and M^16 of bank b (bank_e order
// r, ff, fs) and sf the slow fraction, from coeff_gen.
//
// Timing: initiation interval 1 (a new frame every clock). A hit presented on
// trig/amp in cycle n affects dac LATENCY clocks later, with dac[2k+1] holding
// sub-phase k. The stages take 1 (trigger register) + 2 (pre-convolution) +
// 2 (IIR) + 2 (combiner) + 2 (output) = 9 clocks; an output delay line pads
// this to LATENCY, by default the 13 cycles (83.2 ns) of the reference
// implementation. The structure follows the emulator; the stage split and the
// padding are this design's choice.
module shaper_core
  import sipm_pkg::*;
#(
  parameter int unsigned LATENCY = 13      // clocks from trigger frame to DAC samples
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NPH-1:0]         trig,
  input  amp_t [NPH-1:0]         amp,
  input  bank_coef_t [NBANK-1:0] coef,
  input  logic [SF_W-1:0]        sf,
  output dac_t [NOUT-1:0]        dac,
  output logic                   clipped
);

  localparam int unsigned CORE_LAT = 9;
  localparam int unsigned PAD      = LATENCY - CORE_LAT;

  initial assert (LATENCY >= CORE_LAT)
    else $error("shaper_core: LATENCY must be at least %0d", CORE_LAT);

  amp_t  [NPH-1:0]            x;
  vdat_t [NBANK-1:0][NPH-1:0] v;
  ydat_t [NBANK-1:0][NPH-1:0] y;
  logic signed [NPH-1:0][Y_W+1:0] yo;
  dac_t  [NOUT-1:0]           dac_c;
  logic                       clip_c;

  trigger_interface u_trig (
    .clk, .rst_n, .trig, .amp, .x
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    preconv u_pre (
      .clk, .rst_n, .x, .pw(coef[b].pw), .v(v[b])
    );
    iir_lookahead u_iir (
      .clk, .rst_n, .v(v[b]), .p(coef[b].p), .p2(coef[b].p2), .y(y[b])
    );
  end

  weighted_combiner u_comb (
    .clk, .rst_n, .y, .sf, .yo
  );

  sat_lerp u_out (
    .clk, .rst_n, .yo, .dac(dac_c), .clipped(clip_c)
  );

  if (PAD == 0) begin : g_nopad
    assign dac     = dac_c;
    assign clipped = clip_c;
  end else begin : g_pad
    dac_t [PAD-1:0][NOUT-1:0] dl;
    logic [PAD-1:0]           cl;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dl <= '0;
        cl <= '0;
      end else begin
        dl[0] <= dac_c;
        cl[0] <= clip_c;
        for (int i = 1; i < PAD; i++) begin
          dl[i] <= dl[i-1];
          cl[i] <= cl[i-1];
        end
      end
    end
    assign dac     = dl[PAD-1];
    assign clipped = cl[PAD-1];
  end

endmodule
