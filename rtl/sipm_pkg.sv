// Shared types and constants of the SiPM signal emulator.
//
// Time is split three ways: a fabric cycle of 6.4 ns (156.25 MHz), eight
// sub-phases of 0.8 ns per cycle, and sixteen 0.4 ns DAC samples per cycle
// after 2x linear interpolation. Those three numbers are the emulator's own;
// every width below is this implementation's choice.
//
// Fixed-point conventions:
//   * coefficients (powers of M = exp(-0.8 ns / tau)) are unsigned Q0.27,
//     so M = 1.0 is not representable and the unit tap is implicit;
//   * bank data (pre-convolution output, IIR state) are unsigned with FRAC
//     fractional bits below the amplitude LSB;
//   * the slow fraction Sf is unsigned Q0.16.
package sipm_pkg;

  localparam int unsigned NPH    = 8;    // sub-phases per fabric cycle
  localparam int unsigned NOUT   = 16;   // DAC samples per fabric cycle
  localparam int unsigned NBANK  = 3;    // rise, fast fall, slow fall

  localparam int unsigned DT_W   = 16;   // inter-arrival time, in 0.8 ns ticks
  localparam int unsigned AMP_W  = 16;   // hit amplitude
  localparam int unsigned CW     = 27;   // coefficient width (Q0.27)
  localparam int unsigned FRAC   = 8;    // fraction bits kept in bank data
  localparam int unsigned V_W    = 27;   // pre-convolution output width
  localparam int unsigned Y_W    = 32;   // IIR state width
  localparam int unsigned SF_W   = 16;   // slow fraction Sf (Q0.16)
  localparam int unsigned DAC_W  = 16;   // DAC code width

  // One event of the wire format: time since the previous event and amplitude.
  typedef struct packed {
    logic [DT_W-1:0]  dt;
    logic [AMP_W-1:0] amp;
  } event_t;

  // Bank order inside arrays indexed by bank.
  typedef enum logic [1:0] {
    BANK_R  = 2'd0,   // rise, tau_r
    BANK_FF = 2'd1,   // fast fall, tau_ff
    BANK_FS = 2'd2    // slow fall, tau_fs
  } bank_e;

  typedef logic [CW-1:0]    coef_t;
  typedef logic [AMP_W-1:0] amp_t;
  typedef logic [V_W-1:0]   vdat_t;
  typedef logic [Y_W-1:0]   ydat_t;
  typedef logic [DAC_W-1:0] dac_t;

  // Coefficient set of one bank: pw[d] = M^d for d = 1..7 (pre-convolution
  // taps; the d = 0 tap is 1 and has no register), p = M^8 (per-cycle pole)
  // and p2 = M^16 (look-ahead pole).
  typedef struct packed {
    coef_t [NPH-1:1] pw;
    coef_t           p;
    coef_t           p2;
  } bank_coef_t;

  // Product of an unsigned value and a Q0.27 coefficient, truncated back to
  // the value's scale.
  function automatic logic [Y_W-1:0] mul_coef(input logic [Y_W-1:0] v, input coef_t c);
    logic [Y_W+CW-1:0] prod;
    prod = Y_W'(v) * (Y_W+CW)'(c);
    return prod[Y_W+CW-1:CW];
  endfunction

endpackage
