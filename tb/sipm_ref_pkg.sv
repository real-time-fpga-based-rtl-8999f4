// Reference model of the emulated SiPM response, for the testbenches.
//
// Computes the expected DAC samples directly from the definition, at the
// 0.8 ns sub-phase rate and in floating point: each exponential is the
// sequential recursion y[m] = M * y[m-1] + x[m] (one step per sub-phase, no
// pre-convolution, no look-ahead), combined as (1-Sf) y_ff + Sf y_fs - y_r,
// rounded, clamped to 0..65535 and interpolated 2x with the midpoint of the
// previous and current sub-phase at even positions. It shares no code with
// the RTL. Also provides the Q0.27 coefficient encoding.
package sipm_ref_pkg;

  localparam real TS_NS = 0.8;

  function automatic longint q27(input real m);
    return longint'($floor(m * 134217728.0));
  endfunction

  function automatic real m_of_tau(input real tau_ns);
    return $exp(-TS_NS / tau_ns);
  endfunction

  class shape_ref;
    real m[3];          // rise, fast fall, slow fall
    real sf;
    real y[3];
    int  s_last;

    function new(real tau_r, real tau_ff, real tau_fs, real sf_in);
      m[0] = m_of_tau(tau_r);
      m[1] = m_of_tau(tau_ff);
      m[2] = m_of_tau(tau_fs);
      sf   = sf_in;
      reset();
    endfunction

    function void reset();
      foreach (y[b]) y[b] = 0.0;
      s_last = 0;
    endfunction

    // One fabric cycle: 8 sub-phase impulses in, 16 DAC codes out.
    function void cycle(input int x[8], output int dac[16]);
      int s[8];
      for (int k = 0; k < 8; k++) begin
        real o;
        for (int b = 0; b < 3; b++) y[b] = m[b] * y[b] + real'(x[k]);
        o = (1.0 - sf) * y[1] + sf * y[2] - y[0];
        s[k] = int'($floor(o + 0.5));
        if (s[k] < 0) s[k] = 0;
        if (s[k] > 65535) s[k] = 65535;
      end
      for (int k = 0; k < 8; k++) begin
        dac[2*k]   = ((k == 0 ? s_last : s[k-1]) + s[k]) / 2;
        dac[2*k+1] = s[k];
      end
      s_last = s[7];
    endfunction
  endclass

endpackage
