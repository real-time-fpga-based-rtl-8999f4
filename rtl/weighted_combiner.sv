// Weighted combiner of the three exponential banks.
//
// Per sub-phase lane it forms the emulated SiPM response
//
//   y = (1 - Sf) * y_ff + Sf * y_fs - y_r
//
// the linear-superposition form of the three-time-constant pulse: a fast and
// a slow decay sharing the pulse area by the slow fraction Sf, minus a rise
// exponential that pulls the sum to zero at the moment of the hit. Sf is
// unsigned Q0.16 and 1 - Sf is formed as 2^16 - Sf. Inputs are unsigned with
// FRAC fraction bits; the output is signed with the same scale.
//
// Pipeline: weighted sum registered, then the subtraction: 2 clocks.
// The formula follows the emulator; number formats and pipelining are this
// design's choice.
module weighted_combiner
  import sipm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  ydat_t [NBANK-1:0][NPH-1:0] y,     // indexed by bank_e, then lane
  input  logic [SF_W-1:0]         sf,
  output logic signed [NPH-1:0][Y_W+1:0] yo
);

  localparam int unsigned PW = Y_W + SF_W + 1;

  ydat_t [NPH-1:0]         mix;     // (1-Sf) y_ff + Sf y_fs
  ydat_t [NPH-1:0]         yr_d;
  logic [NPH-1:0][PW-1:0]  acc;

  always_comb
    for (int k = 0; k < NPH; k++)
      acc[k] = PW'((SF_W+1)'(2**SF_W) - (SF_W+1)'(sf)) * PW'(y[BANK_FF][k])
             + PW'(sf) * PW'(y[BANK_FS][k]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mix  <= '0;
      yr_d <= '0;
      yo   <= '0;
    end else begin
      for (int k = 0; k < NPH; k++) begin
        mix[k]  <= acc[k][PW-2:SF_W];          // a convex mix never exceeds Y_W bits
        yr_d[k] <= y[BANK_R][k];
        yo[k]   <= $signed({2'b00, mix[k]}) - $signed({2'b00, yr_d[k]});
      end
    end
  end

endmodule
