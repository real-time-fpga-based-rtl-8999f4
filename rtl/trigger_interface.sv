// Trigger interface: input register of the shaper.
//
// Once per fabric cycle it takes the 8-bit sub-phase trigger vector and the 8
// amplitudes and registers the impulse frame x[k] = trig[k] ? amp[k] : 0, so
// that an amplitude lane without a trigger never reaches the filters. One
// clock of latency. The 8-trigger-plus-8-amplitude format is the emulator's;
// gating and registering are this design's choice.
module trigger_interface
  import sipm_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NPH-1:0] trig,
  input  amp_t [NPH-1:0] amp,
  output amp_t [NPH-1:0] x
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x <= '0;
    else
      for (int k = 0; k < NPH; k++)
        x[k] <= trig[k] ? amp[k] : '0;
  end

endmodule
