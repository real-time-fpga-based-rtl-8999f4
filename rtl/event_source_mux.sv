// Event source selector.
//
// The emulator has two event inputs that share one downstream pipeline: the
// on-chip processor (over AXI) and an external host (over 10 GbE / UDP, routed
// straight into the programmable logic). Because events carry inter-arrival
// times, two streams cannot be interleaved without corrupting the time base,
// so this block forwards exactly one of them, chosen by `sel`, with a
// valid/ready handshake on each side. The unselected input is held off
// (ready low). `sel` may only change while no transfer is in flight on either
// side; it is sampled combinationally. Purely combinational, zero latency.
//
// Sharing one pipeline follows the emulator's architecture; a static select
// (rather than arbitration) is this design's choice.
module event_source_mux
  import sipm_pkg::*;
(
  input  logic   sel,          // 0: processor path, 1: network path
  // processor (AXI) path
  input  logic   ps_valid,
  output logic   ps_ready,
  input  event_t ps_data,
  // network (10 GbE / UDP) path
  input  logic   net_valid,
  output logic   net_ready,
  input  event_t net_data,
  // merged stream
  output logic   out_valid,
  input  logic   out_ready,
  output event_t out_data
);

  always_comb begin
    if (sel) begin
      out_valid = net_valid;
      out_data  = net_data;
    end else begin
      out_valid = ps_valid;
      out_data  = ps_data;
    end
    ps_ready  = out_ready && !sel;
    net_ready = out_ready &&  sel;
  end

  // Only the selected source may ever see ready.
  always_comb assert (!(ps_ready && net_ready))
    else $error("event_source_mux: both sources ready");

endmodule
