// Event stream bundle.
//
// The (dt, amplitude) event list travels between the event sources, the event
// FIFO and the sub-phase scheduler as one valid/ready stream: `data` is
// transferred on every clock edge where `valid` and `ready` are both high.
// This interface groups those three signals and carries the rules of the
// handshake as assertions, so every stream instance is checked the same way:
//
//  * once `valid` is raised it stays high until the word is taken, and
//  * `data` does not change while a word waits for `ready`.
//
// `ready` may rise and fall freely. The checks are off while `rst_n` is low
// and while `hold` is high; the owner raises `hold` around anything that may
// legitimately withdraw a waiting word (switching the selected source, for
// instance). The `src` and `snk` modports give the two ends.
//
// The handshake itself is this design's choice; the emulator's architecture
// only names the event stream.
interface event_stream_if
  import sipm_pkg::*;
(
  input logic clk,
  input logic rst_n
);

  logic   valid;
  logic   ready;
  event_t data;
  logic   hold;      // suspend the checks for this clock

  modport src (output valid, input  ready, output data);
  modport snk (input  valid, output ready, input  data);

  // A waiting word is not withdrawn.
  assert property (@(posedge clk) disable iff (!rst_n || hold)
                   (valid && !ready) |=> valid)
    else $error("event_stream_if: valid dropped before ready");

  // A waiting word does not change.
  assert property (@(posedge clk) disable iff (!rst_n || hold)
                   (valid && !ready) |=> $stable(data))
    else $error("event_stream_if: data changed before ready");

endinterface
