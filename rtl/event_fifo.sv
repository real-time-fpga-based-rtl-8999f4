// Event FIFO.
//
// Synchronous first-in first-out buffer for (dt, amplitude) event pairs
// between the event sources and the sub-phase scheduler. Write side and read
// side use valid/ready handshakes; a word is written when in_valid && in_ready
// and read when out_valid && out_ready. The memory is a plain array (block RAM
// or distributed RAM after synthesis) with a registered read pointer and a
// combinational read, so a written word is visible at the output on the next
// cycle (first-word fall-through). `level` counts stored words.
//
// The FIFO itself is named by the emulator's architecture; its depth and
// handshake are this design's choice.
module event_fifo
  import sipm_pkg::*;
#(
  parameter int unsigned DEPTH = 1024       // words; power of two
)(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  event_t in_data,
  output logic   out_valid,
  input  logic   out_ready,
  output event_t out_data,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  event_t        mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_wr, do_rd;

  assign level     = wptr - rptr;
  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rptr[AW-1:0]];
  assign do_wr     = in_valid && in_ready;
  assign do_rd     = out_valid && out_ready;

  // The pointers never drift further apart than the depth.
  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH))
    else $error("event_fifo: level above depth");

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

endmodule
