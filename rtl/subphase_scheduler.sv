// Sub-phase scheduler.
//
// Turns the event stream, a list of (dt, amplitude) pairs where dt is the time
// since the previous event in 0.8 ns sub-phase ticks, into one trigger frame
// per 6.4 ns fabric cycle: an 8-bit trigger vector and 8 amplitudes, one per
// sub-phase. Temporal quantization is done upstream, so dt is already an
// integer number of sub-phases.
//
// How it works. A `start` pulse anchors the time base: the output cycle
// counter restarts at 0 and the running event time is set to LEAD cycles
// ahead, giving the event side a head start. Each event's absolute time
// T = T_prev + dt is split into a cycle number T/8 and a sub-phase T%8. The
// event is written into a ring of LOOKAHEAD frame buffers, indexed by cycle
// modulo LOOKAHEAD, with at most one event accepted per cycle. A hit that
// lands on a sub-phase that already holds one is added to it (saturating):
// pile-up is plain superposition. Every cycle the frame of the current output
// cycle is sent out and its slot cleared. An event whose cycle is more than
// LOOKAHEAD-1 ahead of output time is held (in_ready low) until its slot comes
// into range; an event whose cycle has already been sent out is dropped and
// counted in `late_cnt` (the upstream source fell behind real time).
//
// Timing: the frame of output cycle c appears on trig/amp one clock after the
// counter reaches c; an event accepted by cycle c-1 is included. Output is all
// zero while not running.
//
// The cycle/sub-phase mapping and superposition follow the emulator's
// temporal hierarchy; the frame ring, the LEAD head start and the treatment
// of late events are this design's choices.
module subphase_scheduler
  import sipm_pkg::*;
#(
  parameter int unsigned LOOKAHEAD = 32,   // frame buffers (power of two)
  parameter int unsigned LEAD      = 24,   // head start after start, cycles
  parameter int unsigned CYC_W     = 32    // output cycle counter width
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,         // pulse: (re)anchor the time base
  input  logic              stop,          // pulse: stop and clear
  input  logic              in_valid,
  output logic              in_ready,
  input  event_t            in_data,
  output logic [NPH-1:0]    trig,          // sub-phase trigger vector
  output amp_t [NPH-1:0]    amp,           // amplitude per sub-phase
  output logic              running,
  output logic [31:0]       late_cnt,      // events dropped as late
  output logic [31:0]       pileup_cnt     // hits summed into an occupied sub-phase
);

  localparam int unsigned SW = $clog2(LOOKAHEAD);
  localparam int unsigned TW = CYC_W + 3;

  logic [NPH-1:0]  ring_trig [LOOKAHEAD];
  amp_t [NPH-1:0]  ring_amp  [LOOKAHEAD];

  logic [CYC_W-1:0] out_cyc;
  logic [TW-1:0]    t_acc;            // absolute time of the last event
  logic [TW-1:0]    t_evt;            // absolute time of the head event
  logic [CYC_W-1:0] e_cyc;
  logic [2:0]       e_ph;
  logic [SW-1:0]    e_slot, r_slot;
  logic             is_late, in_range, accept;
  logic [AMP_W:0]   sum;

  always_comb begin
    t_evt    = t_acc + TW'(in_data.dt);
    e_cyc    = t_evt[TW-1:3];
    e_ph     = t_evt[2:0];
    e_slot   = e_cyc[SW-1:0];
    r_slot   = out_cyc[SW-1:0];
    is_late  = (e_cyc <= out_cyc);
    in_range = (e_cyc - out_cyc) < CYC_W'(LOOKAHEAD);
    in_ready = running && (is_late || in_range);
    accept   = in_valid && in_ready;
    sum      = {1'b0, ring_amp[e_slot][e_ph]} + {1'b0, in_data.amp};
  end

  // An on-time event is never written into the slot being read out.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (running && !start && !stop && accept && !is_late) |-> (e_slot != r_slot))
    else $error("subphase_scheduler: write into the slot being read");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      out_cyc    <= '0;
      t_acc      <= '0;
      trig       <= '0;
      amp        <= '0;
      late_cnt   <= '0;
      pileup_cnt <= '0;
      for (int s = 0; s < LOOKAHEAD; s++) begin
        ring_trig[s] <= '0;
        ring_amp[s]  <= '0;
      end
    end else if (start || stop) begin
      running <= start;
      out_cyc <= '0;
      t_acc   <= TW'(LEAD) << 3;
      trig    <= '0;
      amp     <= '0;
      if (start) begin
        late_cnt   <= '0;
        pileup_cnt <= '0;
      end
      for (int s = 0; s < LOOKAHEAD; s++) begin
        ring_trig[s] <= '0;
        ring_amp[s]  <= '0;
      end
    end else if (running) begin
      // read side: emit the frame of the current cycle and free its slot
      trig              <= ring_trig[r_slot];
      amp               <= ring_amp[r_slot];
      ring_trig[r_slot] <= '0;
      ring_amp[r_slot]  <= '0;
      out_cyc           <= out_cyc + 1'b1;
      // write side: place the head event (never into r_slot, since
      // out_cyc < e_cyc < out_cyc + LOOKAHEAD for an accepted on-time event)
      if (accept) begin
        t_acc <= t_evt;
        if (is_late) begin
          late_cnt <= late_cnt + 1'b1;
        end else begin
          ring_trig[e_slot][e_ph] <= 1'b1;
          ring_amp[e_slot][e_ph]  <= sum[AMP_W] ? '1 : sum[AMP_W-1:0];
          if (ring_trig[e_slot][e_ph]) pileup_cnt <= pileup_cnt + 1'b1;
        end
      end
    end
  end

endmodule
