// SiPM detector emulator, programmable-logic data path (one output channel).
//
// Event generation stays in software; this logic only shapes. Events arrive
// as (dt, amplitude) pairs, already quantized to 0.8 ns sub-phase ticks, from
// one of two sources selected by `src_sel`: the on-chip processor (AXI side)
// or an external host over 10 GbE / UDP. They are buffered in the event FIFO,
// placed on a cycle and sub-phase by the scheduler, and shaped by the
// three-exponential IIR core into 16 DAC samples per 6.4 ns fabric cycle
// (2.5 GS/s, 16 bit) for the DAC serializer.
//
// Interface: both event inputs are valid/ready streams of event_t. `start`
// anchors the time base (the first event's dt counts from LEAD cycles after
// start); `stop` halts it. The four shape parameters (M of the rise, fast and
// slow exponentials as Q0.27, and Sf as Q0.16) are sampled on `cfg_load` and
// take effect together once `coef_busy` falls. `dac` is valid every clock,
// dac[0] being the earliest sample.
//
// Inside, the two event streams (selected source to FIFO, FIFO to scheduler)
// are event_stream_if instances, which assert the valid/ready rules.
//
// Timing: a hit scheduled in output cycle c reaches `dac` 13 clocks after its
// frame leaves the scheduler. The block structure follows the emulator's
// architecture; the control ports and status counters are this design's.
module sipm_emulator_top
  import sipm_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 1024,
  parameter int unsigned LOOKAHEAD  = 32,
  parameter int unsigned LEAD       = 24,
  parameter int unsigned LATENCY    = 13
)(
  input  logic                  clk,          // 156.25 MHz fabric clock
  input  logic                  rst_n,
  // event sources
  input  logic                  src_sel,      // 0: processor, 1: network
  input  logic                  ps_valid,
  output logic                  ps_ready,
  input  event_t                ps_data,
  input  logic                  net_valid,
  output logic                  net_ready,
  input  event_t                net_data,
  // run control
  input  logic                  start,
  input  logic                  stop,
  // shape parameters
  input  logic                  cfg_load,
  input  coef_t [NBANK-1:0]     cfg_m,        // M = exp(-0.8 ns / tau), bank_e order
  input  logic [SF_W-1:0]       cfg_sf,
  // DAC samples
  output dac_t [NOUT-1:0]       dac,
  // status
  output logic                  running,
  output logic                  coef_busy,
  output logic                  coef_updated,
  output logic                  clipped,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level,
  output logic [31:0]           late_cnt,
  output logic [31:0]           pileup_cnt
);

  // The two internal event streams; the interface checks their handshake.
  event_stream_if s_mux  (.clk, .rst_n);   // selected source -> FIFO
  event_stream_if s_fifo (.clk, .rst_n);   // FIFO -> scheduler
  logic           src_sel_q;

  // Switching the source may withdraw a waiting word; that is allowed.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) src_sel_q <= 1'b0;
    else        src_sel_q <= src_sel;
  end
  assign s_mux.hold  = (src_sel != src_sel_q);
  assign s_fifo.hold = 1'b0;

  logic [NPH-1:0]         trig;
  amp_t [NPH-1:0]         amp;
  bank_coef_t [NBANK-1:0] coef;
  logic [SF_W-1:0]        sf;

  event_source_mux u_mux (
    .sel(src_sel),
    .ps_valid, .ps_ready, .ps_data,
    .net_valid, .net_ready, .net_data,
    .out_valid(s_mux.valid), .out_ready(s_mux.ready), .out_data(s_mux.data)
  );

  event_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(s_mux.valid), .in_ready(s_mux.ready), .in_data(s_mux.data),
    .out_valid(s_fifo.valid), .out_ready(s_fifo.ready), .out_data(s_fifo.data),
    .level(fifo_level)
  );

  subphase_scheduler #(.LOOKAHEAD(LOOKAHEAD), .LEAD(LEAD)) u_sched (
    .clk, .rst_n, .start, .stop,
    .in_valid(s_fifo.valid), .in_ready(s_fifo.ready), .in_data(s_fifo.data),
    .trig, .amp, .running, .late_cnt, .pileup_cnt
  );

  coeff_gen u_coef (
    .clk, .rst_n, .load(cfg_load), .m_in(cfg_m), .sf_in(cfg_sf),
    .coef, .sf, .busy(coef_busy), .updated(coef_updated)
  );

  shaper_core #(.LATENCY(LATENCY)) u_shaper (
    .clk, .rst_n, .trig, .amp, .coef, .sf, .dac, .clipped
  );

endmodule
