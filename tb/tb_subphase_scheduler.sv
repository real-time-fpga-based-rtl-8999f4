// Self-checking testbench of the sub-phase scheduler.
//
// A source feeds random (dt, amplitude) events: mostly short gaps, with
// dt = 0 to pile hits onto one sub-phase, occasional long gaps that reach
// beyond the frame ring (the scheduler must hold them off), and a pause of
// the source long enough that the following events are late and must be
// dropped. The testbench keeps its own time line (output cycle j, absolute
// event time LEAD*8 + sum of dt) and from it predicts in_ready, which events
// are late, and every output frame's trigger bits and saturating amplitude
// sums; it also checks the late and pile-up counters.
module tb_subphase_scheduler;
  import sipm_pkg::*;

  localparam int LA = 16, LEAD = 8;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic start, stop, in_valid, in_ready, running;
  event_t in_data;
  logic [NPH-1:0] trig;
  amp_t [NPH-1:0] amp;
  logic [31:0] late_cnt, pileup_cnt;

  subphase_scheduler #(.LOOKAHEAD(LA), .LEAD(LEAD)) dut (.*);

  int checks = 0, failures = 0;
  int exp_amp[int][8];           // by cycle
  bit exp_trig[int][8];
  int n_late = 0, n_pile = 0, n_stall = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_acc, t_evt;
    int ec, ph, nev;
    bit have;
    start = 0; stop = 0; in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;        // edge E0 has passed: j = 0
    t_acc = LEAD * 8;
    have = 0; nev = 0;
    for (int j = 0; j < 6000; j++) begin
      if (j > 0) @(negedge clk);
      // output shows frame j-1
      if (j >= 1) begin
        for (int k = 0; k < 8; k++) begin
          bit et;
          int ea;
          et = exp_trig.exists(j-1) ? exp_trig[j-1][k] : 1'b0;
          ea = exp_amp.exists(j-1) ? exp_amp[j-1][k] : 0;
          checks++;
          if (trig[k] != et || int'(amp[k]) != ea) begin
            failures++;
            if (failures < 10) $display("frame %0d ph %0d: got %b/%0d want %b/%0d", j-1, k, trig[k], amp[k], et, ea);
          end
        end
      end
      // offer an event for the coming edge, before which the output cycle is j
      if (!have && j < 5500 && !(j >= 2000 && j < 2060)) begin
        int r;
        r = $urandom_range(99);
        if (r < 10)      in_data.dt = '0;
        else if (r < 13) in_data.dt = DT_W'(8 * (LA + 4) + $urandom_range(40));
        else             in_data.dt = DT_W'($urandom_range(22));
        in_data.amp = (r % 7 == 0) ? amp_t'(16'hF000 + $urandom_range(4095)) : amp_t'($urandom_range(3000));
        have = 1;
      end
      in_valid = have;
      t_evt = t_acc + longint'(in_data.dt);
      ec = int'(t_evt >> 3);
      ph = int'(t_evt % 8);
      if (have) begin
        bit er;
        er = (ec <= j) || (ec - j < LA);
        #0;
        checks++;
        if (in_ready != er) begin
          failures++;
          if (failures < 10) $display("cycle %0d: in_ready %b want %b (event cycle %0d)", j, in_ready, er, ec);
        end
        if (!er) n_stall++;
        if (er) begin
          // accepted at the coming edge
          t_acc = t_evt;
          have = 0;
          nev++;
          if (ec <= j) n_late++;
          else begin
            int s;
            bit zt[8];
            int za[8];
            zt = '{default: 1'b0};
            za = '{default: 0};
            if (!exp_trig.exists(ec)) begin
              exp_trig[ec] = zt;
              exp_amp[ec]  = za;
            end
            if (exp_trig[ec][ph]) n_pile++;
            s = exp_amp[ec][ph] + int'(in_data.amp);
            exp_amp[ec][ph]  = (s > 65535) ? 65535 : s;
            exp_trig[ec][ph] = 1'b1;
          end
        end
      end
    end
    @(negedge clk);
    checks += 3;
    if (int'(late_cnt) != n_late) begin failures++; $display("late %0d want %0d", late_cnt, n_late); end
    if (int'(pileup_cnt) != n_pile) begin failures++; $display("pileup %0d want %0d", pileup_cnt, n_pile); end
    if (n_late == 0 || n_pile == 0 || n_stall == 0) begin
      failures++;
      $display("not all cases reached: late %0d pileup %0d stall %0d", n_late, n_pile, n_stall);
    end
    // stop clears the output
    stop = 1; @(negedge clk); stop = 0;
    checks++;
    if (running || trig != '0) failures++;
    $display("events %0d late %0d pileup %0d stall cycles %0d", nev, n_late, n_pile, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
