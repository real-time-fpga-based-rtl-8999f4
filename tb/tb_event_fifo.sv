// Self-checking testbench of the event FIFO.
//
// Random write and read activity (bursts that fill the FIFO to the top and
// drain it empty) against a queue model: every word read must equal the
// oldest word written, `level` must track the model, and in_ready/out_valid
// must reflect full and empty. Uses a 16-word FIFO to reach full quickly.
module tb_event_fifo;
  import sipm_pkg::*;

  localparam int D = 16;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  event_t in_data, out_data;
  logic [$clog2(D):0] level;

  event_fifo #(.DEPTH(D)) dut (.*);

  int checks = 0, failures = 0, nfull = 0, nempty = 0;
  event_t model[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wprob, rprob;
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // alternate between filling and draining phases
      wprob = ((n / 200) % 2 == 0) ? 8 : 2;
      rprob = ((n / 200) % 2 == 0) ? 2 : 8;
      @(negedge clk);
      checks += 3;
      if (level != ($clog2(D)+1)'(model.size())) begin failures++; $display("level %0d model %0d", level, model.size()); end
      if (in_ready != (model.size() < D)) failures++;
      if (out_valid != (model.size() > 0)) failures++;
      if (model.size() == D) nfull++;
      if (model.size() == 0) nempty++;
      if (out_valid) begin
        checks++;
        if (out_data != model[0]) begin failures++; $display("data %h want %h", out_data, model[0]); end
      end
      in_valid  = ($urandom_range(9) < wprob);
      out_ready = ($urandom_range(9) < rprob);
      in_data   = event_t'($urandom);
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    checks++;
    if (nfull == 0 || nempty == 0) begin failures++; $display("full %0d empty %0d", nfull, nempty); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
