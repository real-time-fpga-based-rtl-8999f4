// Self-checking testbench of the trigger interface register.
//
// Random trigger vectors with random amplitudes on every lane; one clock
// later each lane must hold its amplitude where the trigger bit was set and
// zero elsewhere.
module tb_trigger_interface;
  import sipm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic [NPH-1:0] trig;
  amp_t [NPH-1:0] amp;
  amp_t [NPH-1:0] x;

  trigger_interface dut (.*);

  int checks = 0, failures = 0;
  amp_t [NPH-1:0] expx;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trig = '0; amp = '0; expx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (x != expx) begin
          failures++;
          if (failures < 8) $display("frame %0d: got %h want %h", n-1, x, expx);
        end
      end
      trig = NPH'($urandom);
      for (int k = 0; k < NPH; k++) begin
        amp[k]  = amp_t'($urandom);
        expx[k] = trig[k] ? amp[k] : '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
