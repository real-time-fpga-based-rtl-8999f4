// Self-checking testbench of the weighted combiner.
//
// Random bank outputs and slow fractions (including Sf = 0), checked against
// floor(((2^16 - Sf) * y_ff + Sf * y_fs) / 2^16) - y_r computed here with
// 64-bit integers, 2 clocks after the inputs.
module tb_weighted_combiner;
  import sipm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  ydat_t [NBANK-1:0][NPH-1:0] y;
  logic [SF_W-1:0] sf;
  logic signed [NPH-1:0][Y_W+1:0] yo;

  weighted_combiner dut (.*);

  int checks = 0, failures = 0;
  longint expo[32][8];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y = '0; sf = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (n >= 2)
        for (int k = 0; k < 8; k++) begin
          longint got;
          got = longint'($signed({{(62-Y_W){yo[k][Y_W+1]}}, yo[k]}));
          checks++;
          if (got != expo[(n-2)%32][k]) begin
            failures++;
            if (failures < 8) $display("frame %0d lane %0d: got %0d want %0d", n-2, k, got, expo[(n-2)%32][k]);
          end
        end
      sf = (n < 20) ? '0 : SF_W'($urandom);
      for (int k = 0; k < 8; k++) begin
        longint a, b, c;
        for (int bk = 0; bk < 3; bk++) y[bk][k] = ydat_t'($urandom);
        a = longint'(y[BANK_FF][k]); b = longint'(y[BANK_FS][k]); c = longint'(y[BANK_R][k]);
        expo[n%32][k] = (((65536 - longint'(sf)) * a + longint'(sf) * b) >>> 16) - c;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
