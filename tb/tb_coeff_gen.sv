// Self-checking testbench of the coefficient generator.
//
// Loads several parameter sets (including the reset-time computation) and
// checks every power M^1..M^8 and M^16 of every bank against the same
// truncated 27-bit chain computed here, that the active set and Sf change
// only when `updated` pulses, and that the update takes 9 clocks.
module tb_coeff_gen;
  import sipm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;

  logic load;
  coef_t [NBANK-1:0] m_in;
  logic [SF_W-1:0] sf_in;
  bank_coef_t [NBANK-1:0] coef;
  logic [SF_W-1:0] sf;
  logic busy, updated;

  coeff_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint t27(longint a, longint b);
    return (a * b) >> 27;
  endfunction

  task automatic check_set(coef_t [NBANK-1:0] m, logic [SF_W-1:0] s);
    for (int b = 0; b < NBANK; b++) begin
      longint pw[17];
      pw[1] = longint'(m[b]);
      for (int d = 2; d <= 8; d++) pw[d] = t27(pw[d-1], longint'(m[b]));
      pw[16] = t27(pw[8], pw[8]);
      for (int d = 1; d < 8; d++) begin
        checks++;
        if (longint'(coef[b].pw[d]) != pw[d]) begin
          failures++;
          $display("bank %0d M^%0d: got %h want %h", b, d, coef[b].pw[d], pw[d]);
        end
      end
      checks += 2;
      if (longint'(coef[b].p) != pw[8])   begin failures++; $display("bank %0d M^8 wrong", b); end
      if (longint'(coef[b].p2) != pw[16]) begin failures++; $display("bank %0d M^16 wrong", b); end
    end
    checks++;
    if (sf != s) failures++;
  endtask

  task automatic do_load(coef_t [NBANK-1:0] m, logic [SF_W-1:0] s);
    bank_coef_t [NBANK-1:0] old;
    int n;
    @(negedge clk);
    m_in = m; sf_in = s; load = 1;
    @(negedge clk);
    load = 0;
    m_in = '1; sf_in = '1;           // must not matter after the load
    old = coef;
    n = 1;
    while (!updated) begin
      checks++;
      if (coef != old) begin failures++; $display("active set changed before update"); end
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != 9) begin failures++; $display("update took %0d clocks", n); end
    check_set(m, s);
  endtask

  initial begin
    coef_t [NBANK-1:0] m;
    load = 0;
    m[0] = coef_t'(longint'($floor($exp(-0.8 / 1.0) * 134217728.0)));
    m[1] = coef_t'(longint'($floor($exp(-0.8 / 50.0) * 134217728.0)));
    m[2] = coef_t'(longint'($floor($exp(-0.8 / 100.0) * 134217728.0)));
    m_in = m; sf_in = 16'd13107;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // the computation started by reset
    wait (updated);
    @(negedge clk);
    check_set(m, 16'd13107);
    repeat (5) begin
      for (int b = 0; b < NBANK; b++) m[b] = coef_t'($urandom);
      do_load(m, SF_W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
