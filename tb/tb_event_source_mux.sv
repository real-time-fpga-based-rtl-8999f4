// Self-checking testbench of the event source selector.
//
// Random valid, ready, data and select values: the merged stream must carry
// the selected source's valid and data, ready must go back to the selected
// source only, and the other source must see ready low.
module tb_event_source_mux;
  import sipm_pkg::*;

  logic sel, ps_valid, ps_ready, net_valid, net_ready, out_valid, out_ready;
  event_t ps_data, net_data, out_data;

  event_source_mux dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      sel = 1'($urandom); ps_valid = 1'($urandom); net_valid = 1'($urandom);
      out_ready = 1'($urandom);
      ps_data = event_t'($urandom); net_data = event_t'($urandom);
      #1;
      checks += 5;
      if (out_valid != (sel ? net_valid : ps_valid)) failures++;
      if (out_data != (sel ? net_data : ps_data)) failures++;
      if (ps_ready != (!sel && out_ready)) failures++;
      if (net_ready != (sel && out_ready)) failures++;
      if (ps_ready && net_ready) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
