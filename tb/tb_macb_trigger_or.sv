// tb_macb_trigger_or -- exhaustive check of the ASIC Trigger fan-out and OR.
//
// All 16 combinations of the four port triggers are applied; each Fast NIM
// output must equal its own port, and the Port Next trigger must be high
// whenever any port is.
module tb_macb_trigger_or;
  logic [3:0] port_trig, lemo_trig;
  logic       next_trig;
  int checks = 0, failures = 0;

  macb_trigger_or dut (.port_trig(port_trig), .lemo_trig(lemo_trig), .next_trig(next_trig));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      port_trig = 4'(v);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (lemo_trig[p] != ((v >> p) & 1)) begin
          failures++; $display("FAIL lemo %0d for %b", p, port_trig);
        end
      end
      checks++;
      if (next_trig != (v != 0)) begin failures++; $display("FAIL OR for %b", port_trig); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
