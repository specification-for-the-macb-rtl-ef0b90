// tb_macb_timestamp_mux -- checks the Clock / SYNC selection for every code.
//
// For each of the 16 switch settings (decoded by macb_mode_decoder) the six
// candidate sources are driven with random values many times, and the Clock
// and SYNC seen on all four ports, and the SYNC_Return sent to Port Next,
// are compared with the source named in a reference table per code.
module tb_macb_timestamp_mux;
  import macb_pkg::*;

  logic [3:0] code;
  macb_cfg_t  cfg;
  logic crystal_clk, ext_clk, ext_div2, ext_div4, ext_sync, port1_sync_ret;
  ts_down_t next_down;
  ts_down_t port_down [NUM_PORTS];
  logic next_sync_ret;
  int checks = 0, failures = 0;

  macb_mode_decoder dec (.code(code), .cfg(cfg));
  macb_timestamp_mux dut (
    .cfg(cfg), .crystal_clk(crystal_clk), .ext_clk(ext_clk), .ext_clk_div2(ext_div2),
    .ext_clk_div4(ext_div4), .ext_sync(ext_sync), .next_down(next_down),
    .port1_sync_ret(port1_sync_ret), .port_down(port_down), .next_sync_ret(next_sync_ret));

  // Expected Clock for a code, from the allocation tables
  function automatic logic exp_clock(int c);
    case (c)
      0:          return crystal_clk;
      1, 4, 5:    return ext_clk;
      6, 12:      return ext_div2;
      13:         return ext_div4;
      2, 3:       return next_down.clock;
      default:    return 1'b0;
    endcase
  endfunction

  function automatic logic exp_sync(int c);
    case (c)
      0, 4, 5, 6: return port1_sync_ret;
      1, 12, 13:  return ext_sync;
      2, 3:       return next_down.sync;
      default:    return 1'b0;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      code = 4'(c);
      repeat (40) begin
        {crystal_clk, ext_clk, ext_div2, ext_div4, ext_sync, port1_sync_ret} = 6'($urandom);
        next_down = 2'($urandom);
        #1;
        for (int p = 0; p < NUM_PORTS; p++) begin
          checks += 2;
          if (port_down[p].clock !== exp_clock(c)) begin
            failures++; $display("FAIL code %0d port %0d clock", c, p + 1);
          end
          if (port_down[p].sync !== exp_sync(c)) begin
            failures++; $display("FAIL code %0d port %0d sync", c, p + 1);
          end
        end
        checks++;
        if (next_sync_ret !== (c == 2 ? port1_sync_ret : 1'b0)) begin
          failures++; $display("FAIL code %0d next sync_return", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
