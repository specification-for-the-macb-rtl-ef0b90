// tb_macb_mode_decoder -- exhaustive check of the rotary switch decoder.
//
// All 16 switch positions are applied and every field of the decoded
// configuration is compared with a reference table written out here from
// the per-code signal allocation tables (codes 0-6, 12, 13 defined, the rest
// reserved for commissioning).
module tb_macb_mode_decoder;
  import macb_pkg::*;

  logic [3:0] code;
  macb_cfg_t  cfg;
  int checks = 0, failures = 0;

  macb_mode_decoder dut (.code(code), .cfg(cfg));

  // Reference row: {valid, master, root, clk_src, sync_src, ext_ts_rst}
  function automatic macb_cfg_t ref_cfg(int c);
    case (c)
      0:  return '{1'b1, 1'b1, 1'b1, CLK_CRYSTAL,   SYNC_PORT1_RET, 1'b0};
      1:  return '{1'b1, 1'b1, 1'b1, CLK_EXT,       SYNC_EXT,       1'b0};
      2:  return '{1'b1, 1'b1, 1'b0, CLK_PORT_NEXT, SYNC_PORT_NEXT, 1'b0};
      3:  return '{1'b1, 1'b0, 1'b0, CLK_PORT_NEXT, SYNC_PORT_NEXT, 1'b0};
      4:  return '{1'b1, 1'b1, 1'b1, CLK_EXT,       SYNC_PORT1_RET, 1'b1};
      5:  return '{1'b1, 1'b1, 1'b1, CLK_EXT,       SYNC_PORT1_RET, 1'b0};
      6:  return '{1'b1, 1'b1, 1'b1, CLK_EXT_DIV2,  SYNC_PORT1_RET, 1'b0};
      12: return '{1'b1, 1'b1, 1'b1, CLK_EXT_DIV2,  SYNC_EXT,       1'b0};
      13: return '{1'b1, 1'b1, 1'b1, CLK_EXT_DIV4,  SYNC_EXT,       1'b0};
      default: return '{1'b0, 1'b0, 1'b0, CLK_NONE, SYNC_NONE,      1'b0};
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      code = 4'(c);
      #1;
      checks++;
      if (cfg !== ref_cfg(c)) begin
        failures++;
        $display("code %0d: got %p expected %p", c, cfg, ref_cfg(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
