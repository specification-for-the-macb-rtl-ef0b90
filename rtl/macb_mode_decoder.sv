// macb_mode_decoder -- decodes the 16-position front-panel rotary switch.
//
// The switch selects Master/Slave Timestamping, the clock source (on-board
// crystal, external SMA at 50, 100 or 200 MHz, or the next level up),
// Root/Branch position in the hierarchy, the SYNC source and, in code 4, an
// external timestamp reset.  The codes and their meaning are the ones the
// specification tabulates: 0, 1, 2, 3, 4, 5, 6, 12 and 13.  The remaining
// positions are reserved for commissioning, whose function is not specified;
// they decode to cfg.valid = 0, which the rest of the design treats as "drive
// nothing".
//
// Two readings are this design's own: in codes 4, 5, 6, 12 and 13 all four
// ports use the same clock as port 1, and in codes 12 and 13 all four ports
// use the external SYNC, as the mode names say.
//
// Interface: code in, cfg out.  Purely combinational, no clock.
module macb_mode_decoder
  import macb_pkg::*;
(
  input  logic [3:0] code,
  output macb_cfg_t  cfg
);

  always_comb begin
    cfg = '{valid: 1'b1, master: 1'b1, root: 1'b1, clk_src: CLK_EXT,
            sync_src: SYNC_PORT1_RET, ext_ts_rst: 1'b0};
    unique case (code)
      CODE_MASTER_ROOT_XTAL:        cfg.clk_src = CLK_CRYSTAL;
      CODE_MASTER_ROOT_EXT:         cfg.sync_src = SYNC_EXT;
      CODE_MASTER_BRANCH: begin
        cfg.root     = 1'b0;
        cfg.clk_src  = CLK_PORT_NEXT;
        cfg.sync_src = SYNC_PORT_NEXT;
      end
      CODE_SLAVE_BRANCH: begin
        cfg.master   = 1'b0;
        cfg.root     = 1'b0;
        cfg.clk_src  = CLK_PORT_NEXT;
        cfg.sync_src = SYNC_PORT_NEXT;
      end
      CODE_MASTER_ROOT_EXT_TSRST:   cfg.ext_ts_rst = 1'b1;
      CODE_MASTER_ROOT_EXT50:       ;
      CODE_MASTER_ROOT_EXT100:      cfg.clk_src = CLK_EXT_DIV2;
      CODE_MASTER_ROOT_EXT100_SYNC: begin
        cfg.clk_src  = CLK_EXT_DIV2;
        cfg.sync_src = SYNC_EXT;
      end
      CODE_MASTER_ROOT_EXT200_SYNC: begin
        cfg.clk_src  = CLK_EXT_DIV4;
        cfg.sync_src = SYNC_EXT;
      end
      default: cfg = '{valid: 1'b0, master: 1'b0, root: 1'b0, clk_src: CLK_NONE,
                       sync_src: SYNC_NONE, ext_ts_rst: 1'b0};
    endcase
  end

endmodule
