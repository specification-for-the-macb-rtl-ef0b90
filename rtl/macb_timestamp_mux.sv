// macb_timestamp_mux -- the Timestamping clock and SYNC multiplexers.
//
// Every FEE64 in the system must count the same 50 MHz clock and clear its
// timestamp on the same SYNC pulse.  This block picks, from the decoded
// switch setting, where the Clock comes from (on-board crystal, external SMA
// directly, external SMA divided by 2 or 4, or the next level up) and where
// the SYNC comes from (external SMA, the SYNC_Return of the master FEE64 on
// port 1, or the next level up), and sends the same pair to all four
// downstream ports, so port 1 receives its own SYNC back at the same time as
// ports 2-4.  In Master/Branch (code 2) the port 1 SYNC_Return is also sent up
// through Port Next so that the root can distribute it to the whole tree.
//
// The routing follows the specification's per-code tables; the hardware uses
// dedicated low-skew multiplexer chips, modelled here as plain combinational
// selects.  Driving Port Next's SYNC_Return low outside Master/Branch, and all
// outputs low for undefined (commissioning) codes, are this design's choices.
//
// Interface: combinational, no internal state; outputs follow the inputs
// with zero delay in simulation.
module macb_timestamp_mux
  import macb_pkg::*;
(
  input  macb_cfg_t cfg,
  input  logic      crystal_clk,    // on-board 50 MHz
  input  logic      ext_clk,        // back-panel SMA clock
  input  logic      ext_clk_div2,
  input  logic      ext_clk_div4,
  input  logic      ext_sync,       // back-panel SMA SYNC
  input  ts_down_t  next_down,      // Clock and SYNC from Port Next
  input  logic      port1_sync_ret, // SYNC_Return from port 1
  output ts_down_t  port_down [NUM_PORTS], // Clock and SYNC to ports 1..4
  output logic      next_sync_ret   // SYNC_Return towards Port Next
);

  logic ts_clock, ts_sync;

  always_comb begin
    unique case (cfg.clk_src)
      CLK_CRYSTAL:   ts_clock = crystal_clk;
      CLK_EXT:       ts_clock = ext_clk;
      CLK_EXT_DIV2:  ts_clock = ext_clk_div2;
      CLK_EXT_DIV4:  ts_clock = ext_clk_div4;
      CLK_PORT_NEXT: ts_clock = next_down.clock;
      default:       ts_clock = 1'b0;
    endcase
  end

  always_comb begin
    unique case (cfg.sync_src)
      SYNC_EXT:       ts_sync = ext_sync;
      SYNC_PORT1_RET: ts_sync = port1_sync_ret;
      SYNC_PORT_NEXT: ts_sync = next_down.sync;
      default:        ts_sync = 1'b0;
    endcase
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      port_down[p].clock = ts_clock;
      port_down[p].sync  = ts_sync;
    end
  end

  assign next_sync_ret = cfg.valid && cfg.master && !cfg.root && port1_sync_ret;

endmodule
