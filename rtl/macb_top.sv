// macb_top -- one MACB unit.
//
// The MACB distributes the Timestamping Clock and SYNC to up to four FEE64
// cards (or four lower-level MACBs), collects their ASIC Triggers, and links
// them to an external Correlation DAQ through isolated Fast NIM sockets.
// Trees of MACBs connected port-to-Port-Next serve any number of FEE64s with
// matched delays (4 per level: 4, 16, 64, 256 ...).
//
// Inside, the front-panel rotary switch is decoded (macb_mode_decoder) into
// a configuration that steers
//   - the Timestamping multiplexers (macb_timestamp_mux), fed by the on-board
//     crystal, the back-panel External Clock SMA directly or through the
//     /2 and /4 divider (macb_clk_divider), or Port Next;
//   - the spare-line router (macb_daq_router), the CPLD of the real unit;
//   - the ASIC Trigger fan-out and OR (macb_trigger_or).
//
// Ports: port_* are the four downstream HDMI ports (index 0 is the
// specification's port 1, which must hold the master FEE64 in master modes),
// next_* is the upstream HDMI port, lemo_* are the Fast NIM sockets,
// crystal_clk/ext_clk/ext_sync are the clock sources, and rst_n is a power-on
// reset that only the clock divider uses.  Bidirectional spare lines are split
// into _i/_o/_oe.  All paths are combinational except the divider, so the
// distributed clock follows its source with zero delay in simulation.
// The analog parts (LVDS and Fast NIM transceivers, isolation, crystal) are
// outside this RTL; every differential pair or socket is one logic bit here.
module macb_top
  import macb_pkg::*;
(
  input  logic [3:0]           rotary_code,
  input  logic                 crystal_clk,
  input  logic                 ext_clk,
  input  logic                 ext_sync,
  input  logic                 rst_n,
  // downstream HDMI ports 1..4
  output ts_down_t             port_down     [NUM_PORTS],
  input  ts_up_t               port_up       [NUM_PORTS],
  input  spare_t               port_spare_i  [NUM_PORTS],
  output spare_t               port_spare_o  [NUM_PORTS],
  output spare_t               port_spare_oe [NUM_PORTS],
  // upstream HDMI port (Port Next)
  input  ts_down_t             next_down,
  output ts_up_t               next_up,
  input  spare_t               next_spare_i,
  output spare_t               next_spare_o,
  output spare_t               next_spare_oe,
  // isolated Fast NIM sockets
  input  logic [NUM_LEMO-1:0]  lemo_in,
  output logic [NUM_LEMO-1:0]  lemo_out,
  output logic [NUM_PORTS-1:0] asic_trig_lemo
);

  macb_cfg_t cfg;
  logic      ext_clk_div2, ext_clk_div4;
  logic [NUM_PORTS-1:0] port_trig;

  macb_mode_decoder u_decoder (
    .code (rotary_code),
    .cfg  (cfg)
  );

  macb_clk_divider u_divider (
    .ext_clk  (ext_clk),
    .rst_n    (rst_n),
    .clk_div2 (ext_clk_div2),
    .clk_div4 (ext_clk_div4)
  );

  macb_timestamp_mux u_ts_mux (
    .cfg            (cfg),
    .crystal_clk    (crystal_clk),
    .ext_clk        (ext_clk),
    .ext_clk_div2   (ext_clk_div2),
    .ext_clk_div4   (ext_clk_div4),
    .ext_sync       (ext_sync),
    .next_down      (next_down),
    .port1_sync_ret (port_up[0].sync_return),
    .port_down      (port_down),
    .next_sync_ret  (next_up.sync_return)
  );

  macb_daq_router u_router (
    .cfg           (cfg),
    .port_spare_i  (port_spare_i),
    .port_spare_o  (port_spare_o),
    .port_spare_oe (port_spare_oe),
    .next_spare_i  (next_spare_i),
    .next_spare_o  (next_spare_o),
    .next_spare_oe (next_spare_oe),
    .lemo_in       (lemo_in),
    .lemo_out      (lemo_out)
  );

  always_comb
    for (int p = 0; p < NUM_PORTS; p++) port_trig[p] = port_up[p].asic_trigger;

  macb_trigger_or u_trig (
    .port_trig (port_trig),
    .lemo_trig (asic_trig_lemo),
    .next_trig (next_up.asic_trigger)
  );

endmodule
