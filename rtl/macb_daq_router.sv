// macb_daq_router -- routing of the four spare lines (the CPLD's job).
//
// Besides the Timestamping pair, each HDMI port carries four single-ended
// LVCMOS33 spare lines.  In Correlation DAQ mode they carry
//   Spare1  Correlation DAQ 10 MHz clock   (made by the master FEE64)
//   Spare2  Correlation DAQ (scaler) reset (made by the master FEE64)
//   Spare3  Correlation DAQ reset request  (from the DAQ, to the master FEE64)
//   Spare4  Correlation DAQ trigger accept (from the DAQ, to every FEE64)
// and the isolated Fast NIM sockets at the root connect them to the external
// DAQ.  Which end drives each line depends on the switch setting:
//
//   Root (codes 0,1,4,5,6,12,13): port 1 drives Spare1/Spare2 in; the MACB
//     copies them to ports 2-4 and to the Fast NIM outputs, and drives the
//     reset request (Spare3, port 1 only) and trigger accept (Spare4, all
//     ports) from the Fast NIM inputs.  In code 4 the reset comes from a Fast
//     NIM input instead and goes out on Spare2 of all four ports.
//   Master/Branch (code 2): as the root, but Spare1/Spare2 of port 1 are also
//     driven up through Port Next, and Spare3/Spare4 come from Port Next.
//   Slave/Branch (code 3): all four lines come from Port Next and go to all
//     four ports.
//
// Every spare line is split into an input (_i), an output (_o) and an output
// enable (_oe); the pad drives _o when _oe is high.  The routing is the
// specification's.  This design's own choices: "not used" lines are left
// undriven (oe = 0, o = 0); in branch modes the Fast NIM outputs are low; in
// code 4 the scaler-reset Fast NIM output is low; the Fast NIM socket
// numbering in macb_pkg; undefined (commissioning) codes drive nothing.
//
// Interface: combinational, no clock.
module macb_daq_router
  import macb_pkg::*;
(
  input  macb_cfg_t            cfg,
  input  spare_t               port_spare_i  [NUM_PORTS],
  output spare_t               port_spare_o  [NUM_PORTS],
  output spare_t               port_spare_oe [NUM_PORTS],
  input  spare_t               next_spare_i,
  output spare_t               next_spare_o,
  output spare_t               next_spare_oe,
  input  logic [NUM_LEMO-1:0]  lemo_in,
  output logic [NUM_LEMO-1:0]  lemo_out
);

  // Sources of the four Correlation DAQ signals inside this MACB
  logic clk10, scaler_rst, rst_req, trig_acc;

  always_comb begin
    // Clock and reset are made by the master FEE64 on port 1, unless a
    // Slave/Branch receives them from above, or code 4 takes the reset from a
    // Fast NIM input.
    clk10      = cfg.master ? port_spare_i[0][SP_CLK10]      : next_spare_i[SP_CLK10];
    scaler_rst = cfg.master ? port_spare_i[0][SP_SCALER_RST] : next_spare_i[SP_SCALER_RST];
    if (cfg.ext_ts_rst) scaler_rst = lemo_in[LI_EXT_RST];
    // Request and trigger accept come from the DAQ: Fast NIM at the root,
    // Port Next below it.
    rst_req    = cfg.root ? lemo_in[LI_RST_REQ]  : next_spare_i[SP_RST_REQ];
    trig_acc   = cfg.root ? lemo_in[LI_TRIG_ACC] : next_spare_i[SP_TRIG_ACC];
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      port_spare_o[p]  = '0;
      port_spare_oe[p] = '0;
    end
    next_spare_o  = '0;
    next_spare_oe = '0;
    lemo_out      = '0;

    if (cfg.valid) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        // Port 1 of a master MACB sources clock and reset (inputs), except the
        // reset in code 4, which this MACB drives.
        if (p != 0 || !cfg.master) begin
          port_spare_o[p][SP_CLK10]       = clk10;
          port_spare_oe[p][SP_CLK10]      = 1'b1;
        end
        if (p != 0 || !cfg.master || cfg.ext_ts_rst) begin
          port_spare_o[p][SP_SCALER_RST]  = scaler_rst;
          port_spare_oe[p][SP_SCALER_RST] = 1'b1;
        end
        port_spare_o[p][SP_TRIG_ACC]      = trig_acc;
        port_spare_oe[p][SP_TRIG_ACC]     = 1'b1;
      end
      // Only the master FEE64 answers a reset request.
      if (cfg.master) begin
        port_spare_o[0][SP_RST_REQ]       = rst_req;
        port_spare_oe[0][SP_RST_REQ]      = 1'b1;
      end

      if (cfg.root) begin
        lemo_out[LO_CLK10]      = clk10;
        lemo_out[LO_SCALER_RST] = cfg.ext_ts_rst ? 1'b0 : scaler_rst;
      end else if (cfg.master) begin
        // Master/Branch: clock and reset travel up towards the root.
        next_spare_o[SP_CLK10]       = clk10;
        next_spare_oe[SP_CLK10]      = 1'b1;
        next_spare_o[SP_SCALER_RST]  = scaler_rst;
        next_spare_oe[SP_SCALER_RST] = 1'b1;
      end
    end
  end

  // The master FEE64 on port 1 drives the 10 MHz clock: the MACB must never
  // drive that line against it.
  always_comb
    if (cfg.valid && cfg.master)
      assert (!port_spare_oe[0][SP_CLK10])
        else $error("port 1 Spare1 driven while the master FEE64 drives it");

endmodule
