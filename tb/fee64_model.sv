// fee64_model -- behavioural model of an FEE64 front-end card's MACB link.
//
// Only what the MACB sees of the card is modelled, for simulation only:
//   - a free-running timestamp counter on the distributed Clock, cleared on
//     every clock edge where SYNC is high;
//   - SYNC_Return: a slave loops SYNC straight back; the master drives its own
//     one-cycle SYNC pulse when send_sync() is called;
//   - the master makes the Correlation DAQ 10 MHz clock (Clock / 5) on Spare1
//     and answers a reset request on Spare3 with a scaler reset pulse on
//     Spare2 that starts on a rising edge of the 10 MHz clock and lasts one
//     10 MHz period (not driven when ext_ts_reset says the MACB drives it);
//   - counters of rising edges seen on the spare lines, for the testbench.
// The ASIC Trigger output simply follows the asic_trig input.
`timescale 1ns/1ps
module fee64_model
  import macb_pkg::*;
(
  input  logic     master,
  input  logic     ext_ts_reset,
  input  ts_down_t down,
  output ts_up_t   up,
  input  spare_t   spare_in,   // resolved level of the four spare lines
  output spare_t   spare_out,
  output spare_t   spare_oe,
  input  logic     asic_trig
);
  int unsigned ts;
  int unsigned clk_edges = 0;
  int unsigned spare_rises [NUM_SPARE];
  logic gen_sync = 1'b0;
  logic [2:0] cnt5 = 3'd0;
  logic clk10_q = 1'b0, rst_q = 1'b0, req_q = 1'b0, pending = 1'b0;
  spare_t spare_prev = '0;

  initial begin
    ts = $urandom;  // unsynchronised until the first SYNC
    foreach (spare_rises[i]) spare_rises[i] = 0;
  end

  always @(posedge down.clock) begin
    ts <= down.sync ? 0 : ts + 1;
    clk_edges <= clk_edges + 1;
    // 10 MHz clock: high for counts 0 and 1 of 0..4
    cnt5    <= (cnt5 == 3'd4) ? 3'd0 : cnt5 + 3'd1;
    clk10_q <= (cnt5 == 3'd4) || (cnt5 == 3'd0);
    req_q   <= spare_in[SP_RST_REQ];
    if (spare_in[SP_RST_REQ] && !req_q) pending <= 1'b1;
    if (cnt5 == 3'd4) begin
      rst_q <= pending;
      pending <= 1'b0;
    end
  end

  always @(spare_in) begin
    for (int i = 0; i < NUM_SPARE; i++)
      if (spare_in[i] && !spare_prev[i]) spare_rises[i]++;
    spare_prev = spare_in;
  end

  task automatic send_sync();
    @(negedge down.clock) gen_sync = 1'b1;
    @(negedge down.clock) gen_sync = 1'b0;
  endtask

  assign up.sync_return  = master ? gen_sync : down.sync;
  assign up.asic_trigger = asic_trig;
  assign spare_out = {1'b0, 1'b0, rst_q, clk10_q};
  assign spare_oe  = {1'b0, 1'b0, master && !ext_ts_reset, master};
endmodule
