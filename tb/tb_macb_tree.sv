// tb_macb_tree -- a complete distribution tree of MACBs, LEVELS deep.
//
// Level 0 is one root MACB (code 0, on-board crystal); level l holds 4^l
// MACBs, each on one port of its parent; the deepest level serves 4^LEVELS
// FEE64 card models.  The master card is card 0, on port 1 of MACB 0 of the
// deepest level, and every MACB on its path to the root is switched to
// Master/Branch (code 2), all others to Slave/Branch (code 3), so the master
// is always behind port 1 as required.  With LEVELS = 4 this is the largest
// tree the specification lists (256 cards, 85 MACBs); the smaller trees
// differ only in depth.
//
// Checked: every card counts every clock edge; one SYNC from the master makes
// all timestamps equal; the 10 MHz Correlation DAQ clock reaches the root's
// Fast NIM output at 10 MHz and every card; a reset request at the root gives
// exactly one scaler reset at every card; a trigger accept reaches every
// card; an ASIC Trigger from any card appears on the root's Fast NIM output
// of the port that leads to it, and only there.  No spare line may be driven
// from both ends.  Each mechanism is counted and must happen.
`timescale 1ns/1ps
module tb_macb_tree;
  import macb_pkg::*;

  localparam int LEVELS = 4;
  localparam int MAXN   = 4 ** (LEVELS - 1);   // MACBs on the deepest level
  localparam int CARDS  = 4 ** LEVELS;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic spare_t resolve(spare_t a_o, spare_t a_oe, spare_t b_o, spare_t b_oe);
    for (int i = 0; i < NUM_SPARE; i++)
      resolve[i] = a_oe[i] ? a_o[i] : (b_oe[i] ? b_o[i] : 1'b0);
  endfunction

  logic crystal_clk = 1'b0;
  always #10 crystal_clk = ~crystal_clk;
  logic rst_n = 1'b0;

  // per MACB, indexed [level][index]
  ts_down_t pd  [LEVELS][MAXN][4];
  ts_up_t   pu  [LEVELS][MAXN][4];
  spare_t   psi [LEVELS][MAXN][4], pso [LEVELS][MAXN][4], psoe [LEVELS][MAXN][4];
  ts_down_t nd  [LEVELS][MAXN];
  ts_up_t   nu  [LEVELS][MAXN];
  spare_t   nsi [LEVELS][MAXN], nso [LEVELS][MAXN], nsoe [LEVELS][MAXN];
  logic [3:0] lemo_out [LEVELS][MAXN], trig_lemo [LEVELS][MAXN];
  logic [3:0] root_lemo_in = '0;

  // per card
  spare_t     c_so [CARDS], c_soe [CARDS];
  logic [CARDS-1:0] c_trig = '0;
  int unsigned c_ts [CARDS], c_edges [CARDS], c_rise [CARDS][NUM_SPARE];
  int contention = 0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar k = 0; k < 4 ** l; k++) begin : g_macb
      localparam logic [3:0] CODE = (l == 0) ? 4'd0 : (k == 0) ? 4'd2 : 4'd3;
      macb_top u (
        .rotary_code(CODE), .crystal_clk(crystal_clk), .ext_clk(1'b0), .ext_sync(1'b0),
        .rst_n(rst_n), .port_down(pd[l][k]), .port_up(pu[l][k]), .port_spare_i(psi[l][k]),
        .port_spare_o(pso[l][k]), .port_spare_oe(psoe[l][k]), .next_down(nd[l][k]),
        .next_up(nu[l][k]), .next_spare_i(nsi[l][k]), .next_spare_o(nso[l][k]),
        .next_spare_oe(nsoe[l][k]), .lemo_in(l == 0 ? root_lemo_in : 4'h0),
        .lemo_out(lemo_out[l][k]), .asic_trig_lemo(trig_lemo[l][k]));

      if (l == 0) begin : g_root
        assign nd[l][k]  = '0;
        assign nsi[l][k] = '0;
      end else begin : g_child
        // port k%4 of parent k/4 on the level above
        assign nd[l][k]            = pd[l-1][k/4][k%4];
        assign pu[l-1][k/4][k%4]   = nu[l][k];
        assign psi[l-1][k/4][k%4]  = resolve(pso[l-1][k/4][k%4], psoe[l-1][k/4][k%4],
                                             nso[l][k], nsoe[l][k]);
        assign nsi[l][k]           = psi[l-1][k/4][k%4];
        always @(crystal_clk)
          if ((psoe[l-1][k/4][k%4] & nsoe[l][k]) != '0) contention++;
      end

      if (l == LEVELS - 1) begin : g_cards
        for (genvar p = 0; p < 4; p++) begin : g_card
          localparam int C = k * 4 + p;
          ts_up_t up;
          assign pu[l][k][p]  = up;
          assign psi[l][k][p] = resolve(pso[l][k][p], psoe[l][k][p], c_so[C], c_soe[C]);
          assign c_ts[C]    = fee.ts;
          assign c_edges[C] = fee.clk_edges;
          assign c_rise[C]  = fee.spare_rises;
          always @(crystal_clk)
            if ((psoe[l][k][p] & c_soe[C]) != '0) contention++;
          fee64_model fee (.master(C == 0), .ext_ts_reset(1'b0), .down(pd[l][k][p]), .up(up),
                           .spare_in(psi[l][k][p]), .spare_out(c_so[C]), .spare_oe(c_soe[C]),
                           .asic_trig(c_trig[C]));
        end
      end
    end
  end

  int n_sync = 0, n_clk10 = 0, n_scaler_rst = 0, n_trig_acc = 0, n_asic = 0;
  int unsigned snap [CARDS];
  int unsigned clk10_rises;
  always @(posedge lemo_out[0][0][LO_CLK10]) clk10_rises++;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    int unsigned r0;
    clk10_rises = 0;
    #35 rst_n = 1'b1;
    repeat (5) @(posedge crystal_clk);
    #1;
    foreach (snap[c]) snap[c] = c_edges[c];
    repeat (40) @(posedge crystal_clk);
    #1;
    ok = 1;
    foreach (snap[c]) if (c_edges[c] - snap[c] != 40) ok = 0;
    check(ok, "every card gets every clock edge");

    // SYNC from the master card, turned round at the root
    g_lvl[LEVELS-1].g_macb[0].g_cards.g_card[0].fee.send_sync();
    repeat (4) @(posedge crystal_clk);
    #1;
    ok = 1;
    for (int c = 0; c < CARDS; c++) if (c_ts[c] != 4) ok = 0;
    check(ok, "all timestamps equal and counting from the SYNC");
    if (ok) n_sync++;

    // 10 MHz clock at the root Fast NIM output and at every card
    r0 = clk10_rises;
    foreach (snap[c]) snap[c] = c_rise[c][SP_CLK10];
    #1000;
    check(clk10_rises - r0 == 10, $sformatf("root Clock10 at 10 MHz (%0d)", clk10_rises - r0));
    ok = 1;
    for (int c = 1; c < CARDS; c++)
      if (c_rise[c][SP_CLK10] - snap[c] < 9 || c_rise[c][SP_CLK10] - snap[c] > 11) ok = 0;
    check(ok, "Clock10 at every card");
    if (ok && clk10_rises - r0 == 10) n_clk10++;

    // Scaler reset request from the DAQ at the root
    foreach (snap[c]) snap[c] = c_rise[c][SP_SCALER_RST];
    root_lemo_in[LI_RST_REQ] = 1'b1;
    #150 root_lemo_in[LI_RST_REQ] = 1'b0;
    #300;
    ok = 1;
    for (int c = 1; c < CARDS; c++) if (c_rise[c][SP_SCALER_RST] - snap[c] != 1) ok = 0;
    check(ok, "one scaler reset at every card");
    if (ok) n_scaler_rst++;

    // Trigger accept from the DAQ
    foreach (snap[c]) snap[c] = c_rise[c][SP_TRIG_ACC];
    root_lemo_in[LI_TRIG_ACC] = 1'b1;
    #150 root_lemo_in[LI_TRIG_ACC] = 1'b0;
    #10;
    ok = 1;
    for (int c = 0; c < CARDS; c++) if (c_rise[c][SP_TRIG_ACC] - snap[c] != 1) ok = 0;
    check(ok, "trigger accept at every card");
    if (ok) n_trig_acc++;

    // ASIC Trigger of random cards, and of the last card
    for (int t = 0; t < 20; t++) begin
      int c;
      c = (t == 19) ? CARDS - 1 : int'($urandom_range(CARDS - 1));
      c_trig = '0;
      c_trig[c] = 1'b1;
      #5;
      check(trig_lemo[0][0] == 4'(1 << (c / (CARDS / 4))),
            $sformatf("card %0d trigger on root output %0d", c, c / (CARDS / 4) + 1));
      if (trig_lemo[0][0] == 4'(1 << (c / (CARDS / 4)))) n_asic++;
    end
    c_trig = '0;
    #5 check(trig_lemo[0][0] == 4'b0, "triggers released");

    check(contention == 0, $sformatf("spare line contention (%0d)", contention));
    $display("tree: %0d levels, %0d cards; sync=%0d clk10=%0d scaler_reset=%0d trig_accept=%0d asic=%0d",
             LEVELS, CARDS, n_sync, n_clk10, n_scaler_rst, n_trig_acc, n_asic);
    check(n_sync > 0, "mechanism: SYNC through the tree");
    check(n_clk10 > 0, "mechanism: Clock10");
    check(n_scaler_rst > 0, "mechanism: scaler reset");
    check(n_trig_acc > 0, "mechanism: trigger accept");
    check(n_asic > 0, "mechanism: ASIC trigger OR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
