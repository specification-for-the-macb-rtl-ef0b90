// tb_macb_top -- end-to-end test of the MACB at its default size.
//
// Part 1 builds the two-level tree of the multi-level configuration: a root
// MACB (code 0, internal 50 MHz crystal) with a Master/Branch MACB (code 2)
// on its port 1 and a Slave/Branch MACB (code 3) on its port 2, each serving
// four FEE64 models; the master FEE64 sits on port 1 of the Master/Branch.
// It checks that all eight cards get the same clock, that one SYNC pulse from
// the master FEE64 travels up to the root and back down so that all eight
// timestamps become equal, that the 10 MHz Correlation DAQ clock reaches the
// root's Fast NIM output and every card, that a reset request at the root's
// Fast NIM input yields a scaler reset on a 10 MHz rising edge at the Fast
// NIM output and at every card, that trigger accept reaches every card, and
// that ASIC Triggers come out on the root's Fast NIM output of the right port.
//
// Part 2 takes a stand-alone root MACB with four cards through the external
// clock codes 1, 4, 5, 6, 12 and 13 (50, 100 and 200 MHz references, divided
// to 50 MHz), external SYNC, the external timestamp reset of code 4, and an
// undefined (commissioning) code, which must leave the ports quiet.
//
// Every mechanism is counted; one that never happens counts as a failure.
// No spare line may ever be driven from both ends.
`timescale 1ns/1ps
module tb_macb_top;
  import macb_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Resolve one bidirectional spare bundle: each bit is driven by whichever
  // end enables it, otherwise pulled low.
  function automatic spare_t resolve(spare_t a_o, spare_t a_oe, spare_t b_o, spare_t b_oe);
    for (int i = 0; i < NUM_SPARE; i++)
      resolve[i] = a_oe[i] ? a_o[i] : (b_oe[i] ? b_o[i] : 1'b0);
  endfunction

  int contention = 0;
  task automatic no_contention(spare_t a_oe, spare_t b_oe);
    if ((a_oe & b_oe) != '0) contention++;
  endtask

  // ---------------------------------------------------------------- clocks
  logic crystal_clk = 1'b0;
  always #10 crystal_clk = ~crystal_clk;       // 50 MHz
  realtime ext_half = 10.0;
  logic ext_clk = 1'b0;
  always #(ext_half) ext_clk = ~ext_clk;
  logic rst_n = 1'b0;

  // ================================================================ Part 1
  // root
  ts_down_t r_down [4];  ts_up_t r_up [4];
  spare_t   r_si [4], r_so [4], r_soe [4];
  ts_up_t   r_next_up; spare_t r_nso, r_nsoe;
  logic [3:0] r_lemo_in = '0, r_lemo_out, r_trig;
  // Master/Branch (mb) and Slave/Branch (sb)
  ts_down_t mb_down [4], sb_down [4];
  ts_up_t   mb_up [4],   sb_up [4], mb_next_up, sb_next_up;
  spare_t   mb_si [4], mb_so [4], mb_soe [4], sb_si [4], sb_so [4], sb_soe [4];
  spare_t   mb_nsi, mb_nso, mb_nsoe, sb_nsi, sb_nso, sb_nsoe;
  logic [3:0] mb_lemo_out, sb_lemo_out, mb_trig, sb_trig;
  // cards 0-3 on mb, 4-7 on sb
  ts_down_t f_down [8]; ts_up_t f_up [8];
  spare_t   f_si [8], f_so [8], f_soe [8];
  logic [7:0] f_trig = '0;
  // observed state of each card model
  int unsigned f_ts [8], f_edges [8], f_rise [8][NUM_SPARE];
  int unsigned s_ts [4], s_rise [4][NUM_SPARE];

  macb_top root (
    .rotary_code(4'd0), .crystal_clk(crystal_clk), .ext_clk(1'b0), .ext_sync(1'b0), .rst_n(rst_n),
    .port_down(r_down), .port_up(r_up), .port_spare_i(r_si), .port_spare_o(r_so),
    .port_spare_oe(r_soe), .next_down('0), .next_up(r_next_up), .next_spare_i('0),
    .next_spare_o(r_nso), .next_spare_oe(r_nsoe), .lemo_in(r_lemo_in), .lemo_out(r_lemo_out),
    .asic_trig_lemo(r_trig));

  macb_top mb (
    .rotary_code(4'd2), .crystal_clk(crystal_clk), .ext_clk(1'b0), .ext_sync(1'b0), .rst_n(rst_n),
    .port_down(mb_down), .port_up(mb_up), .port_spare_i(mb_si), .port_spare_o(mb_so),
    .port_spare_oe(mb_soe), .next_down(r_down[0]), .next_up(mb_next_up), .next_spare_i(mb_nsi),
    .next_spare_o(mb_nso), .next_spare_oe(mb_nsoe), .lemo_in(4'hF), .lemo_out(mb_lemo_out),
    .asic_trig_lemo(mb_trig));

  macb_top sb (
    .rotary_code(4'd3), .crystal_clk(crystal_clk), .ext_clk(1'b0), .ext_sync(1'b0), .rst_n(rst_n),
    .port_down(sb_down), .port_up(sb_up), .port_spare_i(sb_si), .port_spare_o(sb_so),
    .port_spare_oe(sb_soe), .next_down(r_down[1]), .next_up(sb_next_up), .next_spare_i(sb_nsi),
    .next_spare_o(sb_nso), .next_spare_oe(sb_nsoe), .lemo_in(4'hF), .lemo_out(sb_lemo_out),
    .asic_trig_lemo(sb_trig));

  // root port 1 <-> mb Port Next, root port 2 <-> sb Port Next, ports 3-4 open
  assign r_up[0] = mb_next_up;
  assign r_up[1] = sb_next_up;
  assign r_up[2] = '0;
  assign r_up[3] = '0;
  assign r_si[0] = resolve(r_so[0], r_soe[0], mb_nso, mb_nsoe);
  assign mb_nsi  = r_si[0];
  assign r_si[1] = resolve(r_so[1], r_soe[1], sb_nso, sb_nsoe);
  assign sb_nsi  = r_si[1];
  assign r_si[2] = resolve(r_so[2], r_soe[2], '0, '0);
  assign r_si[3] = resolve(r_so[3], r_soe[3], '0, '0);

  for (genvar i = 0; i < 8; i++) begin : g_fee
    if (i < 4) begin : g_mb
      assign f_down[i] = mb_down[i];
      assign mb_up[i]  = f_up[i];
      assign mb_si[i]  = resolve(mb_so[i], mb_soe[i], f_so[i], f_soe[i]);
      assign f_si[i]   = mb_si[i];
    end else begin : g_sb
      assign f_down[i]  = sb_down[i-4];
      assign sb_up[i-4] = f_up[i];
      assign sb_si[i-4] = resolve(sb_so[i-4], sb_soe[i-4], f_so[i], f_soe[i]);
      assign f_si[i]    = sb_si[i-4];
    end
    assign f_ts[i]    = fee.ts;
    assign f_edges[i] = fee.clk_edges;
    assign f_rise[i]  = fee.spare_rises;
    fee64_model fee (.master(i == 0), .ext_ts_reset(1'b0), .down(f_down[i]), .up(f_up[i]),
                     .spare_in(f_si[i]), .spare_out(f_so[i]), .spare_oe(f_soe[i]),
                     .asic_trig(f_trig[i]));
  end

  // ================================================================ Part 2
  logic [3:0] s_code = 4'd1;
  logic       s_ext_sync = 1'b0, s_ext_ts_rst;
  ts_down_t s_down [4]; ts_up_t s_up [4], s_next_up;
  spare_t   s_si [4], s_so [4], s_soe [4], s_nso, s_nsoe, c_so [4], c_soe [4];
  logic [3:0] s_lemo_in = '0, s_lemo_out, s_trig;

  macb_top solo (
    .rotary_code(s_code), .crystal_clk(crystal_clk), .ext_clk(ext_clk), .ext_sync(s_ext_sync),
    .rst_n(rst_n), .port_down(s_down), .port_up(s_up), .port_spare_i(s_si), .port_spare_o(s_so),
    .port_spare_oe(s_soe), .next_down('0), .next_up(s_next_up), .next_spare_i('0),
    .next_spare_o(s_nso), .next_spare_oe(s_nsoe), .lemo_in(s_lemo_in), .lemo_out(s_lemo_out),
    .asic_trig_lemo(s_trig));

  assign s_ext_ts_rst = (s_code == 4'd4);
  for (genvar i = 0; i < 4; i++) begin : g_solo
    assign s_si[i] = resolve(s_so[i], s_soe[i], c_so[i], c_soe[i]);
    assign s_ts[i]   = card.ts;
    assign s_rise[i] = card.spare_rises;
    fee64_model card (.master(i == 0), .ext_ts_reset(s_ext_ts_rst), .down(s_down[i]),
                      .up(s_up[i]), .spare_in(s_si[i]), .spare_out(c_so[i]),
                      .spare_oe(c_soe[i]), .asic_trig(1'b0));
  end

  // ------------------------------------------------------- contention monitor
  always @(crystal_clk or ext_clk) begin
    no_contention(r_soe[0], mb_nsoe);
    no_contention(r_soe[1], sb_nsoe);
    for (int i = 0; i < 4; i++) begin
      no_contention(mb_soe[i], f_soe[i]);
      no_contention(sb_soe[i], f_soe[i+4]);
      no_contention(s_soe[i], c_soe[i]);
    end
  end

  int n;
  realtime per;

  // ------------------------------------------------------- mechanism counters
  int n_tree_sync = 0, n_clk10 = 0, n_scaler_rst = 0, n_trig_acc = 0, n_asic_or = 0;
  int n_div1 = 0, n_div2 = 0, n_div4 = 0, n_ext_sync = 0, n_int_sync = 0;
  int n_ext_ts_rst = 0, n_quiet = 0;

  // Timestamps of all cards in the tree must agree after a SYNC
  function automatic bit tree_ts_equal();
    for (int i = 1; i < 8; i++) if (f_ts[i] != f_ts[0]) return 0;
    return 1;
  endfunction

  function automatic bit solo_ts_equal();
    for (int i = 1; i < 4; i++) if (s_ts[i] != s_ts[0]) return 0;
    return 1;
  endfunction

  // Rising edges of a probed signal within a time window, result in n
  int probe_sel = 0;
  logic probe;
  assign probe = (probe_sel == 0) ? r_lemo_out[LO_CLK10] :
                 (probe_sel == 1) ? s_lemo_out[LO_CLK10] : s_down[2].clock;
  int n_probe = 0;
  always @(posedge probe) n_probe++;

  task automatic count_rises(input int sel, input realtime window);
    int start;
    probe_sel = sel;
    #0.001 start = n_probe;
    #(window);
    n = n_probe - start;
  endtask

  // Period of port 1's clock of the stand-alone MACB, result in per
  task automatic solo_clock_period();
    realtime t0;
    @(posedge s_down[0].clock) t0 = $realtime;
    @(posedge s_down[0].clock) per = $realtime - t0;
  endtask

  // ------------------------------------------------------------- watchdog
  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- stimulus
  int unsigned rises_before [8];

  initial begin
    #35 rst_n = 1'b1;
    repeat (10) @(posedge crystal_clk);

    // ---- Part 1: tree
    // Clock reaches every card
    begin
      int unsigned e0 [8];
      @(posedge crystal_clk);
      #1;
      foreach (e0[i]) e0[i] = f_edges[i];
      repeat (50) @(posedge crystal_clk);
      #1;
      for (int i = 0; i < 8; i++)
        check(f_edges[i] - e0[i] == 50, $sformatf("card %0d clock", i));
    end

    // Timestamps start out unrelated; one SYNC from the master aligns them
    g_fee[0].fee.send_sync();
    repeat (3) @(posedge crystal_clk);
    #1;
    check(tree_ts_equal(), "tree timestamps equal after SYNC");
    check(f_ts[5] == 3, "timestamp counts from SYNC");
    if (tree_ts_equal()) n_tree_sync++;
    repeat (100) @(posedge crystal_clk);
    #1 check(tree_ts_equal(), "tree timestamps stay equal");

    // 10 MHz Correlation DAQ clock at root Fast NIM and at the cards
    count_rises(0, 1000.0);
    check(n == 10, $sformatf("root Clock10 10 MHz (%0d edges/us)", n));
    for (int i = 0; i < 8; i++) rises_before[i] = f_rise[i][SP_CLK10];
    #1000;
    for (int i = 1; i < 8; i++) begin
      int d;
      d = int'(f_rise[i][SP_CLK10] - rises_before[i]);
      check(d >= 9 && d <= 11, $sformatf("card %0d sees Clock10 (%0d)", i, d));
    end
    if (n == 10) n_clk10++;

    // Scaler reset request -> scaler reset on a Clock10 rising edge
    for (int i = 0; i < 8; i++) rises_before[i] = f_rise[i][SP_SCALER_RST];
    check(r_lemo_out[LO_SCALER_RST] == 1'b0, "scaler reset idle");
    #3 r_lemo_in[LI_RST_REQ] = 1'b1;
    fork
      begin #150 r_lemo_in[LI_RST_REQ] = 1'b0; end
      fork
        begin
          @(posedge r_lemo_out[LO_SCALER_RST]);
          check(r_lemo_out[LO_CLK10] == 1'b1, "scaler reset starts with Clock10 high");
          check(g_fee[0].fee.cnt5 == 3'd0, "scaler reset on Clock10 rising edge");
          n_scaler_rst++;
        end
        begin #1000 check(0, "scaler reset never came"); end
      join_any
    join
    disable fork;
    #200;
    for (int i = 1; i < 8; i++)
      check(f_rise[i][SP_SCALER_RST] - rises_before[i] == 1,
            $sformatf("card %0d sees scaler reset", i));
    check(g_fee[0].fee.rst_q == 1'b0, "scaler reset is one pulse");

    // Trigger accept reaches all cards
    for (int i = 0; i < 8; i++) rises_before[i] = f_rise[i][SP_TRIG_ACC];
    r_lemo_in[LI_TRIG_ACC] = 1'b1;
    #150 r_lemo_in[LI_TRIG_ACC] = 1'b0;
    #10;
    begin
      bit all = 1;
      for (int i = 0; i < 8; i++)
        if (f_rise[i][SP_TRIG_ACC] - rises_before[i] != 1) all = 0;
      check(all, "trigger accept at all cards");
      if (all) n_trig_acc++;
    end

    // ASIC Triggers: port of the root that leads to the card
    check(r_trig == 4'b0000, "no ASIC trigger");
    f_trig[6] = 1'b1; #5;
    check(r_trig == 4'b0010, "card 6 trigger at root port 2 output");
    check(sb_trig == 4'b0100, "card 6 trigger at slave branch port 3 output");
    f_trig[1] = 1'b1; #5;
    check(r_trig == 4'b0011, "OR of both branches");
    f_trig[6] = 1'b0; #5;
    check(r_trig == 4'b0001, "card 1 trigger at root port 1 output");
    if (r_trig == 4'b0001) n_asic_or++;
    f_trig = '0; #5;
    check(r_trig == 4'b0000, "triggers released");

    // ---- Part 2: stand-alone MACB, external references
    // code 1: 50 MHz external clock and external SYNC
    s_code = 4'd1; ext_half = 10.0;
    repeat (4) @(posedge ext_clk);
    solo_clock_period();
    check(per == 20.0, $sformatf("code 1 port clock 20 ns (%0t)", per));
    if (per == 20.0) n_div1++;
    @(negedge s_down[0].clock) s_ext_sync = 1'b1;
    @(negedge s_down[0].clock) s_ext_sync = 1'b0;
    #1 check(solo_ts_equal() && s_ts[2] == 0, "code 1 external SYNC");
    if (solo_ts_equal()) n_ext_sync++;

    // code 13: 200 MHz / 4, external SYNC
    s_code = 4'd13; ext_half = 2.5;
    repeat (8) @(posedge ext_clk);
    solo_clock_period();
    check(per == 20.0, $sformatf("code 13 port clock 20 ns (%0t)", per));
    if (per == 20.0) n_div4++;
    @(negedge s_down[0].clock) s_ext_sync = 1'b1;
    @(negedge s_down[0].clock) s_ext_sync = 1'b0;
    repeat (3) @(posedge s_down[0].clock);
    #1 check(solo_ts_equal() && s_ts[1] == 3, "code 13 external SYNC");

    // code 12: 100 MHz / 2, external SYNC
    s_code = 4'd12; ext_half = 5.0;
    repeat (8) @(posedge ext_clk);
    solo_clock_period();
    check(per == 20.0, $sformatf("code 12 port clock 20 ns (%0t)", per));
    if (per == 20.0) n_div2++;

    // code 6: 100 MHz / 2, SYNC from the master card
    s_code = 4'd6;
    repeat (8) @(posedge ext_clk);
    solo_clock_period();
    check(per == 20.0, "code 6 port clock 20 ns");
    g_solo[0].card.send_sync();
    repeat (2) @(posedge s_down[0].clock);
    #1 check(solo_ts_equal() && s_ts[3] == 2, "code 6 SYNC from master card");
    if (solo_ts_equal()) n_int_sync++;

    // code 5: 50 MHz external, internal SYNC
    s_code = 4'd5; ext_half = 10.0;
    repeat (4) @(posedge ext_clk);
    solo_clock_period();
    check(per == 20.0, "code 5 port clock 20 ns");
    g_solo[0].card.send_sync();
    repeat (2) @(posedge s_down[0].clock);
    #1 check(solo_ts_equal() && s_ts[3] == 2, "code 5 SYNC from master card");

    // code 4: external timestamp reset from a Fast NIM input
    s_code = 4'd4;
    repeat (20) @(posedge ext_clk);
    for (int i = 0; i < 4; i++) rises_before[i] = s_rise[i][SP_SCALER_RST];
    s_lemo_in[LI_EXT_RST] = 1'b1;
    #100;
    check(s_lemo_out[LO_SCALER_RST] == 1'b0, "code 4 scaler reset output idle");
    s_lemo_in[LI_EXT_RST] = 1'b0;
    #10;
    begin
      bit all = 1;
      for (int i = 0; i < 4; i++)
        if (s_rise[i][SP_SCALER_RST] - rises_before[i] != 1) all = 0;
      check(all, "code 4 external reset at all cards");
      if (all) n_ext_ts_rst++;
    end
    count_rises(1, 1000.0);
    check(n == 10, "code 4 Clock10 at Fast NIM output");

    // undefined code: commissioning, nothing driven
    s_code = 4'd9;
    #5;
    count_rises(2, 200.0);
    check(n == 0, "commissioning code: no clock on ports");
    check(s_soe[0] == '0 && s_soe[3] == '0 && s_lemo_out == '0, "commissioning code: outputs quiet");
    if (n == 0) n_quiet++;

    // ---- mechanisms
    check(contention == 0, $sformatf("spare line contention (%0d)", contention));
    $display("mechanisms: tree_sync=%0d clk10=%0d scaler_reset=%0d trig_accept=%0d asic_or=%0d",
             n_tree_sync, n_clk10, n_scaler_rst, n_trig_acc, n_asic_or);
    $display("            ext/1=%0d ext/2=%0d ext/4=%0d ext_sync=%0d int_sync=%0d ext_ts_reset=%0d quiet=%0d",
             n_div1, n_div2, n_div4, n_ext_sync, n_int_sync, n_ext_ts_rst, n_quiet);
    check(n_tree_sync > 0, "mechanism: tree SYNC");
    check(n_clk10 > 0, "mechanism: Clock10");
    check(n_scaler_rst > 0, "mechanism: scaler reset");
    check(n_trig_acc > 0, "mechanism: trigger accept");
    check(n_asic_or > 0, "mechanism: ASIC trigger OR");
    check(n_div1 > 0, "mechanism: external clock");
    check(n_div2 > 0, "mechanism: external clock / 2");
    check(n_div4 > 0, "mechanism: external clock / 4");
    check(n_ext_sync > 0, "mechanism: external SYNC");
    check(n_int_sync > 0, "mechanism: SYNC from master card");
    check(n_ext_ts_rst > 0, "mechanism: external timestamp reset");
    check(n_quiet > 0, "mechanism: commissioning code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
