// tb_macb_daq_router -- checks the spare-line and Fast NIM routing per code.
//
// For every switch setting, all spare inputs of the four ports, of Port Next
// and the Fast NIM inputs are randomised many times.  A reference written
// line by line from the allocation tables gives, for each port and spare
// line, whether the MACB drives it and from what; the Port Next lines and the
// Fast NIM outputs are checked the same way.
module tb_macb_daq_router;
  import macb_pkg::*;

  logic [3:0] code;
  macb_cfg_t  cfg;
  spare_t port_i [NUM_PORTS], port_o [NUM_PORTS], port_oe [NUM_PORTS];
  spare_t next_i, next_o, next_oe;
  logic [3:0] lemo_in, lemo_out;
  int checks = 0, failures = 0;

  macb_mode_decoder dec (.code(code), .cfg(cfg));
  macb_daq_router dut (
    .cfg(cfg), .port_spare_i(port_i), .port_spare_o(port_o), .port_spare_oe(port_oe),
    .next_spare_i(next_i), .next_spare_o(next_o), .next_spare_oe(next_oe),
    .lemo_in(lemo_in), .lemo_out(lemo_out));

  // Sources: a line is undriven (oe 0), or driven from one of these
  typedef enum {UNDRIVEN, FROM_P1, FROM_NEXT, FROM_LEMO_TRIG, FROM_LEMO_REQ,
                FROM_LEMO_EXTRST, DRIVE_LOW} src_e;

  // Spare s (0..3 = Spare1..4) of port p (0..3 = port 1..4)
  function automatic src_e port_src(int c, int p, int s);
    bit root   = (c inside {0, 1, 4, 5, 6, 12, 13});
    bit master = root || c == 2;
    if (!(root || c == 2 || c == 3)) return UNDRIVEN;
    case (s)
      0: return (master && p == 0) ? UNDRIVEN : (master ? FROM_P1 : FROM_NEXT);
      1: if (c == 4) return FROM_LEMO_EXTRST;
         else return (master && p == 0) ? UNDRIVEN : (master ? FROM_P1 : FROM_NEXT);
      2: if (master && p == 0) return root ? FROM_LEMO_REQ : FROM_NEXT;
         else return UNDRIVEN;
      default: return root ? FROM_LEMO_TRIG : FROM_NEXT;
    endcase
  endfunction

  function automatic src_e next_src(int c, int s);
    if (c == 2 && s < 2) return FROM_P1;
    return UNDRIVEN;
  endfunction

  function automatic src_e lemo_src(int c, int k);
    bit root = (c inside {0, 1, 4, 5, 6, 12, 13});
    if (!root) return DRIVE_LOW;
    if (k == 0) return FROM_P1;                 // Clock10 from port 1 Spare1
    if (k == 1) return (c == 4) ? DRIVE_LOW : FROM_P1; // scaler reset from port 1 Spare2
    return DRIVE_LOW;
  endfunction

  function automatic logic value_of(src_e src, int s);
    case (src)
      FROM_P1:          return port_i[0][s];
      FROM_NEXT:        return next_i[s];
      FROM_LEMO_TRIG:   return lemo_in[0];
      FROM_LEMO_REQ:    return lemo_in[1];
      FROM_LEMO_EXTRST: return lemo_in[2];
      default:          return 1'b0;
    endcase
  endfunction

  task automatic check_line(logic o, logic oe, src_e src, int s, string what);
    checks++;
    if (src == UNDRIVEN) begin
      if (oe !== 1'b0) begin failures++; $display("FAIL %s driven, code %0d", what, code); end
    end else if (oe !== 1'b1 || o !== value_of(src, s)) begin
      failures++; $display("FAIL %s code %0d: oe=%b o=%b want %s", what, code, oe, o, src.name());
    end
  endtask

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
        for (int p = 0; p < NUM_PORTS; p++) port_i[p] = 4'($urandom);
        next_i  = 4'($urandom);
        lemo_in = 4'($urandom);
        #1;
        for (int p = 0; p < NUM_PORTS; p++)
          for (int s = 0; s < NUM_SPARE; s++)
            check_line(port_o[p][s], port_oe[p][s], port_src(c, p, s), s,
                       $sformatf("port %0d spare%0d", p + 1, s + 1));
        for (int s = 0; s < NUM_SPARE; s++)
          check_line(next_o[s], next_oe[s], next_src(c, s), s, $sformatf("next spare%0d", s + 1));
        for (int k = 0; k < NUM_LEMO; k++) begin
          checks++;
          if (lemo_out[k] !== value_of(lemo_src(c, k), k)) begin
            failures++; $display("FAIL lemo out %0d code %0d", k, c);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
