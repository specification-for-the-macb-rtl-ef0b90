// tb_macb_clk_divider -- checks the /2 and /4 external clock divider.
//
// A 200 MHz reference (5 ns period) is applied.  After reset release the
// test measures, for each output, the time between rising edges (10 ns for
// /2, i.e. 100 MHz; 20 ns for /4, i.e. the 50 MHz Timestamping clock), the
// high time (50 % duty), that both outputs rise on the first reference edge,
// and that reset forces both low.
`timescale 1ns/1ps
module tb_macb_clk_divider;
  logic ext_clk = 1'b0, rst_n = 1'b0;
  logic clk_div2, clk_div4;
  int checks = 0, failures = 0;

  macb_clk_divider dut (.ext_clk(ext_clk), .rst_n(rst_n),
                        .clk_div2(clk_div2), .clk_div4(clk_div4));

  always #2.5 ext_clk = ~ext_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Reference counters, independent of the DUT: count reference edges
  int unsigned ref_edges = 0;
  always @(posedge ext_clk) if (rst_n) ref_edges <= ref_edges + 1;

  initial begin
    #2000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_rise2 [$], t_rise4 [$], t_fall4;
    #12 check(clk_div2 == 1'b0 && clk_div4 == 1'b0, "outputs low in reset");
    @(negedge ext_clk) rst_n = 1'b1;
    @(posedge ext_clk) #0.1;
    check(clk_div2 && clk_div4, "both rise on first edge after reset");
    fork
      repeat (5) begin @(posedge clk_div2) t_rise2.push_back($realtime); end
      repeat (5) begin @(posedge clk_div4) t_rise4.push_back($realtime); end
    join
    for (int i = 1; i < 5; i++) begin
      check(t_rise2[i] - t_rise2[i-1] == 10.0, "div2 period 10 ns");
      check(t_rise4[i] - t_rise4[i-1] == 20.0, "div4 period 20 ns");
    end
    @(posedge clk_div4) t_fall4 = $realtime;
    @(negedge clk_div4) check($realtime - t_fall4 == 10.0, "div4 high 10 ns");
    // Sampled state against the reference edge count: div2 = edge count mod 2,
    // div4 = high for counts 1,2 mod 4.
    repeat (16) begin
      @(posedge ext_clk) #0.1;
      check(clk_div2 == ref_edges[0], "div2 follows edge count");
      check(clk_div4 == (ref_edges % 4 == 1 || ref_edges % 4 == 2), "div4 follows edge count");
    end
    #1.1 rst_n = 1'b0;
    #0.1 check(!clk_div2 && !clk_div4, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
