// macb_clk_divider -- divides the external SMA reference clock by 2 and by 4.
//
// In codes 6 and 12 the back-panel clock is 100 MHz and in code 13 it is
// 200 MHz; the Timestamping clock sent to the FEE64 cards is always 50 MHz.
// Two flip-flops on the external clock give both ratios: div2_q toggles on
// every rising edge (ext/2) and div4_q toggles on every edge where div2_q is
// low (ext/4), so both have a 50 % duty cycle and rise on the same edge.  The
// divide ratios are from the specification; the circuit and its asynchronous,
// active-low reset (both outputs low) are this design's own.
//
// Timing: after reset release, both outputs rise on the 1st rising edge of
// ext_clk; clk_div2 then has period 2 and clk_div4 period 4 ext_clk cycles.
module macb_clk_divider (
  input  logic ext_clk,
  input  logic rst_n,
  output logic clk_div2,
  output logic clk_div4
);

  logic div2_q, div4_q;

  always_ff @(posedge ext_clk or negedge rst_n) begin
    if (!rst_n) begin
      div2_q <= 1'b0;
      div4_q <= 1'b0;
    end else begin
      div2_q <= ~div2_q;
      if (!div2_q) div4_q <= ~div4_q;
    end
  end

  assign clk_div2 = div2_q;
  assign clk_div4 = div4_q;

endmodule
