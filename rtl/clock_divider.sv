// clock_divider: divides the chip clock by the code length.
//
// One data bit lasts one code length of chips (32, 64, 128 or 256 chips,
// chosen by s3s2). Instead of producing a slower clock, this divider keeps a
// chip counter and gives single-cycle strobes that act as clock enables for
// the data latch (transmitter) and the accumulator dump (receiver): `first`
// is high on chip 0 of every bit and `last` on its final chip. Dividing by
// the code length follows the design; using enables instead of a derived
// clock is this design's own choice.
//
// Timing: after reset, or in a cycle where restart is high, the current
// cycle is chip 0. len_sel is expected to change only with reset/restart.
module clock_divider
  import dsss_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,     // synchronous, active low
  input  logic     restart,   // this cycle is chip 0
  input  len_sel_t len_sel,   // s3s2
  output logic     first,     // chip 0 of a bit
  output logic     last,      // last chip of a bit
  output logic [7:0] chip     // chip index within the bit
);

  logic [7:0] cnt_q, cur;
  logic [7:0] top;

  always_comb begin
    cur   = restart ? 8'd0 : cnt_q;
    top   = 8'(chips_per_bit(len_sel) - 1);
    first = (cur == 8'd0);
    last  = (cur == top);
    chip  = cur;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    cnt_q <= 8'd0;
    else if (last) cnt_q <= 8'd0;
    else           cnt_q <= cur + 8'd1;
  end

endmodule
