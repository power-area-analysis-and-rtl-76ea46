// dsss_transmitter: direct-sequence spread-spectrum transmitter.
//
// The serial data bit held in the data latch is modulo-2 added to the output
// of the programmable PN code generator; the clock divider makes each data
// bit last one code length (32/64/128/256 chips, chosen by s3s2) and tells
// the latch when to take the next bit. This is the block structure of the
// design: data latch, clock divider, PN code generator and XOR.
//
// Interface and timing (this design's own choices): tx_data_in is sampled in
// the cycle where data_req is high (chip 0 of every bit, the first such cycle
// being the first one after reset). coded is the chip of the previous cycle
// (one register); frame is high together with the first coded chip after
// reset, so that a receiver can be given perfect chip and bit alignment.
// sel must only change while rst_n is low.
module dsss_transmitter
  import dsss_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,      // synchronous, active low
  input  code_sel_t sel,        // s3s2s1s0
  input  logic      data_in,    // serial data
  output logic      data_req,   // data_in is sampled this cycle
  output logic      coded,      // coded chip (registered)
  output logic      frame       // first coded chip after reset
);

  logic first, last, pn, data_bit;
  logic [7:0] chip;
  logic started_q;

  clock_divider u_div (
    .clk, .rst_n, .restart(1'b0), .len_sel(sel.len),
    .first, .last, .chip
  );

  pn_code_gen u_pn (
    .clk, .rst_n, .restart(1'b0), .sel, .pn
  );

  data_latch u_latch (
    .clk, .rst_n, .load(first), .data_in, .data_bit
  );

  spreader u_xor (
    .clk, .rst_n, .data_bit, .pn, .coded
  );

  assign data_req = first;

  // frame: registered like coded, high for the first chip after reset
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      started_q <= 1'b0;
      frame     <= 1'b0;
    end else begin
      started_q <= 1'b1;
      frame     <= !started_q;
    end
  end

  logic unused;
  assign unused = ^{last, chip};

endmodule
