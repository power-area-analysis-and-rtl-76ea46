// threshold: decision threshold for the selected code length.
//
// With offset-binary samples the correlation sum of one bit is centred on
// L*(2^DATA_W-1)/2, where L = 32 << s3s2 is the number of chips per bit: a
// bit sent as 0 (bipolar +1) lands above it and a bit sent as 1 (bipolar -1)
// below it. The threshold is that centre, (2^DATA_W - 1) << (4 + s3s2),
// clamped to the accumulator range. A threshold block driven by s3s2 is in
// the design; the formula follows from this design's choice of offset-binary
// input.
module threshold
  import dsss_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 16
) (
  input  len_sel_t         len_sel,   // s3s2
  output logic [ACC_W-1:0] thr
);

  logic [31:0] full;

  always_comb begin
    full = ((32'd1 << DATA_W) - 32'd1) << (4 + int'(len_sel));
    thr  = (ACC_W < 32 && (full >> ACC_W) != 32'd0) ? '1 : ACC_W'(full);
  end

  initial assert (DATA_W + 8 <= 32) else $error("threshold: DATA_W too large");

endmodule
