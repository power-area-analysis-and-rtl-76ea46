// mac: the correlator's multiply-accumulate unit.
//
// Multiplying a received sample by a PN chip of value +1 or -1 is only a sign
// change, so no multiplier is needed: the adder takes either the sample or
// its sign-changed copy and adds it to the running sum. Samples arrive in
// offset binary (the plain output code of an A/D converter, mid-scale meaning
// zero), where the sign change is a bitwise inversion of the code:
// ~x = (2^DATA_W - 1) - x mirrors x about mid-scale. The sum therefore stays
// non-negative and an unsigned register of ACC_W bits holds it: after L chips
// it is L*(2^DATA_W-1)/2 plus or minus the correlation. If the sum would pass
// 2^ACC_W - 1 it is clamped there and `sat` is raised for that cycle. The
// sign-change-instead-of-multiply principle and the accumulator width as the
// "internal register" follow the design; the offset-binary input, the
// inversion and the clamping are this design's own choices.
//
// Timing: one sample per clock. With `first` high the sum restarts with the
// current term; acc is the registered sum including the previous cycle's
// sample. After the last chip of a bit, acc holds the full correlation for
// one cycle (the cycle of the next bit's chip 0).
module mac #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,   // synchronous, active low
  input  logic              first,   // chip 0 of a bit: restart the sum
  input  logic              pn,      // PN chip: 1 means -1, 0 means +1
  input  logic [DATA_W-1:0] x,       // received sample, offset binary
  output logic [ACC_W-1:0]  acc,     // registered running sum
  output logic              sat      // the sum was clamped this cycle
);

  localparam logic [ACC_W:0] MAX = {1'b0, {ACC_W{1'b1}}};

  logic [DATA_W-1:0] term;
  logic [ACC_W:0]    sum;

  always_comb begin
    term = pn ? ~x : x;                             // sign modification
    sum  = (first ? '0 : {1'b0, acc}) + (ACC_W+1)'(term);
    sat  = (sum > MAX);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= sat ? MAX[ACC_W-1:0] : sum[ACC_W-1:0];
  end

  initial assert (ACC_W >= DATA_W) else $error("mac: ACC_W must be at least DATA_W");

endmodule
