// comparator: turns a finished correlation into a data bit.
//
// In the cycle where `dump` is high the accumulator holds the complete sum
// of one bit; the comparator registers 1 when the sum is below the
// threshold (bipolar -1, binary 1) and 0 otherwise, and pulses `valid`
// with it. A clocked comparator against a threshold is in the design; the
// tie rule (a sum equal to the threshold gives 0) is this design's own.
//
// Timing: data_out and valid appear one cycle after dump.
module comparator #(
  parameter int unsigned ACC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,     // synchronous, active low
  input  logic             dump,      // acc holds a finished sum
  input  logic [ACC_W-1:0] acc,
  input  logic [ACC_W-1:0] thr,
  output logic             data_out,
  output logic             valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_out <= 1'b0;
      valid    <= 1'b0;
    end else begin
      valid <= dump;
      if (dump) data_out <= (acc < thr);
    end
  end

endmodule
