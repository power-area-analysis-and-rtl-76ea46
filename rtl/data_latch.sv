// data_latch: holds the data bit being spread for a whole bit period.
//
// The transmitter's data store. At each bit boundary (load high, chip 0)
// it takes the serial input; in that same cycle the new bit is already
// presented on data_bit (mux bypass), and the register keeps it for the
// remaining chips of the bit. That a latch holds the bit for one code length
// follows the design; the one-bit depth and the same-cycle bypass are this
// design's own choices.
module data_latch (
  input  logic clk,
  input  logic rst_n,      // synchronous, active low
  input  logic load,       // bit boundary: sample data_in
  input  logic data_in,    // serial data
  output logic data_bit    // bit being spread this cycle
);

  logic q;

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= 1'b0;
    else if (load) q <= data_in;
  end

  assign data_bit = load ? data_in : q;

endmodule
