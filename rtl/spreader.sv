// spreader: the transmitter's modulo-2 adder.
//
// The data bit is spread by XOR with the PN chip (modulo-2 addition, as in
// the design). The coded chip is registered so that the transmitter output
// is glitch-free; that register is this design's own choice and makes the
// output appear one cycle after the chip it belongs to.
module spreader (
  input  logic clk,
  input  logic rst_n,      // synchronous, active low
  input  logic data_bit,
  input  logic pn,
  output logic coded       // data_bit ^ pn of the previous cycle
);

  always_ff @(posedge clk) begin
    if (!rst_n) coded <= 1'b0;
    else        coded <= data_bit ^ pn;
  end

endmodule
