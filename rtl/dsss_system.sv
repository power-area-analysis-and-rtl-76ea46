// dsss_system: DS-SS transmitter and receiver of the sensor link.
//
// The transmitter spreads a serial data stream with a programmable PN code
// (12 maximal-length codes of 32, 64, 128 or 256 chips per bit) and the
// correlator receiver despreads it. Between them lies the analog link:
// carrier modulation, channel, demodulation and A/D conversion. That part is
// not digital logic, so its two ends are ports: tx_coded/tx_frame leave the
// chip and rx_sample/rx_sync come back. A loop-back with the ideal mapping
// chip 0 -> mid-scale + A, chip 1 -> mid-scale - A (bipolar format) recovers
// the transmitted bits.
//
// Timing: one chip per clock. See dsss_transmitter and dsss_receiver.
module dsss_system
  import dsss_pkg::*;
#(
  parameter int unsigned DATA_W = 8,    // receiver input width
  parameter int unsigned ACC_W  = 16    // receiver accumulator width
) (
  input  logic              clk,
  input  logic              rst_n,
  // transmitter
  input  code_sel_t         tx_sel,
  input  logic              tx_data_in,
  output logic              tx_data_req,
  output logic              tx_coded,
  output logic              tx_frame,
  // receiver
  input  code_sel_t         rx_sel,
  input  logic              rx_sync,
  input  logic [DATA_W-1:0] rx_sample,
  output logic              rx_data_out,
  output logic              rx_data_valid,
  output logic              rx_sat
);

  dsss_transmitter u_tx (
    .clk, .rst_n, .sel(tx_sel), .data_in(tx_data_in),
    .data_req(tx_data_req), .coded(tx_coded), .frame(tx_frame)
  );

  dsss_receiver #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_rx (
    .clk, .rst_n, .sel(rx_sel), .sync(rx_sync), .sample(rx_sample),
    .data_out(rx_data_out), .valid(rx_data_valid), .sat(rx_sat)
  );

endmodule
