// dsss_receiver: direct-sequence spread-spectrum correlator receiver.
//
// The receiver runs the same programmable PN code generator and the same
// clock divider as the transmitter. Every chip period the MAC adds the
// received sample, sign-changed when the local PN chip is 1, into the
// accumulator; at the end of each bit the comparator checks the sum against
// the length-dependent threshold and outputs the recovered bit. This is the
// structure of the design (MAC, PN generator, threshold, comparator). The
// document assumes perfect synchronization and describes no acquisition, so
// the receiver is told where the first chip is by the `sync` strobe; that
// strobe and the `valid`/`sat` outputs are this design's own choices.
//
// Timing: one offset-binary sample per clock. A sync pulse marks chip 0 of
// the first bit (it restarts the divider and the PN sequence in that very
// cycle). data_out/valid come two cycles after the last chip of a bit. No
// bit is reported before the first sync. sel must only change with reset or
// together with sync.
module dsss_receiver
  import dsss_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,     // synchronous, active low
  input  code_sel_t         sel,       // s3s2s1s0
  input  logic              sync,      // chip 0 of the first bit
  input  logic [DATA_W-1:0] sample,    // digitized received chip
  output logic              data_out,  // recovered bit
  output logic              valid,     // data_out updated this cycle
  output logic              sat        // accumulator clamped this cycle
);

  logic first, last, pn, dump_q, locked_q, cmp_valid;
  logic [7:0] chip;
  logic [ACC_W-1:0] acc, thr;

  clock_divider u_div (
    .clk, .rst_n, .restart(sync), .len_sel(sel.len),
    .first, .last, .chip
  );

  pn_code_gen u_pn (
    .clk, .rst_n, .restart(sync), .sel, .pn
  );

  mac #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n, .first, .pn, .x(sample), .acc, .sat
  );

  threshold #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_thr (
    .len_sel(sel.len), .thr
  );

  comparator #(.ACC_W(ACC_W)) u_cmp (
    .clk, .rst_n, .dump(dump_q), .acc, .thr, .data_out, .valid(cmp_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dump_q   <= 1'b0;
      locked_q <= 1'b0;
    end else begin
      dump_q   <= last && (locked_q || sync);
      if (sync) locked_q <= 1'b1;
    end
  end

  assign valid = cmp_valid;

  logic unused;
  assign unused = ^chip;

endmodule
