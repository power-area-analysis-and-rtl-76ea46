// tb_dsss_system: end-to-end test of the transmitter and receiver joined by
// a model of the analog link (not part of the RTL): the coded chip is mapped
// to an offset-binary 8-bit sample (chip 0 -> 128 + A, chip 1 -> 127 - A),
// bounded random noise is added, and the sample and the frame marker reach
// the receiver after a link delay of DLY cycles. Random bits are sent with
// every one of the 16 code selections in turn; each change of selection is a
// mode switch done under reset. Every recovered bit is compared with the bit
// the transmitter took, and the bit period (one bit per 32 << s3s2 chips) is
// checked. A second system with a 15-bit accumulator receives the same
// link; with 256-chip codes its sum exceeds 2^15 - 1 and clamps, which must
// not change the decisions. Mechanisms counted (each must occur): every code
// length, every tap set, no coding, a reserved selection, a mode switch and
// accumulator clamping.
module tb_dsss_system;
  import dsss_pkg::*;

  localparam int DLY = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  code_sel_t sel = '0;
  logic tx_data_in;
  logic tx_data_req, tx_coded, tx_frame;
  logic tx_data_req2, tx_coded2, tx_frame2;
  logic rx_sync;
  logic [7:0] rx_sample;
  logic rx_data_out, rx_data_valid, rx_sat;
  logic rx_data_out2, rx_data_valid2, rx_sat2;
  int checks = 0, failures = 0;

  dsss_system dut (
    .clk, .rst_n, .tx_sel(sel), .tx_data_in, .tx_data_req, .tx_coded, .tx_frame,
    .rx_sel(sel), .rx_sync, .rx_sample, .rx_data_out, .rx_data_valid, .rx_sat);

  dsss_system #(.DATA_W(8), .ACC_W(15)) narrow (
    .clk, .rst_n, .tx_sel(sel), .tx_data_in, .tx_data_req(tx_data_req2),
    .tx_coded(tx_coded2), .tx_frame(tx_frame2),
    .rx_sel(sel), .rx_sync, .rx_sample, .rx_data_out(rx_data_out2),
    .rx_data_valid(rx_data_valid2), .rx_sat(rx_sat2));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // analog link model: delay line of coded chips and frame markers
  int A = 30, N = 40;
  logic [DLY-1:0] chip_dly = '0, frame_dly = '0;
  always_ff @(posedge clk) begin
    chip_dly  <= {chip_dly[DLY-2:0], tx_coded};
    frame_dly <= {frame_dly[DLY-2:0], tx_frame};
  end
  always_comb rx_sync = frame_dly[DLY-1];
  always @(posedge clk) begin
    int v;
    v = (chip_dly[DLY-2] ? 127 - A : 128 + A) + $urandom_range(0, 2*N) - N;
    rx_sample <= 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
  end

  // bookkeeping
  bit sent[$];
  int got = 0, got2 = 0, nsat = 0, cyc = 0, last_valid = -1;
  int period = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tx_data_req) sent.push_back(tx_data_in);
    if (rst_n && rx_sat2) nsat <= nsat + 1;
    if (rst_n && rx_data_valid) begin
      check(got < sent.size() && rx_data_out == sent[got],
            $sformatf("sel=%0b bit %0d wrong", sel, got));
      if (last_valid >= 0)
        check(cyc - last_valid == period, $sformatf("bit period %0d", cyc - last_valid));
      last_valid = cyc;
      got++;
    end
    if (rst_n && rx_data_valid2) begin
      check(got2 < sent.size() && rx_data_out2 == sent[got2],
            $sformatf("narrow sel=%0b bit %0d wrong", sel, got2));
      got2++;
    end
  end
  // fresh random data every cycle; the transmitter keeps the value present
  // in its tx_data_req cycle, which the bookkeeping above records
  always @(negedge clk) tx_data_in <= 1'($urandom);

  int n_len[4], n_tap = 0, n_nocode = 0, n_reserved = 0, n_switch = 0;

  initial begin
    for (int s = 0; s < 16; s++) begin
      int nb;
      sel = code_sel_t'(4'(s));
      period = 32 << (s >> 2);
      nb = (s >> 2) >= 2 ? 6 : 10;
      rst_n = 1'b0;
      repeat (2) @(posedge clk);
      #1;
      sent.delete(); got = 0; got2 = 0; last_valid = -1;
      rst_n = 1'b1;
      if (s > 0) n_switch++;
      // run nb bit periods plus the link and receiver latency
      repeat (nb * period + DLY + 4) @(posedge clk);
      #1;
      // the transmitter has started one more bit than the receiver finished
      check(got == nb && got2 == nb, $sformatf("sel=%0b received %0d/%0d of %0d", sel, got, got2, nb));
      if (got == nb) begin
        n_len[s >> 2]++;
        if (s % 4 == 0) begin
          if (s == 0) n_nocode++; else n_reserved++;
        end else n_tap++;
      end
    end
    foreach (n_len[l]) check(n_len[l] > 0, $sformatf("code length %0d never run", 32 << l));
    check(n_tap == 12, $sformatf("only %0d tap sets run", n_tap));
    check(n_nocode > 0, "no-coding mode never run");
    check(n_reserved > 0, "reserved selection never run");
    check(n_switch > 0, "no mode switch");
    check(nsat > 0, "accumulator clamping never happened");
    $display("lengths %0d/%0d/%0d/%0d, tap sets %0d, no-coding %0d, reserved %0d, switches %0d, clamp cycles %0d",
             n_len[0], n_len[1], n_len[2], n_len[3], n_tap, n_nocode, n_reserved, n_switch, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
