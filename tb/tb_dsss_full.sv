// tb_dsss_full: the design at its default size (8-bit receiver input,
// 16-bit accumulator) running the two kinds of traffic its evaluation uses.
//  1. The test word 10101010 coded and received with each of the twelve PN
//     codes (all four code lengths).
//  2. A sensor record: 1000 readings of an 8-bit A/D converter, sent MSB
//     first as a serial bit stream with the 32-chip code [5,2] and rebuilt
//     from the recovered bits. The record is synthetic: it follows the shape
//     of a pH electrode trace stepping from pH 7.8 to 2.3 to 11.6 (levels
//     near 0.60 V, 0.90 V and 0.49 V on a 0..1.2 V converter range) with a
//     little random wander.
// The analog link between transmitter and receiver is modelled here: chip 0
// maps to 128 + A, chip 1 to 127 - A, uniform noise of +/-N codes is added,
// and samples and the frame marker arrive 3 cycles late. Every bit and every
// rebuilt reading is checked.
module tb_dsss_full;
  import dsss_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  code_sel_t sel = '0;
  logic tx_data_in = 1'b0;
  logic tx_data_req, tx_coded, tx_frame, rx_sync;
  logic [7:0] rx_sample;
  logic rx_data_out, rx_data_valid, rx_sat;
  int checks = 0, failures = 0;

  dsss_system dut (
    .clk, .rst_n, .tx_sel(sel), .tx_data_in, .tx_data_req, .tx_coded, .tx_frame,
    .rx_sel(sel), .rx_sync, .rx_sample, .rx_data_out, .rx_data_valid, .rx_sat);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // analog link model
  int A = 30, N = 40;
  logic [2:0] chip_dly = '0, frame_dly = '0;
  always_ff @(posedge clk) begin
    chip_dly  <= {chip_dly[1:0], tx_coded};
    frame_dly <= {frame_dly[1:0], tx_frame};
  end
  always_comb rx_sync = frame_dly[2];
  always @(posedge clk) begin
    int v;
    v = (chip_dly[1] ? 127 - A : 128 + A) + $urandom_range(0, 2*N) - N;
    rx_sample <= 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
  end

  // data source: a queue of bits; the transmitter takes the head in each
  // tx_data_req cycle
  bit txq[$];
  bit rxq[$];
  always_comb tx_data_in = (txq.size() > 0) ? txq[0] : 1'b0;
  always @(posedge clk) begin
    if (rst_n && tx_data_req && txq.size() > 0) void'(txq.pop_front());
    if (rst_n && rx_data_valid) rxq.push_back(rx_data_out);
  end

  task automatic run(int nbits);
    int L;
    L = 32 << sel.len;
    rst_n = 1'b0;
    rxq.delete();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (nbits * L + 8) @(posedge clk);
    #1;
  endtask

  byte unsigned rec[1000];

  initial begin
    int codes[12] = '{1, 2, 3, 5, 6, 7, 9, 10, 11, 13, 14, 15};
    // 1. test word on every code
    foreach (codes[i]) begin
      sel = code_sel_t'(4'(codes[i]));
      txq.delete();
      for (int b = 7; b >= 0; b--) txq.push_back(1'((8'hAA >> b) & 1));
      run(8);
      check(rxq.size() >= 8, $sformatf("code %0d: %0d bits", codes[i], rxq.size()));
      if (rxq.size() >= 8)
        for (int b = 0; b < 8; b++)
          check(rxq[b] == 1'((8'hAA >> (7 - b)) & 1), $sformatf("code %0d bit %0d", codes[i], b));
    end
    // 2. sensor record on the 32-chip code [5,2]
    for (int k = 0; k < 1000; k++) begin
      real volts;
      volts = (k < 138) ? 0.60 : (k < 483) ? 0.90 : 0.49;
      if (k >= 138 && k < 150) volts = 0.60 + 0.025 * (k - 137);
      if (k >= 483 && k < 500) volts = 0.90 - 0.024 * (k - 482);
      volts += 0.004 * ($urandom_range(0, 4) - 2.0);
      rec[k] = byte'(int'(volts / 1.2 * 255.0));
    end
    sel = code_sel_t'(4'b0001);
    txq.delete();
    foreach (rec[k]) for (int b = 7; b >= 0; b--) txq.push_back(rec[k][b]);
    run(8000);
    check(rxq.size() >= 8000, $sformatf("record: %0d bits", rxq.size()));
    if (rxq.size() >= 8000) begin
      int bad = 0;
      foreach (rec[k]) begin
        byte unsigned r;
        for (int b = 0; b < 8; b++) r[7-b] = rxq[8*k + b];
        checks++;
        if (r != rec[k]) begin failures++; bad++; end
      end
      $display("sensor record: %0d of 1000 readings rebuilt wrong", bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
