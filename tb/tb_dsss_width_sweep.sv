// tb_dsss_width_sweep: the receiver register-width study. The test word
// 10101010 is spread by one transmitter with a code of each length (32, 64,
// 128, 256 chips) and received, through a noisy link model, by 24 receivers
// at once: 4-bit input with accumulators of 6..16 bits, 8-bit input with
// 9..16 bits and 12-bit input with 12..16 bits, the combinations of the
// width study.
//
// For every receiver and every bit the testbench works out, from the link
// model alone, the despread sum of the bit (each sample mirrored about
// mid-scale where the spreading chip was 1) and from it whether the
// accumulator must clamp. Checks: `sat` is seen in a bit exactly when that
// sum exceeds 2^ACC_W - 1; whenever the decision threshold
// L*(2^DATA_W - 1)/2 fits in the register, every bit is recovered. A table
// of clamped bits and bit errors per combination is printed.
module tb_dsss_width_sweep;
  import dsss_pkg::*;

  localparam int NB = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  code_sel_t sel = '0;
  logic tx_data_in, tx_data_req, tx_coded, tx_frame;
  int checks = 0, failures = 0;

  dsss_transmitter u_tx (.clk, .rst_n, .sel, .data_in(tx_data_in), .data_req(tx_data_req),
                         .coded(tx_coded), .frame(tx_frame));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data: the test word, MSB first
  int bit_idx = 0;
  always_comb tx_data_in = (bit_idx < NB) ? 1'((8'hAA >> (NB - 1 - bit_idx)) & 1) : 1'b0;
  always @(posedge clk) if (rst_n && tx_data_req) bit_idx <= bit_idx + 1;

  // link: one cycle register on the chip, noise as a fraction in [-0.6, 0.6]
  // of the chip amplitude, common to all receivers
  logic chip_q = 1'b0, sync_q = 1'b0, bit_q = 1'b0;
  real  nz = 0.0;
  int   chip_in_bit = 0;
  logic active = 1'b0;
  always @(posedge clk) begin
    chip_q <= tx_coded;
    sync_q <= tx_frame && rst_n;
    nz     <= ($urandom_range(0, 1200) - 600) / 1000.0;
  end

  // data bit of the chip now at the receivers (coded lags the latch by one
  // cycle, the link by one more)
  bit sent_bits[NB];
  initial for (int b = 0; b < NB; b++) sent_bits[b] = 1'((8'hAA >> (NB - 1 - b)) & 1);

  int rx_chip = 0;   // chip index since sync, at the receivers
  always @(posedge clk) begin
    if (!rst_n)       begin active <= 1'b0; rx_chip <= 0; end
    else if (sync_q)  begin active <= 1'b1; rx_chip <= 1; end
    else if (active)  rx_chip <= rx_chip + 1;
  end

  int L;
  int results_clamp[3][17];
  int results_err[3][17];

  for (genvar w = 0; w < 3; w++) begin : g_w
    localparam int W    = 4 + 4*w;
    localparam int RMIN = (w == 0) ? 6 : (w == 1) ? 9 : 12;
    for (genvar r = RMIN; r <= 16; r++) begin : g_r
      logic [W-1:0] smp;
      logic d_out, d_val, d_sat;
      longint total;
      bit     sat_seen;
      int     got;

      // offset-binary sample: chip 0 -> mid + amp, chip 1 -> mid - amp
      always_comb begin
        real mid, amp, v;
        mid = ((1 << W) - 1) / 2.0;
        amp = (1 << W) / 4.0;
        v   = chip_q ? mid - amp * (1.0 + nz) : mid + amp * (1.0 + nz);
        smp = W'($rtoi(v + 0.5));
      end

      dsss_receiver #(.DATA_W(W), .ACC_W(r)) u_rx (
        .clk, .rst_n, .sel, .sync(sync_q), .sample(smp),
        .data_out(d_out), .valid(d_val), .sat(d_sat));

      always @(posedge clk) begin
        int bi, ci;
        longint term, thr, maxv;
        if (!rst_n) begin
          total = 0; sat_seen = 0; got = 0;
        end else begin
          if (sync_q || active) begin
            ci = sync_q ? 0 : rx_chip % L;
            bi = sync_q ? 0 : rx_chip / L;
            if (ci == 0) begin total = 0; sat_seen = 0; end
            // despread term from the link model
            term = ((chip_q ^ sent_bits[bi % NB]) != 0) ? ((1 << W) - 1) - smp : smp;
            total += term;
            if (d_sat) sat_seen = 1;
            if (ci == L - 1) begin
              maxv = (longint'(1) << r) - 1;
              checks++;
              if (sat_seen != (total > maxv)) begin
                failures++;
                $display("W=%0d ACC_W=%0d L=%0d bit %0d: sat=%0b sum=%0d", W, r, L, bi, sat_seen, total);
              end
              if (total > maxv) results_clamp[w][r]++;
            end
          end
          if (d_val) begin
            thr  = longint'((1 << W) - 1) * L / 2;
            maxv = (longint'(1) << r) - 1;
            if (d_out != sent_bits[got]) results_err[w][r]++;
            if (thr <= maxv) begin
              checks++;
              if (d_out != sent_bits[got]) begin
                failures++;
                $display("W=%0d ACC_W=%0d L=%0d bit %0d wrong", W, r, L, got);
              end
            end
            got++;
          end
        end
      end
    end
  end

  initial begin
    int sels[4] = '{4'b0001, 4'b0101, 4'b1001, 4'b1101};
    foreach (sels[i]) begin
      sel = code_sel_t'(4'(sels[i]));
      L = 32 << i;
      foreach (results_clamp[a, b]) begin results_clamp[a][b] = 0; results_err[a][b] = 0; end
      rst_n = 1'b0;
      bit_idx = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1'b1;
      repeat (NB * L + 6) @(posedge clk);
      #1;
      $display("code length %0d: clamped bits / bit errors out of %0d", L, NB);
      for (int w = 0; w < 3; w++) begin
        string line;
        line = $sformatf("  DATA_W=%2d:", 4 + 4*w);
        for (int r = (w == 0) ? 6 : (w == 1) ? 9 : 12; r <= 16; r++)
          line = {line, $sformatf(" %0d:%0d/%0d", r, results_clamp[w][r], results_err[w][r])};
        $display("%s", line);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
