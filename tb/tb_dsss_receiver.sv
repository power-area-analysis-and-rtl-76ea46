// tb_dsss_receiver: for each of the 16 code selections, builds the received
// samples of random bits from an independent PN model and an ideal bipolar
// channel (chip 0 -> 128 + A, chip 1 -> 127 - A, plus noise of up to +/-N
// codes, offset-binary 8-bit), sends a sync pulse with chip 0 of the first
// bit and checks every recovered bit. Also checks that valid arrives exactly
// 2 cycles after the last chip of each bit, that nothing is reported before
// sync, and, with a second instance of 10-bit accumulator, that clamping
// happens without corrupting decisions for the 32-chip codes.
module tb_dsss_receiver;
  import dsss_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, sync = 1'b0;
  code_sel_t sel;
  logic [7:0] sample = 8'd128;
  logic data_out, valid, sat, data_out_n, valid_n, sat_n;
  int checks = 0, failures = 0;

  dsss_receiver #(.DATA_W(8), .ACC_W(16)) dut (.clk, .rst_n, .sel, .sync, .sample,
    .data_out, .valid, .sat);
  // 13-bit accumulator: 255*32 = 8160 <= 8191 does not clamp at L = 32, but
  // 255*64 does for L >= 64 while the threshold 8160 still fits (L = 64 only)
  dsss_receiver #(.DATA_W(8), .ACC_W(13)) dn (.clk, .rst_n, .sel, .sync, .sample,
    .data_out(data_out_n), .valid(valid_n), .sat(sat_n));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void get_taps(int s, output int t[4], output int n);
    case (s)
      1:  t = '{5,2,0,0};   2:  t = '{5,4,3,2};  3:  t = '{5,4,2,1};
      5:  t = '{6,1,0,0};   6:  t = '{6,5,2,1};  7:  t = '{6,5,3,2};
      9:  t = '{7,1,0,0};   10: t = '{7,3,0,0};  11: t = '{7,3,2,1};
      13: t = '{8,4,3,2};   14: t = '{8,6,5,3};  15: t = '{8,6,5,2};
      default: t = '{0,0,0,0};
    endcase
    n = 5 + (s >> 2);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  bit   sent[$];
  int   last_chip_cycle[$];
  int   cyc = 0;
  int   nsat = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sat_n) nsat <= nsat + 1;
  end

  // result checker
  int   got = 0;
  bit   active = 0;
  int   cur_s = 0;
  always @(posedge clk) if (rst_n && valid) begin
    if (!active) begin
      checks++; failures++;
      $display("FAIL: valid before sync");
    end else begin
      check(got < sent.size(), "more bits than sent");
      if (got < sent.size()) begin
        check(data_out == sent[got], $sformatf("sel=%0d bit %0d got %0b sent %0b", cur_s, got, data_out, sent[got]));
        check(cyc == last_chip_cycle[got] + 2, $sformatf("sel=%0d bit %0d latency %0d", cur_s, got, cyc - last_chip_cycle[got]));
        if ((cur_s >> 2) < 2)
          check(data_out_n == sent[got], $sformatf("narrow sel=%0d bit %0d", cur_s, got));
      end
      got++;
    end
  end

  initial begin
    int t[4]; int n; int L; bit st[1:8]; bit fb; int A, N; int nb;
    for (int s = 0; s < 16; s++) begin
      sel = code_sel_t'(4'(s));
      cur_s = s;
      get_taps(s, t, n);
      L = 32 << (s >> 2);
      nb = (L > 64) ? 4 : 8;
      A = (s % 2) ? 40 : 3;                 // strong and weak signal
      N = (s % 2) ? 60 : 4;                 // noise bound exceeds A
      rst_n = 1'b0; active = 0; sync = 1'b0;
      @(posedge clk); #1 rst_n = 1'b1;
      // idle noise before the transmission starts: must give no output
      for (int i = 0; i < 40; i++) begin
        sample = 8'(128 + $urandom_range(0, 20) - 10);
        @(posedge clk); #1;
      end
      sent.delete(); last_chip_cycle.delete(); got = 0;
      foreach (st[i]) st[i] = 1'b1;
      active = 1;
      for (int b = 0; b < nb; b++) begin
        bit d = 1'($urandom);
        sent.push_back(d);
        for (int c = 0; c < L; c++) begin
          bit pn_ref, chip_v; int v;
          sync = (b == 0 && c == 0);
          pn_ref = (t[0] != 0) ? st[n] : 1'b0;
          chip_v = d ^ pn_ref;
          v = (chip_v ? 127 - A : 128 + A) + $urandom_range(0, 2*N) - N;
          sample = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
          fb = 0;
          foreach (t[k]) if (t[k] != 0) fb ^= st[t[k]];
          for (int i = 8; i >= 2; i--) st[i] = st[i-1];
          st[1] = fb;
          if (c == L-1) last_chip_cycle.push_back(cyc);
          @(posedge clk); #1;
        end
      end
      sync = 1'b0;
      repeat (4) @(posedge clk);
      #1 check(got == nb, $sformatf("sel=%0d received %0d of %0d bits", s, got, nb));
    end
    check(nsat > 0, "accumulator clamping never happened");
    $display("clamp cycles in narrow instance: %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
