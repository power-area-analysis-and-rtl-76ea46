// tb_dsss_two_users: code-division multiple access with two capsules. Two
// transmitters with different codes of the same length start together;
// the link model adds their bipolar signals (equal amplitude A, plus noise)
// into one offset-binary 8-bit sample stream, and two receivers, each set
// to one user's code, recover their own user's bits. Run for the pairs
// (s1s0 = 01, 10) and (01, 11) at every code length. The other user's
// signal only enters through the cross-correlation of the two codes, which
// must stay below the wanted correlation: every bit of both users is checked.
module tb_dsss_two_users;
  import dsss_pkg::*;

  localparam int NB = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  code_sel_t sel_a = '0, sel_b = '0;
  logic din_a, din_b, req_a, req_b, coded_a, coded_b, frame_a, frame_b;
  logic [7:0] sample;
  logic sync_q = 1'b0;
  logic out_a, val_a, sat_a, out_b, val_b, sat_b;
  int checks = 0, failures = 0;

  dsss_transmitter tx_a (.clk, .rst_n, .sel(sel_a), .data_in(din_a), .data_req(req_a), .coded(coded_a), .frame(frame_a));
  dsss_transmitter tx_b (.clk, .rst_n, .sel(sel_b), .data_in(din_b), .data_req(req_b), .coded(coded_b), .frame(frame_b));
  dsss_receiver rx_a (.clk, .rst_n, .sel(sel_a), .sync(sync_q), .sample, .data_out(out_a), .valid(val_a), .sat(sat_a));
  dsss_receiver rx_b (.clk, .rst_n, .sel(sel_b), .sync(sync_q), .sample, .data_out(out_b), .valid(val_b), .sat(sat_b));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // link: sum of both users, one cycle late
  int A = 30, N = 10;
  always @(posedge clk) begin
    int v;
    v = 128 + (coded_a ? -A : A) + (coded_b ? -A : A) + $urandom_range(0, 2*N) - N;
    sample <= 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
    sync_q <= frame_a && rst_n;
  end

  always @(negedge clk) begin
    din_a <= 1'($urandom);
    din_b <= 1'($urandom);
  end

  bit sent_a[$], sent_b[$];
  int got_a = 0, got_b = 0, err_a = 0, err_b = 0;
  always @(posedge clk) if (rst_n) begin
    if (req_a) sent_a.push_back(din_a);
    if (req_b) sent_b.push_back(din_b);
    if (val_a) begin
      checks++;
      if (got_a >= sent_a.size() || out_a != sent_a[got_a]) begin failures++; err_a++; end
      got_a++;
    end
    if (val_b) begin
      checks++;
      if (got_b >= sent_b.size() || out_b != sent_b[got_b]) begin failures++; err_b++; end
      got_b++;
    end
  end

  initial begin
    for (int len = 0; len < 4; len++) begin
      for (int p = 0; p < 2; p++) begin
        int L;
        L = 32 << len;
        sel_a = code_sel_t'({len_sel_t'(len), 2'b01});
        sel_b = code_sel_t'({len_sel_t'(len), (p == 0) ? 2'b10 : 2'b11});
        rst_n = 1'b0;
        repeat (2) @(posedge clk);
        #1;
        sent_a.delete(); sent_b.delete();
        got_a = 0; got_b = 0; err_a = 0; err_b = 0;
        rst_n = 1'b1;
        repeat (NB * L + 4) @(posedge clk);
        #1;
        checks++;
        if (got_a != NB || got_b != NB) begin
          failures++;
          $display("codes %04b/%04b: received %0d/%0d bits", sel_a, sel_b, got_a, got_b);
        end
        $display("codes %04b and %04b: %0d and %0d bit errors in %0d bits", sel_a, sel_b, err_a, err_b, NB);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
