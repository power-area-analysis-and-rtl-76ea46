// tb_dsss_transmitter: for each of the 16 code selections, sends random bits
// and checks every coded chip against an independent model: chip t of the
// stream is (bit t/L) XOR (PN chip t) of a stage-by-stage LFSR built from
// the selection table, one cycle late. Also checks that data_req pulses once
// per L = 32 << s3s2 chips (the bit rate) and that frame marks the first
// coded chip.
module tb_dsss_transmitter;
  import dsss_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, data_in = 1'b0;
  code_sel_t sel;
  logic data_req, coded, frame;
  int checks = 0, failures = 0;

  dsss_transmitter dut (.clk, .rst_n, .sel, .data_in, .data_req, .coded, .frame);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    int t[4]; int n; int L; bit st[1:8]; bit fb; bit cur_bit; bit exp_chip; int nreq;
    for (int s = 0; s < 16; s++) begin
      sel = code_sel_t'(4'(s));
      get_taps(s, t, n);
      L = 32 << (s >> 2);
      foreach (st[i]) st[i] = 1'b1;
      rst_n = 1'b0;
      @(posedge clk); #1 rst_n = 1'b1;
      nreq = 0;
      for (int c = 0; c < 6*L; c++) begin
        bit pn_ref;
        check(data_req == (c % L == 0), $sformatf("sel=%0d c=%0d data_req", s, c));
        if (c % L == 0) begin
          data_in = 1'($urandom);
          cur_bit = data_in;
        end else data_in = 1'($urandom);   // ignored between bit boundaries
        nreq += data_req;
        pn_ref = (t[0] != 0) ? st[n] : 1'b0;
        exp_chip = cur_bit ^ pn_ref;
        fb = 0;
        foreach (t[k]) if (t[k] != 0) fb ^= st[t[k]];
        for (int i = 8; i >= 2; i--) st[i] = st[i-1];
        st[1] = fb;
        @(posedge clk); #1;
        check(coded == exp_chip, $sformatf("sel=%0d chip %0d coded=%0b exp %0b", s, c, coded, exp_chip));
        check(frame == (c == 0), $sformatf("sel=%0d chip %0d frame", s, c));
      end
      check(nreq == 6, $sformatf("sel=%0d %0d bit requests", s, nreq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
