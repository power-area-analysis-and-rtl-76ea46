// tb_pn_code_gen: checks the programmable PN generator against an
// independent stage-by-stage LFSR model built from the tap lists of the
// code selection table, for all 16 selections. For the 12 coded selections
// it also checks that the chip stream has the maximal period 2^n - 1 and
// 2^(n-1) ones per period; for "no coding" and the reserved ones, that the
// chip is always 0. It also checks restart (sequence starts again from the
// seed in the restart cycle).
module tb_pn_code_gen;
  import dsss_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  code_sel_t sel;
  logic pn;
  int checks = 0, failures = 0;

  pn_code_gen dut (.clk, .rst_n, .restart, .sel, .pn);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tap lists, indexed by s3s2s1s0; 0 ends a list
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

  bit st[1:8];
  bit seq[$];

  task automatic model_step(int t[4], output bit fb);
    fb = 0;
    foreach (t[k]) if (t[k] != 0) fb ^= st[t[k]];
    for (int i = 8; i >= 2; i--) st[i] = st[i-1];
    st[1] = fb;
  endtask

  initial begin
    int t[4]; int n; int per; int ones; bit fb; bit coded;
    for (int s = 0; s < 16; s++) begin
      sel = code_sel_t'(4'(s));
      rst_n = 1'b0;
      @(posedge clk); #1;
      rst_n = 1'b1;
      get_taps(s, t, n);
      coded = (t[0] != 0);
      foreach (st[i]) st[i] = 1'b1;     // seed 8'hFF
      seq.delete();
      per = (1 << n) - 1;
      for (int c = 0; c < 2*per + 10; c++) begin
        bit exp;
        exp = coded ? st[n] : 1'b0;
        checks++;
        if (pn !== exp) begin
          failures++;
          if (failures < 10) $display("sel=%0d chip %0d: pn=%0b expected %0b", s, c, pn, exp);
        end
        seq.push_back(pn);
        model_step(t, fb);
        @(posedge clk); #1;
      end
      if (coded) begin
        // period exactly 2^n-1: repeats after per and not after any divisor
        checks++;
        for (int i = 0; i < per; i++) if (seq[i] != seq[i+per]) begin failures++; break; end
        for (int d = 1; d < per; d++) if (per % d == 0) begin
          bit same;
          same = 1;
          for (int i = 0; i < per; i++) if (seq[i] != seq[i+d]) same = 0;
          checks++;
          if (same) begin failures++; $display("sel=%0d period %0d too short", s, d); end
        end
        ones = 0;
        for (int i = 0; i < per; i++) ones += seq[i];
        checks++;
        if (ones != (1 << (n-1))) begin failures++; $display("sel=%0d ones=%0d", s, ones); end
      end
    end
    // restart in mid-sequence
    sel = code_sel_t'(4'b0001);
    repeat (7) @(posedge clk);
    #1 restart = 1'b1;
    get_taps(1, t, n);
    foreach (st[i]) st[i] = 1'b1;
    for (int c = 0; c < 40; c++) begin
      checks++;
      if (pn !== st[5]) begin failures++; $display("restart chip %0d wrong", c); end
      model_step(t, fb);
      @(posedge clk); #1 restart = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
