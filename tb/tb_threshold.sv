// tb_threshold: checks the decision threshold L*(2^DATA_W-1)/2 for the four
// code lengths at three width settings, including one where it is clamped
// to the accumulator range.
module tb_threshold;
  import dsss_pkg::*;

  len_sel_t len_sel;
  logic [15:0] thr16;
  logic [11:0] thr12;
  logic [15:0] thr4;
  int checks = 0, failures = 0;

  threshold #(.DATA_W(8), .ACC_W(16)) d16 (.len_sel, .thr(thr16));
  threshold #(.DATA_W(8), .ACC_W(12)) d12 (.len_sel, .thr(thr12));
  threshold #(.DATA_W(4), .ACC_W(16)) d4  (.len_sel, .thr(thr4));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 4; l++) begin
      int L, e16, e12, e4;
      L   = 32 << l;
      e16 = L * 255 / 2;
      e12 = (e16 > 4095) ? 4095 : e16;
      e4  = L * 15 / 2;
      len_sel = len_sel_t'(l);
      #10;
      checks += 3;
      if (int'(thr16) != e16) begin failures++; $display("L=%0d thr16=%0d exp %0d", L, thr16, e16); end
      if (int'(thr12) != e12) begin failures++; $display("L=%0d thr12=%0d exp %0d", L, thr12, e12); end
      if (int'(thr4)  != e4)  begin failures++; $display("L=%0d thr4=%0d exp %0d", L, thr4, e4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
