// tb_clock_divider: for each code length (s3s2 = 0..3) checks that `first`
// and `last` pulse exactly once per 32/64/128/256 chips, that the chip index
// counts 0..L-1, and that restart forces chip 0 in the same cycle.
module tb_clock_divider;
  import dsss_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  len_sel_t len_sel;
  logic first, last;
  logic [7:0] chip;
  int checks = 0, failures = 0;

  clock_divider dut (.clk, .rst_n, .restart, .len_sel, .first, .last, .chip);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    for (int l = 0; l < 4; l++) begin
      int L, nfirst, nlast;
      L = 32 << l;
      nfirst = 0; nlast = 0;
      len_sel = len_sel_t'(l);
      rst_n = 1'b0;
      @(posedge clk); #1 rst_n = 1'b1;
      for (int c = 0; c < 3*L; c++) begin
        check(chip == 8'(c % L), $sformatf("L=%0d c=%0d chip=%0d", L, c, chip));
        check(first == ((c % L) == 0), $sformatf("L=%0d c=%0d first", L, c));
        check(last == ((c % L) == L-1), $sformatf("L=%0d c=%0d last", L, c));
        nfirst += first; nlast += last;
        @(posedge clk); #1;
      end
      check(nfirst == 3 && nlast == 3, $sformatf("L=%0d pulse counts %0d %0d", L, nfirst, nlast));
    end
    // restart in mid-bit
    len_sel = 2'd0;
    repeat (5) @(posedge clk);
    #1 restart = 1'b1;
    #1 check(chip == 0 && first, "restart gives chip 0");
    @(posedge clk); #1 restart = 1'b0;
    #1 check(chip == 1 && !first, "chip 1 after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
