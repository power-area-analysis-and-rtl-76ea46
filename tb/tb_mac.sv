// tb_mac: random samples and PN chips with a bit boundary every 32 chips.
// A reference sum, computed as sum of (pn ? (2^DATA_W-1-x) : x) and clamped
// to 2^ACC_W-1, is compared with acc every cycle, and `sat` with the
// reference clamp. Runs a wide instance (no clamping) and a narrow one
// (ACC_W = 10, which clamps).
module tb_mac;
  logic clk = 1'b0, rst_n = 1'b0, first = 1'b0, pn = 1'b0;
  logic [7:0] x = '0;
  logic [15:0] acc16;
  logic [9:0]  acc10;
  logic sat16, sat10;
  int checks = 0, failures = 0, nsat = 0;

  mac #(.DATA_W(8), .ACC_W(16)) dw (.clk, .rst_n, .first, .pn, .x, .acc(acc16), .sat(sat16));
  mac #(.DATA_W(8), .ACC_W(10)) dn (.clk, .rst_n, .first, .pn, .x, .acc(acc10), .sat(sat10));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r16 = 0, r10 = 0, t, n16, n10;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      first = (i % 32 == 0);
      pn    = 1'($urandom);
      // mostly strong samples so that the narrow sum overflows
      x     = ($urandom_range(0, 1) != 0) ? 8'($urandom_range(200, 255)) : 8'($urandom);
      t     = pn ? 255 - int'(x) : int'(x);
      n16   = (first ? 0 : r16) + t;
      n10   = (first ? 0 : r10) + t;
      #1;
      checks += 2;
      if (sat16 !== (n16 > 65535)) begin failures++; $display("sat16 wrong at %0d", i); end
      if (sat10 !== (n10 > 1023))  begin failures++; if (failures < 10) $display("sat10 wrong at %0d", i); end
      nsat += (n10 > 1023);
      r16 = (n16 > 65535) ? 65535 : n16;
      r10 = (n10 > 1023) ? 1023 : n10;
      @(posedge clk); #1;
      checks += 2;
      if (int'(acc16) != r16) begin failures++; if (failures < 10) $display("acc16=%0d exp %0d at %0d", acc16, r16, i); end
      if (int'(acc10) != r10) begin failures++; if (failures < 10) $display("acc10=%0d exp %0d at %0d", acc10, r10, i); end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("clamping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
