// tb_spreader: checks that the coded chip is the XOR of data and PN chip,
// one clock later, for random inputs.
module tb_spreader;
  logic clk = 1'b0, rst_n = 1'b0, data_bit = 1'b0, pn = 1'b0;
  logic coded;
  int checks = 0, failures = 0;

  spreader dut (.clk, .rst_n, .data_bit, .pn, .coded);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      data_bit = 1'($urandom); pn = 1'($urandom);
      exp = (data_bit != pn);
      @(posedge clk); #1;
      checks++;
      if (coded !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL at %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
