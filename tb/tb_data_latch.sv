// tb_data_latch: drives random data and load strobes and checks that
// data_bit shows data_in in a load cycle and the last loaded bit otherwise.
module tb_data_latch;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, data_in = 1'b0;
  logic data_bit;
  int checks = 0, failures = 0;

  data_latch dut (.clk, .rst_n, .load, .data_in, .data_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit held = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      load    = ($urandom_range(0, 3) == 0);
      data_in = 1'($urandom);
      #1;
      checks++;
      if (data_bit !== (load ? data_in : held)) begin
        failures++;
        if (failures < 10) $display("FAIL at %0d: data_bit=%0b", i, data_bit);
      end
      if (load) held = data_in;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
