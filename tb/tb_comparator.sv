// tb_comparator: random sums and thresholds (including ties) with random
// dump strobes; checks the registered decision (1 when sum < threshold),
// that valid follows dump by one cycle and that data_out holds between dumps.
module tb_comparator;
  logic clk = 1'b0, rst_n = 1'b0, dump = 1'b0;
  logic [15:0] acc = '0, thr = '0;
  logic data_out, valid;
  int checks = 0, failures = 0;

  comparator #(.ACC_W(16)) dut (.clk, .rst_n, .dump, .acc, .thr, .data_out, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_d = 1'b0, exp_v;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      dump = 1'($urandom);
      thr  = 16'($urandom);
      case ($urandom_range(0, 2))
        0: acc = thr;
        1: acc = thr - 16'($urandom_range(1, 50));
        default: acc = 16'($urandom);
      endcase
      exp_v = dump;
      if (dump) exp_d = (acc < thr);
      @(posedge clk); #1;
      checks += 2;
      if (valid !== exp_v)    begin failures++; if (failures < 10) $display("valid wrong at %0d", i); end
      if (data_out !== exp_d) begin failures++; if (failures < 10) $display("data wrong at %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
