// tb_stc_counter: checks the 0..599 extension count and the base count
// that advances once per 600 clocks, every clock for over three base ticks.
module tb_stc_counter;
  logic clk = 0, rst_n = 0;
  logic [32:0] base;
  logic [9:0]  ext;
  int checks = 0, failures = 0;

  stc_counter dut (.clk, .rst_n, .base, .ext);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      checks++;
      if (ext != 10'((n + 1) % 600) || base != 33'((n + 1) / 600)) begin
        failures++;
        if (failures < 5) $display("cycle %0d: ext=%0d base=%0d", n, ext, base);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
