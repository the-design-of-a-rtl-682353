// tb_continuity_counter: random increments of random sources against a
// model of twelve 4-bit counters, including the wrap from 15 to 0.
module tb_continuity_counter;
  logic clk = 0, rst_n = 0;
  logic [4:0] sel = 0;
  logic inc = 0;
  logic [3:0] cc;
  int checks = 0, failures = 0;
  int model[12];

  continuity_counter #(.N(12)) dut (.clk, .rst_n, .sel, .inc, .cc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      sel = 5'($urandom % 12);
      inc = $urandom % 2;
      #1;
      checks++;
      if (cc != 4'(model[sel])) begin
        failures++;
        if (failures < 5) $display("sel %0d cc %0d exp %0d", sel, cc, model[sel]);
      end
      @(posedge clk);
      if (inc) model[sel] = (model[sel] + 1) % 16;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
