// tb_sync_fifo: random pushes and pops against a queue model, checking
// head data, empty, full and count every clock.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0;
  byte unsigned model[$];

  sync_fifo #(.W(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (count != 4'(model.size()) || empty != (model.size() == 0) || full != (model.size() == DEPTH)
          || (model.size() > 0 && dout != model[0])) begin
        failures++;
        if (failures < 5) $display("n=%0d count=%0d model=%0d", n, count, model.size());
      end
      // bias towards filling in the first half, draining in the second
      push = ($urandom % 100) < ((n / 500) % 2 ? 30 : 70);
      pop  = ($urandom % 100) < ((n / 500) % 2 ? 70 : 30);
      din  = 8'($urandom);
      @(posedge clk);
      begin
        bit was_full, was_empty;
        was_full  = (model.size() == DEPTH);
        was_empty = (model.size() == 0);
        if (pop && !was_empty) void'(model.pop_front());
        if (push && !was_full) model.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
