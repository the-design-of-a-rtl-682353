// tb_crc32: checks the CRC-32 against the known check value of the
// MPEG-2 CRC for "123456789" (0x0376E6E7), against a bitwise reference on
// random messages, and that a message followed by its CRC leaves zero.
module tb_crc32;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic init = 0, en = 0;
  logic [7:0]  din = 0;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32 dut (.clk, .rst_n, .init, .en, .din, .crc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bq_t q);
    @(negedge clk) init = 1;
    @(negedge clk) init = 0;
    foreach (q[i]) begin
      en = 1; din = q[i];
      @(negedge clk);
    end
    en = 0;
  endtask

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("%s: crc=%08h expected %08h", what, crc, exp);
    end
  endtask

  initial begin
    bq_t q;
    repeat (2) @(posedge clk);
    rst_n = 1;
    q = {"1", "2", "3", "4", "5", "6", "7", "8", "9"};
    run(q);
    check(32'h0376E6E7, "check value");
    for (int t = 0; t < 50; t++) begin
      bit [31:0] r;
      q = {};
      repeat (1 + $urandom % 60) q.push_back(8'($urandom));
      run(q);
      r = crc32_ref(q, 0, q.size());
      check(r, "random");
      for (int i = 3; i >= 0; i--) q.push_back(r[i*8 +: 8]);
      run(q);
      check(32'h0, "residue");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
