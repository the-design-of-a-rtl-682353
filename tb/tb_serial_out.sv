// tb_serial_out: offers a new random byte at every load and checks that
// loads come every 8 clocks and the bits leave MSB first, with sop on the
// first bit of marked bytes.
module tb_serial_out;
  logic clk = 0, rst_n = 0;
  logic load, bit_out, sop_out;
  logic [7:0] byte_in = 0;
  logic sop_in = 0;
  int checks = 0, failures = 0;
  byte unsigned sent[$];
  bit sops[$];
  int last_load = -1, cyc = 0, nbits = 0;

  serial_out dut (.clk, .rst_n, .load, .byte_in, .sop_in, .bit_out, .sop_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // offer a fresh byte every clock; remember it when it is taken
  always @(negedge clk) begin
    byte_in <= 8'($urandom);
    sop_in  <= ($urandom % 4 == 0);
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (load) begin
      if (last_load >= 0) begin
        checks++;
        if (cyc - last_load != 8) failures++;
      end
      last_load = cyc;
      sent.push_back(byte_in);
      sops.push_back(sop_in);
    end
  end

  // check the bit stream: bit k of the stream is bit 7-(k%8) of byte k/8
  always @(negedge clk) if (rst_n && sent.size() > 0 && nbits < 8 * 400) begin
    int b;
    b = nbits / 8;
    if (b < sent.size()) begin
      checks++;
      if (bit_out != sent[b][7 - nbits % 8] || sop_out != (sops[b] && nbits % 8 == 0)) begin
        failures++;
        if (failures < 5) $display("bit %0d: %0d", nbits, bit_out);
      end
      nbits++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (8 * 400 + 20) @(posedge clk);
    checks++;
    if (nbits != 8 * 400) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
