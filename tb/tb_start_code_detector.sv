// tb_start_code_detector: feeds a random byte stream with sequence, GOP,
// picture and sequence-end codes at random places (and gaps between input
// bytes) and checks that every byte comes out, in order, three input bytes
// later, tagged exactly when it begins a sequence, GOP or picture code.
module tb_start_code_detector;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [7:0] in_data = 0;
  logic out_valid, out_au_start;
  logic [7:0] out_data;
  int checks = 0, failures = 0, tags = 0;
  byte unsigned s[$];
  int oidx = 0;

  start_code_detector dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .out_au_start);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit exp_tag(int i);
    if (i + 3 >= s.size()) return 0;
    return s[i] == 0 && s[i+1] == 0 && s[i+2] == 1 &&
           (s[i+3] == 8'hB3 || s[i+3] == 8'hB8 || s[i+3] == 8'h00);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_data != s[oidx] || out_au_start != exp_tag(oidx)) begin
      failures++;
      if (failures < 5) $display("byte %0d: got %02h/%0d exp %02h/%0d", oidx, out_data, out_au_start, s[oidx], exp_tag(oidx));
    end
    if (out_au_start) tags++;
    oidx++;
  end

  initial begin
    byte unsigned codes[4] = '{8'hB3, 8'hB8, 8'h00, 8'hB7};
    // build the stream
    while (s.size() < 3000) begin
      if ($urandom % 20 == 0) begin
        s.push_back(0); s.push_back(0); s.push_back(1);
        s.push_back(codes[$urandom % 4]);
      end else begin
        s.push_back(8'($urandom % 3 == 0 ? 0 : $urandom));   // many zeros
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (s[i]) begin
      @(negedge clk);
      in_valid = 1; in_data = s[i];
      @(negedge clk);
      in_valid = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (oidx != s.size() - 3) begin
      failures++;
      $display("got %0d bytes, expected %0d", oidx, s.size() - 3);
    end
    checks++;
    if (tags == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
