// tb_packet_arbiter: random requests against a round-robin model.  After
// every next pulse the grant must be the first requesting source after the
// previous grant, one-hot, and held until the following next pulse.
module tb_packet_arbiter;
  localparam int N = 11;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = 0, gnt;
  logic next = 0, gnt_valid;
  logic [3:0] gnt_idx;
  int checks = 0, failures = 0, waits = 0;
  int last = N - 1;

  packet_arbiter #(.N_SRC(N)) dut (.clk, .rst_n, .req, .next, .gnt, .gnt_valid, .gnt_idx);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int exp;
      logic [N-1:0] r;
      @(negedge clk);
      r = N'({$urandom, $urandom}) & N'({$urandom, $urandom});
      if (n % 10 == 0) r = '0;
      req = r; next = 1;
      exp = -1;
      for (int k = 1; k <= N; k++) if (exp < 0 && r[(last + k) % N]) exp = (last + k) % N;
      if ($countones(r) > 1) waits++;
      @(negedge clk);
      next = 0;
      req = N'($urandom);           // requests may change; the grant must hold
      repeat ($urandom % 3) begin
        checks++;
        if (exp < 0 ? gnt_valid : (!gnt_valid || gnt_idx != 4'(exp) || gnt != N'(1) << exp)) begin
          failures++;
          if (failures < 5) $display("n=%0d req=%b exp=%0d got %0d/%0d", n, r, exp, gnt_valid, gnt_idx);
        end
        @(negedge clk);
      end
      if (exp >= 0) last = exp;
    end
    checks++;
    if (waits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
