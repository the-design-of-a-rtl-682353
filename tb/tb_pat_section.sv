// tb_pat_section: reads the PAT twice and checks every byte against the
// field values of the PAT syntax and a reference CRC, the segment length
// and PUSI, and that the section is offered again exactly PERIOD clocks
// after the first one.
module tb_pat_section;
  import tb_ref_pkg::*;
  localparam int PERIOD = 3000;
  logic clk = 0, rst_n = 0;
  logic req, rd, seg_done;
  mux_pkg::seg_info_t seg;
  logic [7:0] rd_data;
  int checks = 0, failures = 0;

  pat_section #(.PERIOD(PERIOD), .TS_ID(16'h1234), .PROG_NUM(16'h0001), .PMT_PID(13'h0100)) dut (
    .clk, .rst_n, .req, .seg, .rd, .rd_data, .seg_done);
  tb_psi_reader rdr (.clk, .req(req && rst_n), .seg, .rd, .seg_done, .rd_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t exp;
    bit [31:0] c;
    // pointer, table_id 0, syntax=1 '0' '11' length 13, ts id, '11' v0 cni1,
    // section 0, last 0, program 1, '111' + PMT PID 0x100
    exp = {8'h00, 8'h00, 8'hB0, 8'h0D, 8'h12, 8'h34, 8'hC1, 8'h00, 8'h00,
           8'h00, 8'h01, 8'hE1, 8'h00};
    c = crc32_ref(exp, 1, exp.size());
    for (int i = 3; i >= 0; i--) exp.push_back(c[i*8 +: 8]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      #1;
      checks++;
      if (seg.len != 8'd17 || !seg.pusi) failures++;
      rdr.read_section();
      checks++;
      if (rdr.got != exp) begin
        failures++;
        $display("round %0d: got %p", round, rdr.got);
        $display("expected   %p", exp);
      end
      @(negedge clk);
      checks++;
      if (req && round == 0) failures++;          // served, not pending
    end
    checks++;
    if (rdr.req_rise.size() < 2 || rdr.req_rise[1] - rdr.req_rise[0] != PERIOD) begin
      failures++;
      $display("req rises %p", rdr.req_rise);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
