// tb_pmt_section: reads the PMT twice and checks every byte against the
// field values of the PMT syntax (nine streams, PCR PID of the fifth) and a
// reference CRC, the segment length and PUSI, and the repetition period.
module tb_pmt_section;
  import tb_ref_pkg::*;
  localparam int PERIOD = 3000;
  logic clk = 0, rst_n = 0;
  logic req, rd, seg_done;
  mux_pkg::seg_info_t seg;
  logic [7:0] rd_data;
  int checks = 0, failures = 0;

  pmt_section #(.PERIOD(PERIOD)) dut (.clk, .rst_n, .req, .seg, .rd, .rd_data, .seg_done);
  tb_psi_reader rdr (.clk, .req(req && rst_n), .seg, .rd, .seg_done, .rd_data);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t exp;
    bit [31:0] c;
    // pointer, table_id 2, length 58, program 1, v0/cni1, sections 0/0,
    // PCR PID 0x105, program_info_length 0
    exp = {8'h00, 8'h02, 8'hB0, 8'd58, 8'h00, 8'h01, 8'hC1, 8'h00, 8'h00,
           8'hE1, 8'h05, 8'hF0, 8'h00};
    for (int i = 0; i < 9; i++) begin
      exp.push_back(8'h02);                 // MPEG-2 video
      exp.push_back(8'hE1);                 // '111' + PID[12:8] = 1
      exp.push_back(8'(8'h01 + i));         // PID 0x101 + i
      exp.push_back(8'hF0);
      exp.push_back(8'h00);
    end
    c = crc32_ref(exp, 1, exp.size());
    for (int i = 3; i >= 0; i--) exp.push_back(c[i*8 +: 8]);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      #1;
      checks++;
      if (seg.len != 8'd62 || !seg.pusi) failures++;
      rdr.read_section();
      checks++;
      if (rdr.got != exp) begin
        failures++;
        $display("round %0d: got %p", round, rdr.got);
        $display("expected   %p", exp);
      end
      checks++;
      if (rdr.got.size() != 62) failures++;
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
