// tb_spdu_stage2: writes SPDUs of random length (with back-pressure) and
// reads segments the way the DSS does, one byte per eight clocks.  Checks
// that the segments are the SPDUs cut at SEG_MAX bytes and at every SPDU
// start, with PUSI on the first segment of an SPDU, its frame index on all
// and its PCR request on the first only, and that every byte comes out in
// order.  The input side must have been stalled at least once.
module tb_spdu_stage2;
  localparam int SEG_MAX = 30, DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_sop = 0, in_pcr = 0;
  logic [7:0] in_data = 0, in_fidx = 0;
  logic req, rd = 0, seg_done = 0;
  mux_pkg::seg_info_t seg;
  logic [7:0] rd_data;
  int checks = 0, failures = 0, stalls = 0;

  typedef struct { int len; bit pusi; int fidx; bit pcr; byte unsigned d[$]; } segm_t;
  segm_t exp[$];

  spdu_stage2 #(.DEPTH(DEPTH), .SEG_MAX(SEG_MAX), .IDEPTH(4)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_sop, .in_fidx, .in_pcr,
    .req, .seg, .rd, .rd_data, .seg_done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid && !in_ready) stalls++;

  // writer
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      int len;
      bit pcr;
      byte unsigned d[$];
      d = {};
      len = 1 + $urandom % 100;
      pcr = $urandom % 2;
      for (int i = 0; i < len; i++) d.push_back(8'($urandom));
      for (int o = 0; o < len; o += SEG_MAX) begin
        segm_t s;
        s.len = (len - o < SEG_MAX) ? len - o : SEG_MAX;
        s.pusi = (o == 0); s.fidx = p; s.pcr = pcr && o == 0;
        s.d = d[o : o + s.len - 1];
        exp.push_back(s);
      end
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        in_valid = 1; in_data = d[i]; in_sop = (i == 0); in_fidx = 8'(p); in_pcr = pcr;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
        if (p > 30) repeat ($urandom % 12) @(negedge clk);  // slower second half
      end
    end
    // a final SPDU start closes the last open segment
    @(negedge clk);
    in_valid = 1; in_sop = 1; in_data = 0;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
  end

  // reader
  initial begin
    int nseg = 0;
    @(posedge rst_n);
    while (nseg < exp.size() || nseg == 0) begin
      segm_t e;
      @(negedge clk);
      if (!req) continue;
      e = exp[nseg];
      checks++;
      if (int'(seg.len) != e.len || seg.pusi != e.pusi || int'(seg.fidx) != (e.fidx % 256) || seg.pcr != e.pcr) begin
        failures++;
        if (failures < 5) $display("seg %0d: len %0d/%0d pusi %0d/%0d fidx %0d/%0d pcr %0d/%0d", nseg,
          seg.len, e.len, seg.pusi, e.pusi, seg.fidx, e.fidx, seg.pcr, e.pcr);
      end
      for (int i = 0; i < e.len; i++) begin
        rd = 1; seg_done = (i == e.len - 1);
        #1;
        checks++;
        if (rd_data != e.d[i]) begin
          failures++;
          if (failures < 5) $display("seg %0d byte %0d: %02h exp %02h", nseg, i, rd_data, e.d[i]);
        end
        @(negedge clk);
        rd = 0; seg_done = 0;
        repeat (7) @(negedge clk);
      end
      nseg++;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
