// tb_spdu_header: the header FSM reads a model buffer holding tagged access
// units (and a few untagged bytes before the first one, which must be
// dropped).  With random PTS/DTS/PCR enables per unit, a fixed STC value
// and random output back-pressure, the output must be, unit after unit,
// the expected SPDU header followed by the unit's bytes; out_sop,
// frame_index and pcr_req are checked at every header.
module tb_spdu_header;
  import tb_ref_pkg::*;
  localparam logic [32:0] TS = 33'h1_2345_6789;
  logic clk = 0, rst_n = 0;
  logic [8:0] buf_dout;
  logic buf_empty, buf_pop;
  logic pts_en = 0, dts_en = 0, pcr_en = 0;
  logic out_valid, out_ready = 0, out_sop, pcr_req;
  logic [7:0] out_data, frame_index;
  int checks = 0, failures = 0, nout = 0, nhdr = 0;
  logic [8:0] bufq[$];
  byte unsigned e[$];
  int hdr_at[$];
  bit  pcr_of[$];

  spdu_header #(.PKT_ID(7'd5), .REF_FLAG(1'b1), .MASTER(1'b1), .REF_ID(7'd5)) dut (
    .clk, .rst_n, .buf_dout, .buf_empty, .buf_pop, .pts_en, .dts_en, .pcr_en,
    .stc_base(TS), .out_valid, .out_ready, .out_data, .out_sop, .frame_index, .pcr_req);

  assign buf_empty = (bufq.size() == 0);
  assign buf_dout  = buf_empty ? 9'h0 : bufq[0];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (buf_pop) void'(bufq.pop_front());
    if (out_valid && out_ready) begin
      checks++;
      if (nout >= e.size() || out_data != e[nout]) begin
        failures++;
        if (failures < 8) $display("byte %0d: %02h exp %02h", nout, out_data, nout < e.size() ? e[nout] : 0);
      end
      if (out_sop) begin
        checks++;
        if (nhdr >= hdr_at.size() || hdr_at[nhdr] != nout || frame_index != 8'(nhdr) || pcr_req != pcr_of[nhdr]) begin
          failures++;
          $display("header %0d at byte %0d fidx %0d pcr %0d", nhdr, nout, frame_index, pcr_req);
        end
        nhdr++;
      end
      nout++;
    end
    out_ready <= ($urandom % 4 != 0);
  end

  initial begin
    int nau = 40;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // junk before the first access unit
    repeat (5) bufq.push_back({1'b0, 8'($urandom)});
    for (int k = 0; k < nau; k++) begin
      bit p, d, c;
      bq_t h;
      int len;
      p = $urandom % 2; d = $urandom % 2; c = $urandom % 2;
      // enables arrive while the previous unit is being sent
      wait (bufq.size() < 4);
      @(negedge clk);
      pts_en = p; dts_en = d; pcr_en = c;
      @(negedge clk);
      pts_en = 0; dts_en = 0; pcr_en = 0;
      h = spdu_hdr(5, 1, 1, 5, p, d, TS, k);
      hdr_at.push_back(e.size());
      pcr_of.push_back(c);
      foreach (h[i]) e.push_back(h[i]);
      len = 4 + $urandom % 40;
      for (int i = 0; i < len; i++) begin
        byte unsigned b;
        b = (i < 3) ? ((i == 2) ? 8'h01 : 8'h00) : 8'($urandom);
        bufq.push_back({i == 0, b});
        e.push_back(b);
      end
    end
    wait (bufq.size() == 0);
    repeat (20) @(negedge clk);
    checks++;
    if (nout != e.size() || nhdr != nau) begin
      failures++;
      $display("%0d bytes (exp %0d), %0d headers", nout, e.size(), nhdr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
