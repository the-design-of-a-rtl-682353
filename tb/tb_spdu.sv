// tb_spdu: one complete SPDU channel.  A video-like byte stream (junk,
// then access units opened by sequence, GOP and picture start codes, with
// a sequence end code inside one unit) enters with random gaps; PTS/DTS/PCR
// enables are pulsed with the first byte of a unit.  The STC base is the
// clock count.  The output must be each unit preceded by its SPDU header;
// PTS and DTS must be equal and lie between the unit's arrival and its
// header's departure.  Finally the output is blocked until the input
// buffer overflows, which must raise the sticky overflow flag.
module tb_spdu;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, pts_en = 0, dts_en = 0, pcr_en = 0;
  logic [7:0] in_data = 0;
  logic [32:0] stc = 0;
  logic out_valid, out_ready = 1, out_sop, pcr_req, overflow;
  logic [7:0] out_data, frame_index;
  int checks = 0, failures = 0, nout = 0, nhdr = 0;
  byte unsigned e[$];
  bit ts_mask[$];       // byte is part of a PTS/DTS field
  int hdr_at[$];
  longint arrive[$];
  bit pcr_of[$];
  byte unsigned got[$];
  longint sop_cyc[$];
  bit block_out = 0;

  spdu #(.BUF_DEPTH(32), .PKT_ID(7'd3), .REF_FLAG(1'b1), .MASTER(1'b0), .REF_ID(7'd2)) dut (
    .clk, .rst_n, .in_valid, .in_data, .pts_en, .dts_en, .pcr_en, .stc_base(stc),
    .out_valid, .out_ready, .out_data, .out_sop, .frame_index, .pcr_req, .overflow);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    stc <= stc + 1;
    if (rst_n && out_valid && out_ready) begin
      got.push_back(out_data);
      if (out_sop) begin
        sop_cyc.push_back(stc);
        checks++;
        if (nhdr >= pcr_of.size() || frame_index != 8'(nhdr) || pcr_req != pcr_of[nhdr]) begin
          failures++;
          $display("header %0d: fidx %0d pcr %0d", nhdr, frame_index, pcr_req);
        end
        nhdr++;
      end
    end
    out_ready <= !block_out && ($urandom % 5 != 0);
  end

  task automatic send(input byte unsigned b, input bit p = 0, input bit d = 0, input bit c = 0);
    @(negedge clk);
    in_valid = 1; in_data = b; pts_en = p; dts_en = d; pcr_en = c;
    @(negedge clk);
    in_valid = 0; pts_en = 0; dts_en = 0; pcr_en = 0;
    if ($urandom % 2) @(negedge clk);
  endtask

  initial begin
    int nau = 30;
    byte unsigned codes[3] = '{8'hB3, 8'hB8, 8'h00};
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (6) send(8'($urandom % 200 + 2));        // dropped: no AU yet
    for (int k = 0; k <= nau; k++) begin
      bit p, d, c;
      bq_t h, body;
      p = $urandom % 2; d = $urandom % 2; c = $urandom % 2;
      body = {8'h00, 8'h00, 8'h01, codes[k % 3]};
      repeat (4 + $urandom % 30) body.push_back(8'($urandom % 250 + 2));
      if (k == 7) body = {body, 8'h00, 8'h00, 8'h01, 8'hB7, 8'h11};   // sequence end inside
      pcr_of.push_back(c);
      if (k < nau) begin
        h = spdu_hdr(3, 1, 0, 2, p, d, 0, k);
        hdr_at.push_back(e.size());
        foreach (h[i]) begin
          e.push_back(h[i]);
          ts_mask.push_back(i >= 11);
        end
        foreach (body[i]) begin
          e.push_back(body[i]);
          ts_mask.push_back(0);
        end
      end
      arrive.push_back(stc);
      foreach (body[i]) send(body[i], i == 0 && p, i == 0 && d, i == 0 && c);
    end
    repeat (100) @(negedge clk);
    // compare everything up to the last complete unit
    checks++;
    if (got.size() < e.size()) begin
      failures++;
      $display("only %0d bytes out, expected at least %0d", got.size(), e.size());
    end
    foreach (e[i]) if (i < got.size() && !ts_mask[i]) begin
      checks++;
      if (got[i] != e[i]) begin
        failures++;
        if (failures < 8) $display("byte %0d: %02h exp %02h", i, got[i], e[i]);
      end
    end
    // time stamps
    foreach (hdr_at[k]) begin
      int at;
      bit [39:0] f1, f2;
      at = hdr_at[k];
      if (e[at + 7] & 8'h02) begin
        bit [32:0] t;
        for (int i = 0; i < 5; i++) f1 = {f1[31:0], got[at + 11 + i]};
        t = {f1[35:33], f1[31:17], f1[15:1]};
        checks++;
        if (f1[0] != 1 || f1[16] != 1 || f1[32] != 1 || longint'(t) < arrive[k] || longint'(t) > sop_cyc[k]) begin
          failures++;
          $display("AU %0d: PTS %0d outside [%0d, %0d]", k, t, arrive[k], sop_cyc[k]);
        end
        if (e[at + 7] & 8'h01) begin
          for (int i = 0; i < 5; i++) f2 = {f2[31:0], got[at + 16 + i]};
          checks++;
          if (f2[35:0] != f1[35:0]) begin failures++; $display("AU %0d: DTS differs", k); end
        end
      end
    end
    // overflow: block the output and flood the input
    checks++;
    if (overflow) failures++;
    block_out = 1;
    repeat (60) send(8'h55);
    checks++;
    if (!overflow) begin failures++; $display("no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
