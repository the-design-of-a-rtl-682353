// tb_mux_top: end-to-end test of the multiplexer.
//
// Nine model encoders send access units (random size, random gaps, random
// PTS/DTS/PCR enables) into the nine channels.  The serial output is turned
// back into 188-byte packets and parsed like a demultiplexer would: sync
// byte, PID, continuity counter per PID, adaptation field (frame index,
// PCR, stuffing) and payload.  The payload of every video PID, joined up,
// must equal that channel's access units each preceded by its SPDU header
// (time-stamp values excluded, their ordering is checked instead); the frame
// index in the adaptation field must match the SPDU it starts; PAT and PMT
// payloads must equal the expected sections with their CRC.  Each mechanism
// of the design is counted and must occur: NULL packets, PCR insertion,
// stuffing, splitting of an SPDU over several packets, PSI repetition,
// arbitration among several waiting sources, back-pressure into a channel
// and, at the end, an input-buffer overflow when one channel is flooded.
// The design runs with its default parameters, so the PAT and PMT are
// checked to come round again 0.3 s (16.2 million clocks) after reset.
module tb_mux_top;
  import tb_ref_pkg::*;
  localparam int NCH = 9, NAU = 12;
  localparam longint PSI_PERIOD = 16_200_000;   // 0.3 s at 54 MHz, the design's default

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] vid_valid = 0, pts_en = 0, dts_en = 0, pcr_en = 0;
  logic [NCH-1:0][7:0] vid_data = 0;
  logic ts_bit, ts_sop;
  logic [NCH-1:0] overflow;

  int checks = 0, failures = 0;
  int n_pkt = 0, n_null = 0, n_pcr = 0, n_stuff = 0, n_split = 0, n_pat = 0, n_pmt = 0;
  int n_wait = 0, n_bp = 0;

  byte unsigned e[NCH][$];       // expected SPDU stream per channel
  bit           m[NCH][$];       // 1: time-stamp byte, value not compared
  byte unsigned g[NCH][$];       // reassembled payload per channel
  int           hdrs[NCH][$];    // expected header offsets
  int           cc_last[int];
  longint       last_pcr = -1;
  bq_t          pat_exp, pmt_exp;
  bit           flooding = 0;

  mux_top dut (
    .clk, .rst_n, .vid_valid, .vid_data, .pts_en, .dts_en, .pcr_en,
    .ts_bit, .ts_sop, .overflow);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog: packets %0d null %0d", n_pkt, n_null);
    for (int i = 0; i < NCH; i++) $display("ch %0d: %0d of %0d", i, g[i].size(), e[i].size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc_now = 0;

  // mechanisms seen inside
  always @(posedge clk) if (rst_n) begin
    cyc_now++;
    if (dut.arb_next && $countones(dut.src_req) > 1) n_wait++;
  end
  for (genvar i = 0; i < NCH; i++) begin : g_bp
    always @(posedge clk) if (rst_n && dut.g_ch[i].s_valid && !dut.g_ch[i].s_ready) n_bp++;
  end

  // ---------------------------------------------------------------- output
  byte unsigned pkt[$];
  logic [7:0] sh;
  int nb = -1;

  always @(posedge clk) if (rst_n) begin
    if (ts_sop) begin
      if (pkt.size() != 0) begin failures++; $display("short packet %0d", pkt.size()); end
      pkt = {}; nb = 0;
    end
    if (nb >= 0) begin
      sh = {sh[6:0], ts_bit};
      nb++;
      if (nb == 8) begin
        pkt.push_back(sh);
        nb = 0;
        if (pkt.size() == 188) begin
          parse(pkt);
          pkt = {};
          nb = -1;
        end
      end
    end
  end

  function automatic void parse(bq_t p);
    int pid, afc, cc, pusi, at;
    checks++;
    n_pkt++;
    if (p[0] != 8'h47) begin failures++; $display("no sync byte"); return; end
    pusi = p[1][6];
    pid  = {p[1][4:0], p[2]};
    afc  = p[3][5:4];
    cc   = p[3][3:0];
    if (pid == 13'h1FFF) begin
      n_null++;
      checks++;
      foreach (p[i]) if (i >= 4 && p[i] != 8'hFF) begin failures++; $display("NULL payload"); break; end
      return;
    end
    checks++;
    if (cc_last.exists(pid) && cc != (cc_last[pid] + 1) % 16) begin
      failures++; $display("PID %h: cc %0d after %0d", pid, cc, cc_last[pid]);
    end
    cc_last[pid] = cc;
    at = 4;
    begin
      int fidx = -1;
      bit pcrf = 0, idxf = 0;
      if (afc[1]) begin
        int L;
        L = p[4];
        if (L > 0) begin
          int q;
          pcrf = p[5][4]; idxf = p[5][2];
          q = 6;
          if (pcrf) begin
            longint base, ext;
            base = {p[6], p[7], p[8], p[9], p[10][7]};
            ext  = {p[10][0], p[11]};
            n_pcr++;
            checks++;
            if (pid != 13'h105 || p[10][6:1] != 6'h3F || base * 300 + ext <= last_pcr) begin
              failures++; $display("bad PCR pid %h", pid);
            end
            last_pcr = base * 300 + ext;
            q += 6;
          end
          if (idxf) begin fidx = p[q]; q++; end
          if (q < 5 + L) n_stuff++;
          for (int i = q; i < 5 + L; i++) if (p[i] != 8'hFF) begin failures++; $display("stuffing"); break; end
        end
        at = 5 + L;
      end
      if (pid == 0 || pid == 13'h100) begin
        bq_t pl;
        pl = p[at:187];
        checks++;
        if (!pusi || pl != (pid == 0 ? pat_exp : pmt_exp)) begin
          failures++; $display("PSI %h payload %p", pid, pl);
        end
        if (pid == 0) n_pat++; else n_pmt++;
        return;
      end
      if (pid >= 13'h101 && pid <= 13'h109) begin
        int ch;
        ch = pid - 13'h101;
        checks++;
        if (!idxf) begin failures++; $display("video packet without frame index"); end
        if (pusi) begin
          checks++;
          if (fidx != p[at + 9]) begin failures++; $display("ch %0d: frame index %0d vs SPDU %0d", ch, fidx, p[at+9]); end
        end else n_split++;
        for (int i = at; i < 188; i++) g[ch].push_back(p[i]);
        return;
      end
      failures++;
      $display("unknown PID %h", pid);
    end
  endfunction

  // ---------------------------------------------------------------- input
  task automatic encoder(input int ch);
    byte unsigned codes[3] = '{8'hB3, 8'hB8, 8'h00};
    for (int k = 0; k <= NAU; k++) begin
      bit p, d, c;
      bq_t h, body;
      p = $urandom % 2; d = $urandom % 2; c = (ch == 4) ? ($urandom % 3 != 0) : $urandom % 2;
      body = {8'h00, 8'h00, 8'h01, codes[k % 3]};
      repeat (4 + $urandom % ((k % 4 == 1) ? 500 : 120)) body.push_back(8'($urandom % 250 + 2));
      if (k < NAU) begin
        h = spdu_hdr(ch + 1, 1, ch % 3 == 1, (ch / 3) * 3 + 2, p, d, 0, k);
        hdrs[ch].push_back(e[ch].size());
        foreach (h[i]) begin e[ch].push_back(h[i]); m[ch].push_back(i >= 11); end
        foreach (body[i]) begin e[ch].push_back(body[i]); m[ch].push_back(0); end
      end
      foreach (body[i]) begin
        @(negedge clk);
        vid_valid[ch] = 1; vid_data[ch] = body[i];
        pts_en[ch] = (i == 0) && p; dts_en[ch] = (i == 0) && d; pcr_en[ch] = (i == 0) && c;
        @(negedge clk);
        vid_valid[ch] = 0; pts_en[ch] = 0; dts_en[ch] = 0; pcr_en[ch] = 0;
        repeat ($urandom % ((k % 5 == 2) ? 2 : 600)) @(negedge clk);
      end
      repeat ($urandom % 3000) @(negedge clk);
    end
  endtask

  function automatic void compare_channel(int ch);
    int n = 0;
    checks++;
    if (g[ch].size() < e[ch].size()) begin
      failures++; $display("ch %0d: %0d of %0d bytes arrived", ch, g[ch].size(), e[ch].size());
    end
    foreach (e[ch][i]) if (i < g[ch].size() && !m[ch][i] && g[ch][i] != e[ch][i]) begin
      if (n == 0) $display("ch %0d: first difference at byte %0d: %02h exp %02h", ch, i, g[ch][i], e[ch][i]);
      n++;
    end
    checks++;
    if (n) begin failures++; $display("ch %0d: %0d bytes differ", ch, n); end
    // time stamps: PTS present where flagged, never decreasing
    begin
      longint prev = -1;
      foreach (hdrs[ch][k]) begin
        int at;
        at = hdrs[ch][k];
        if (at + 16 <= g[ch].size() && (e[ch][at + 7] & 8'h02)) begin
          longint t;
          t = {g[ch][at+11][3:1], g[ch][at+12], g[ch][at+13][7:1], g[ch][at+14], g[ch][at+15][7:1]};
          checks++;
          if (t < prev) begin failures++; $display("ch %0d: PTS decreases", ch); end
          prev = t;
        end
      end
    end
  endfunction

  initial begin
    bit [31:0] c;
    pat_exp = {8'h00, 8'h00, 8'hB0, 8'h0D, 8'h00, 8'h01, 8'hC1, 8'h00, 8'h00, 8'h00, 8'h01, 8'hE1, 8'h00};
    c = crc32_ref(pat_exp, 1, pat_exp.size());
    for (int i = 3; i >= 0; i--) pat_exp.push_back(c[i*8 +: 8]);
    pmt_exp = {8'h00, 8'h02, 8'hB0, 8'd58, 8'h00, 8'h01, 8'hC1, 8'h00, 8'h00, 8'hE1, 8'h05, 8'hF0, 8'h00};
    for (int i = 0; i < NCH; i++) pmt_exp = {pmt_exp, 8'h02, 8'hE1, 8'(1 + i), 8'hF0, 8'h00};
    c = crc32_ref(pmt_exp, 1, pmt_exp.size());
    for (int i = 3; i >= 0; i--) pmt_exp.push_back(c[i*8 +: 8]);

    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NCH; i++) begin
      automatic int ch = i;
      fork encoder(ch); join_none
    end
    wait fork;
    // all access units are in: wait until they have left
    for (int i = 0; i < NCH; i++) while (g[i].size() < e[i].size()) @(posedge clk);
    for (int i = 0; i < NCH; i++) compare_channel(i);
    checks++;
    if (overflow != 0) begin failures++; $display("overflow during normal traffic"); end
    // flood channel 1 until its input buffer overflows
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      vid_valid[0] = 1; vid_data[0] = 8'h77;
    end
    @(negedge clk) vid_valid[0] = 0;
    checks++;
    if (overflow != 9'b1) begin failures++; $display("overflow flags %b", overflow); end
    // PAT and PMT come again 0.3 s after reset
    while (n_pat < 2 || n_pmt < 2) @(posedge clk);
    checks++;
    if (cyc_now < PSI_PERIOD || cyc_now > PSI_PERIOD + 4 * 1504) begin
      failures++; $display("second PAT/PMT at clock %0d", cyc_now);
    end
    $display("packets %0d: null %0d pcr %0d stuffed %0d split %0d pat %0d pmt %0d arbitration-waits %0d back-pressure %0d",
             n_pkt, n_null, n_pcr, n_stuff, n_split, n_pat, n_pmt, n_wait, n_bp);
    checks++;
    if (n_null == 0 || n_pcr == 0 || n_stuff == 0 || n_split == 0 || n_pat < 2 || n_pmt < 2 || n_wait == 0 || n_bp == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
