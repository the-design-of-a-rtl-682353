// tb_dss_block: the DSS packetizer against model sources and a model
// arbiter that grants a random requesting source (or none).  Segments of
// random length are queued at the video channels, the PAT and the PMT;
// each 188-byte packet that leaves is compared with a packet built here
// from the transport-stream layout: header, continuity counter per source,
// adaptation field with frame index, PCR (for the PCR channel when asked)
// and stuffing, then the payload; NULL packets when nothing is granted.
// PCR values must be well formed and within the time the packet was sent.
// Load comes every 8 clocks as from the serial output.
module tb_dss_block;
  import mux_pkg::*;
  localparam int PCR_SRC = 4;
  logic clk = 0, rst_n = 0;
  logic load = 0, sop, arb_next;
  logic [7:0] byte_out;
  logic gnt_valid = 0;
  logic [3:0] gnt_idx = 0;
  seg_info_t src_seg [N_SRC];
  logic [7:0] src_data [N_SRC];
  logic [N_SRC-1:0] src_rd, src_done;
  logic [32:0] stc_base = 0;
  logic [9:0] stc_ext = 0;
  logic [4:0] cc_sel;
  logic cc_inc;
  logic [3:0] cc;
  int checks = 0, failures = 0;
  int n_null = 0, n_pcr = 0, n_stuff = 0, n_noaf = 0, n_l0 = 0;

  seg_info_t    segq  [N_SRC][$];
  byte unsigned dataq [N_SRC][$];
  byte unsigned pkt[$];
  byte unsigned exp_pkt[$];
  bit           exp_pcr;
  int           cc_model [N_SRC];
  longint       cyc = 0, t_lo;

  dss_block #(.N_SRC(N_SRC), .N_CH(N_CH), .PCR_SRC(PCR_SRC)) dut (
    .clk, .rst_n, .load, .byte_out, .sop, .arb_next, .gnt_valid, .gnt_idx,
    .src_seg, .src_data, .src_rd, .src_done, .stc_base, .stc_ext,
    .cc_sel, .cc_inc, .cc);

  continuity_counter #(.N(N_SRC + 1)) u_cc (.clk, .rst_n, .sel(cc_sel), .inc(cc_inc), .cc);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) for (int i = 0; i < N_SRC; i++) begin
    src_seg[i]  = segq[i].size() ? segq[i][0] : '0;
    src_data[i] = dataq[i].size() ? dataq[i][0] : 8'h00;
  end

  // STC: extension 0..599 per clock, base per 600 clocks
  always @(posedge clk) begin
    cyc++;
    if (stc_ext == 599) begin stc_ext <= 0; stc_base <= stc_base + 1; end
    else stc_ext <= stc_ext + 1;
    load <= rst_n && (cyc % 8 == 0);
  end

  function automatic bit [47:0] stc_at(longint t);   // PCR field at clock t
    longint e;
    e = t - 1;
    return {33'(e / 600), 6'h3F, 9'((e % 600) / 2)};
  endfunction

  function automatic void build(int s, seg_info_t g);
    bit video, af;
    int L;
    logic [12:0] pid;
    exp_pkt = {};
    exp_pcr = 0;
    if (s < 0) begin
      exp_pkt = {8'h47, 8'h1F, 8'hFF, 8'h10};
      repeat (184) exp_pkt.push_back(8'hFF);
      return;
    end
    video = s < N_CH;
    pid = (s == SRC_PAT) ? 13'h0 : (s == SRC_PMT) ? 13'h100 : 13'h101 + 13'(s);
    af = video || g.len < 184;
    L = 183 - int'(g.len);
    exp_pcr = video && s == PCR_SRC && g.pcr;
    begin
      byte unsigned b1, b3;
      b1 = {1'b0, g.pusi, 1'b0, pid[12:8]};
      b3 = {2'b00, af ? 2'b11 : 2'b01, 4'(cc_model[s])};
      exp_pkt = {8'h47, b1, pid[7:0], b3};
    end
    cc_model[s]++;
    if (af) begin
      exp_pkt.push_back(8'(L));
      if (L > 0) exp_pkt.push_back({3'b000, exp_pcr, 1'b0, video, 2'b11});
      if (exp_pcr) repeat (6) exp_pkt.push_back(8'h00);   // checked apart
      if (video) exp_pkt.push_back(g.fidx);
      while (exp_pkt.size() < 5 + L) exp_pkt.push_back(8'hFF);
      if (!video && L > 0) n_stuff++;
      if (L == 0) n_l0++;
    end else n_noaf++;
    for (int i = 0; i < g.len; i++) exp_pkt.push_back(dataq[s][i]);
  endfunction

  // model arbiter and model source reads
  always @(posedge clk) if (rst_n) begin
    if (arb_next) begin
      int cand[$];
      cand = {};
      for (int i = 0; i < N_SRC; i++) if (segq[i].size()) cand.push_back(i);
      if (cand.size() && $urandom % 8 != 0) begin
        int s;
        s = cand[$urandom % cand.size()];
        gnt_valid <= 1; gnt_idx <= 4'(s);
        build(s, segq[s][0]);
      end else begin
        gnt_valid <= 0;
        build(-1, '0);
        n_null++;
      end
    end
    for (int i = 0; i < N_SRC; i++) begin
      if (src_rd[i]) void'(dataq[i].pop_front());
      if (src_done[i]) void'(segq[i].pop_front());
    end
  end

  // collect and compare packets
  always @(posedge clk) if (rst_n && load) begin
    if (sop) begin
      pkt = {};
      t_lo = cyc;
    end
    pkt.push_back(byte_out);
    if (pkt.size() == 188) begin
      checks++;
      for (int i = 0; i < 188; i++) begin
        if (exp_pcr && i >= 6 && i < 12) continue;
        if (pkt[i] != exp_pkt[i]) begin
          failures++;
          if (failures < 6) $display("packet byte %0d: %02h exp %02h\n got %p\n exp %p", i, pkt[i], exp_pkt[i], pkt[0:12], exp_pkt[0:12]);
          break;
        end
      end
      if (exp_pcr) begin
        bit [47:0] f;
        bit [47:0] lo, hi;
        for (int i = 6; i < 12; i++) f = {f[39:0], pkt[i]};
        lo = stc_at(t_lo); hi = stc_at(cyc);
        checks++;
        n_pcr++;
        if (f[14:9] != 6'h3F || f[8:0] > 299 || {f[47:15], f[8:0]} < {lo[47:15], lo[8:0]} ||
            {f[47:15], f[8:0]} > {hi[47:15], hi[8:0]}) begin
          failures++;
          $display("bad PCR %h not in [%h, %h]", f, lo, hi);
        end
      end
    end
  end

  initial begin
    foreach (cc_model[i]) cc_model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      int s, len, mx;
      seg_info_t g;
      s = $urandom % N_SRC;
      if (s < N_CH) mx = (s == PCR_SRC) ? 175 : 181; else mx = 184;
      len = 1 + $urandom % mx;
      if (n % 17 == 3) len = mx;
      if (n % 17 == 5 && s >= N_CH) len = 183;
      g = '{len: 8'(len), pusi: $urandom % 2, fidx: 8'($urandom), pcr: s == PCR_SRC ? ($urandom % 4 != 0) : $urandom % 2};
      for (int i = 0; i < len; i++) dataq[s].push_back(8'($urandom));
      segq[s].push_back(g);
      repeat ($urandom % 1200) @(posedge clk);
    end
    for (int i = 0; i < N_SRC; i++) wait (segq[i].size() == 0);
    repeat (2 * 188 * 8) @(posedge clk);
    checks++;
    if (n_null == 0 || n_pcr == 0 || n_stuff == 0 || n_noaf == 0 || n_l0 == 0) begin
      failures++;
      $display("cases: null %0d pcr %0d stuffed %0d no-AF %0d L=0 %0d", n_null, n_pcr, n_stuff, n_noaf, n_l0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
