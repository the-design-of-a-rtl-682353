// mux_top: multiplexer for nine-view (multiview) video.
//
// Nine MPEG-2 video encoders, one per camera, each deliver a byte stream
// with PTS/DTS/PCR enables.  Every channel turns its stream into SPDUs
// (access units with a header that carries frame index, view reference and
// time stamps), a second step cuts them into DSS payload segments, and a
// packet arbiter hands the single DSS packetizer one segment per 188-byte
// packet, choosing among the nine channels, the PAT and the PMT; with no
// request it sends a NULL packet.  The packets leave one bit per 54 MHz
// clock (9 channels x 6 Mb/s), while the interior moves one byte every
// eight clocks (6.75 MHz).  One STC counter (54 MHz / 600 = 90 kHz base)
// gives all time stamps.
//
// View relations: in each triple of cameras (1-3, 4-6, 7-9) the middle one
// is the master; the outer two are slaves whose SPDU header names the
// middle channel as reference.  The PCR travels with the fifth channel.
// The overall structure, rates, the nine-plus-three sources and the PCR
// channel are the paper's; the single clock with byte strobes, the PID
// numbers, buffer depths and the master/slave assignment are this design's.
//
// Interface: vid_valid[i] strobes vid_data[i] (at most one byte per clock
// per channel); pts_en/dts_en/pcr_en[i] are pulses taken for the next
// access unit of channel i.  ts_bit is the serial DSS stream, MSB first;
// ts_sop is high with the first bit of every packet.  overflow[i] is a
// sticky flag set when channel i lost input bytes.
module mux_top #(
  parameter int unsigned PSI_PERIOD = 16_200_000,
  parameter int unsigned BUF_DEPTH  = 32,
  parameter int unsigned S2_DEPTH   = 512
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [mux_pkg::N_CH-1:0]      vid_valid,
  input  logic [mux_pkg::N_CH-1:0][7:0] vid_data,
  input  logic [mux_pkg::N_CH-1:0]      pts_en,
  input  logic [mux_pkg::N_CH-1:0]      dts_en,
  input  logic [mux_pkg::N_CH-1:0]      pcr_en,
  output logic                        ts_bit,
  output logic                        ts_sop,
  output logic [mux_pkg::N_CH-1:0]      overflow
);
  import mux_pkg::*;

  localparam int unsigned PCR_CH = 4;   // fifth channel

  logic [32:0] stc_base;
  logic [9:0]  stc_ext;

  seg_info_t        src_seg  [N_SRC];
  logic [7:0]       src_data [N_SRC];
  logic [N_SRC-1:0] src_req, src_rd, src_done, gnt;
  logic             gnt_valid, arb_next, load, sop;
  logic [3:0]       gnt_idx, cc;
  logic [4:0]       cc_sel;
  logic             cc_inc;
  logic [7:0]       dss_byte;

  stc_counter u_stc (.clk, .rst_n, .base(stc_base), .ext(stc_ext));

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    logic       s_valid, s_ready, s_sop, s_pcr;
    logic [7:0] s_data, s_fidx;

    spdu #(
      .BUF_DEPTH(BUF_DEPTH),
      .PKT_ID   (7'(i + 1)),
      .REF_FLAG (1'b1),
      .MASTER   (i % 3 == 1),
      .REF_ID   (7'((i / 3) * 3 + 2))
    ) u_spdu (
      .clk, .rst_n,
      .in_valid(vid_valid[i]), .in_data(vid_data[i]),
      .pts_en(pts_en[i]), .dts_en(dts_en[i]), .pcr_en(pcr_en[i]),
      .stc_base,
      .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data),
      .out_sop(s_sop), .frame_index(s_fidx), .pcr_req(s_pcr),
      .overflow(overflow[i])
    );

    spdu_stage2 #(
      .DEPTH  (S2_DEPTH),
      .SEG_MAX(i == PCR_CH ? 175 : 181)
    ) u_s2 (
      .clk, .rst_n,
      .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
      .in_sop(s_sop), .in_fidx(s_fidx), .in_pcr(s_pcr),
      .req(src_req[i]), .seg(src_seg[i]),
      .rd(src_rd[i]), .rd_data(src_data[i]), .seg_done(src_done[i])
    );
  end

  pat_section #(.PERIOD(PSI_PERIOD), .PMT_PID(PID_PMT)) u_pat (
    .clk, .rst_n, .req(src_req[SRC_PAT]), .seg(src_seg[SRC_PAT]),
    .rd(src_rd[SRC_PAT]), .rd_data(src_data[SRC_PAT]), .seg_done(src_done[SRC_PAT])
  );

  pmt_section #(.PERIOD(PSI_PERIOD), .N_CH(N_CH), .PCR_PID(PID_CH0 + 13'(PCR_CH)), .ES_PID0(PID_CH0)) u_pmt (
    .clk, .rst_n, .req(src_req[SRC_PMT]), .seg(src_seg[SRC_PMT]),
    .rd(src_rd[SRC_PMT]), .rd_data(src_data[SRC_PMT]), .seg_done(src_done[SRC_PMT])
  );

  packet_arbiter #(.N_SRC(N_SRC)) u_arb (
    .clk, .rst_n, .req(src_req), .next(arb_next),
    .gnt, .gnt_valid, .gnt_idx
  );

  continuity_counter #(.N(N_SRC)) u_cc (
    .clk, .rst_n, .sel(cc_sel), .inc(cc_inc), .cc
  );

  dss_block #(.N_SRC(N_SRC), .N_CH(N_CH), .PCR_SRC(PCR_CH)) u_dss (
    .clk, .rst_n, .load, .byte_out(dss_byte), .sop,
    .arb_next, .gnt_valid, .gnt_idx,
    .src_seg, .src_data, .src_rd, .src_done,
    .stc_base, .stc_ext, .cc_sel, .cc_inc, .cc
  );

  serial_out u_ser (
    .clk, .rst_n, .load, .byte_in(dss_byte), .sop_in(sop),
    .bit_out(ts_bit), .sop_out(ts_sop)
  );

  // Only the granted source is read.
  a_rd_granted: assert property (@(posedge clk) disable iff (!rst_n)
                                 (src_rd & ~gnt) == '0);
endmodule
