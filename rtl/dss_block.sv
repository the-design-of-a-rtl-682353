// dss_block: DSS packetizer (header creation, stuffing, header merge, mux).
//
// A DSS packet is a 188-byte transport-stream packet whose adaptation
// field also carries the frame index of the video it holds.  The block
// builds one packet after another at the pace of the serial output: each
// time load is high it presents the next byte on byte_out.  At the first
// byte of a packet (the sync byte 0x47) it asks the packet arbiter for the
// next source; one clock later it latches the granted source's segment
// description, or makes a NULL packet when nothing was granted.  From the
// payload length it works out how much of the packet the header leaves
// over and fills that with stuffing bytes 0xFF inside the adaptation field,
// so that header and payload always make 188 bytes:
//
//   0      0x47
//   1-2    {error 0, PUSI, priority 0, PID[12:0]}
//   3      {scrambling 00, adaptation_field_control, continuity_counter}
//   4      adaptation field length L             (when an adaptation field)
//   5      {0, 0, 0, PCR_flag, OPCR 0, index_flag, 1, 1}  (when L > 0)
//   6-11   PCR {base 33, reserved 6 ones, extension 9}   (when PCR_flag)
//   next   frame_index                            (when index_flag)
//   ...    stuffing 0xFF up to byte 4 + L
//   5+L    payload, 183 - L bytes (184 without adaptation field)
//
// Video packets always carry the frame index; a PCR goes into a packet of
// channel PCR_SRC whose segment asks for one, sampled from the STC while
// the flags byte leaves.  PAT and PMT packets get an adaptation field only
// for stuffing.  NULL packets (PID 0x1FFF) carry 184 bytes 0xFF and keep
// continuity counter 0.  The field list and the stuffing between header and
// payload are the paper's; the flags byte follows its DSS figure; the
// widths and the PCR format are the transport stream's, and the 54 MHz
// extension (0..599) is halved to the 27 MHz units that format expects.
//
// Payload bytes are read from the granted source with src_rd in the clock
// they are loaded; src_done goes with the last one.  The continuity
// counter lives outside this block (cc_sel, cc_inc, cc).
module dss_block #(
  parameter int unsigned N_SRC   = 11,
  parameter int unsigned N_CH    = 9,
  parameter int unsigned PCR_SRC = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  output logic [7:0]         byte_out,
  output logic               sop,
  output logic               arb_next,
  input  logic               gnt_valid,
  input  logic [3:0]         gnt_idx,
  input  mux_pkg::seg_info_t src_seg  [N_SRC],
  input  logic [7:0]         src_data [N_SRC],
  output logic [N_SRC-1:0]   src_rd,
  output logic [N_SRC-1:0]   src_done,
  input  logic [32:0]        stc_base,
  input  logic [9:0]         stc_ext,
  output logic [4:0]         cc_sel,
  output logic               cc_inc,
  input  logic [3:0]         cc
);
  import mux_pkg::*;

  logic [7:0]  pos;         // byte of the packet presented at the next load
  logic        lat;         // grant arrives: latch the packet description
  logic [4:0]  p_src;
  logic        p_null, p_pusi, p_af, p_pcr, p_idx;
  logic [7:0]  p_len, p_L, p_fidx;
  logic [12:0] p_pid;
  logic [47:0] pcr_snap;

  wire [7:0] pstart = 8'(PKT_BYTES) - p_len;    // first payload byte
  wire [7:0] fidx_pos = p_pcr ? 8'd12 : 8'd6;
  wire       in_pay = (pos >= pstart);

  assign sop      = (pos == 8'd0);
  assign arb_next = load && (pos == 8'd0);
  assign cc_sel   = p_src;
  assign cc_inc   = load && (pos == 8'd3) && !p_null;

  always_comb begin
    byte_out = 8'hFF;
    if (pos == 8'd0)      byte_out = SYNC_BYTE;
    else if (pos == 8'd1) byte_out = {1'b0, p_pusi, 1'b0, p_pid[12:8]};
    else if (pos == 8'd2) byte_out = p_pid[7:0];
    else if (pos == 8'd3) byte_out = {2'b00, p_af ? 2'b11 : 2'b01, p_null ? 4'd0 : cc};
    else if (in_pay)      byte_out = p_null ? 8'hFF : src_data[p_src[3:0]];
    else if (pos == 8'd4) byte_out = p_L;
    else if (pos == 8'd5) byte_out = {3'b000, p_pcr, 1'b0, p_idx, 2'b11};
    else if (p_pcr && pos >= 8'd6 && pos <= 8'd11)
      byte_out = pcr_snap[8'd47 - (pos - 8'd6) * 8'd8 -: 8];
    else if (p_idx && pos == fidx_pos)
      byte_out = p_fidx;
  end

  always_comb begin
    src_rd   = '0;
    src_done = '0;
    if (load && in_pay && !p_null && pos >= 8'd4) begin
      src_rd[p_src[3:0]] = 1'b1;
      if (pos == 8'(PKT_BYTES - 1)) src_done[p_src[3:0]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos      <= '0;
      lat      <= 1'b0;
      p_src    <= 5'(SRC_NULL);
      p_null   <= 1'b1;
      p_pusi   <= 1'b0;
      p_af     <= 1'b0;
      p_pcr    <= 1'b0;
      p_idx    <= 1'b0;
      p_len    <= 8'd184;
      p_L      <= '0;
      p_fidx   <= '0;
      p_pid    <= PID_NULL;
      pcr_snap <= '0;
    end else begin
      lat <= arb_next;
      if (load) pos <= (pos == 8'(PKT_BYTES - 1)) ? 8'd0 : pos + 1'b1;
      if (load && pos == 8'd5) pcr_snap <= {stc_base, 6'h3F, stc_ext[9:1]};
      if (lat) begin
        if (gnt_valid) begin
          seg_info_t s;
          logic      video;
          s        = src_seg[gnt_idx];
          video    = (32'(gnt_idx) < N_CH);
          p_src    <= 5'(gnt_idx);
          p_null   <= 1'b0;
          p_pid    <= src_pid(5'(gnt_idx));
          p_pusi   <= s.pusi;
          p_len    <= s.len;
          p_L      <= 8'd183 - s.len;
          p_af     <= video || (s.len < 8'd184);
          p_idx    <= video;
          p_pcr    <= video && (32'(gnt_idx) == PCR_SRC) && s.pcr;
          p_fidx   <= s.fidx;
        end else begin
          p_src    <= 5'(SRC_NULL);
          p_null   <= 1'b1;
          p_pid    <= PID_NULL;
          p_pusi   <= 1'b0;
          p_len    <= 8'd184;
          p_L      <= '0;
          p_af     <= 1'b0;
          p_idx    <= 1'b0;
          p_pcr    <= 1'b0;
          p_fidx   <= '0;
        end
      end
    end
  end

  // A video segment must leave room for the adaptation field it needs.
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (lat && gnt_valid && 32'(gnt_idx) < N_CH) |->
      (32'(src_seg[gnt_idx].len) + 2 + ((32'(gnt_idx) == PCR_SRC && src_seg[gnt_idx].pcr) ? 6 : 0) <= 183));
endmodule
