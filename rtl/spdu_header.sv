// spdu_header: SPDU header creation FSM and SPDU mux of one channel.
//
// The SPDU buffer holds the encoder's bytes, each tagged when it is the
// first byte of an access-unit start code.  When such a byte reaches the
// head of the buffer the FSM first sends a header and then lets the mux
// pass the buffered payload until the next tagged byte.  The header layout
// follows the paper's SPDU syntax:
//
//   byte 0..3   packet start code prefix (START_PREFIX)
//   byte 4      {1'b1, packet_id[6:0]}
//   byte 5..6   SPDU packet length, always 0 (the packet ends at the next AU)
//   byte 7      {scrambling 2'b00, priority 0, copyright 0,
//                multi-view info flag 1, ref_flag, PTS_DTS_flag[1:0]}
//   byte 8      SPDU header data length (bytes that follow)
//   byte 9      frame_index (counts headers modulo 256)
//   [1 byte]    {master_or_slave, ref_packet_id[6:0]}   when REF_FLAG
//   [5 bytes]   PTS  {prefix 4, ts[32:30], 1, ts[29:15], 1, ts[14:0], 1}
//   [5 bytes]   DTS  same layout, prefix 4'b0001
//
// PTS and DTS both carry the 33-bit STC base at the moment the header
// starts; a PTS is sent when pts_en was seen since the last header, a DTS
// when dts_en was seen as well.  pcr_en is remembered the same way and
// reported on pcr_req with the SPDU, for the DSS to insert a PCR.  The
// prefix value, the bit after it, the sticky enables, the frame-index rule
// and dropping bytes that precede the first AU are this design's choices.
//
// Interface: valid/ready byte stream on out_*; out_sop marks the first
// header byte; frame_index and pcr_req hold for the SPDU being sent.
module spdu_header #(
  parameter logic [6:0]  PKT_ID       = 7'd1,
  parameter bit          REF_FLAG     = 1'b1,
  parameter bit          MASTER       = 1'b0,
  parameter logic [6:0]  REF_ID       = 7'd2,
  parameter logic [31:0] START_PREFIX = 32'h0000_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [8:0]  buf_dout,    // {au_start, byte}
  input  logic        buf_empty,
  output logic        buf_pop,
  input  logic        pts_en,
  input  logic        dts_en,
  input  logic        pcr_en,
  input  logic [32:0] stc_base,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_sop,
  output logic [7:0]  frame_index,
  output logic        pcr_req
);
  typedef enum logic [1:0] {S_DROP, S_HDR, S_PAY} state_t;
  state_t state;

  localparam int MAX_HDR = 21;

  logic        pts_s, dts_s, pcr_s;     // enables seen since last header
  logic        pts_f, dts_f;            // enables of the header being sent
  logic [32:0] ts;
  logic [7:0]  fidx_cnt;
  logic [4:0]  k;                       // header byte index
  logic        first_pay;               // head byte is the AU start just announced
  logic [7:0]  hdr [MAX_HDR];
  logic [4:0]  hlen;

  wire head_tag = !buf_empty && buf_dout[8];
  wire start_hdr = head_tag && (state == S_DROP || (state == S_PAY && !first_pay));

  function automatic void put_ts(ref logic [7:0] h [MAX_HDR], input int at,
                                 input logic [3:0] pfx, input logic [32:0] t);
    h[at]   = {pfx, t[32:30], 1'b1};
    h[at+1] = t[29:22];
    h[at+2] = {t[21:15], 1'b1};
    h[at+3] = t[14:7];
    h[at+4] = {t[6:0], 1'b1};
  endfunction

  always_comb begin
    int n;
    for (int i = 0; i < MAX_HDR; i++) hdr[i] = 8'hFF;
    hdr[0] = START_PREFIX[31:24];
    hdr[1] = START_PREFIX[23:16];
    hdr[2] = START_PREFIX[15:8];
    hdr[3] = START_PREFIX[7:0];
    hdr[4] = {1'b1, PKT_ID};
    hdr[5] = 8'h00;
    hdr[6] = 8'h00;
    hdr[7] = {2'b00, 1'b0, 1'b0, 1'b1, REF_FLAG, pts_f, pts_f & dts_f};
    hdr[9] = frame_index;
    n = 10;
    if (REF_FLAG) begin
      hdr[n] = {MASTER, REF_ID};
      n++;
    end
    if (pts_f) begin
      put_ts(hdr, n, dts_f ? 4'b0011 : 4'b0010, ts);
      n += 5;
      if (dts_f) begin
        put_ts(hdr, n, 4'b0001, ts);
        n += 5;
      end
    end
    hdr[8] = 8'(n - 9);
    hlen   = 5'(n);
  end

  always_comb begin
    out_valid = 1'b0;
    out_data  = buf_dout[7:0];
    out_sop   = 1'b0;
    buf_pop   = 1'b0;
    case (state)
      S_DROP: buf_pop = !buf_empty && !buf_dout[8];
      S_HDR: begin
        out_valid = 1'b1;
        out_data  = hdr[k];
        out_sop   = (k == '0);
      end
      S_PAY: begin
        out_valid = !buf_empty && !start_hdr;
        buf_pop   = out_valid && out_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_DROP;
      pts_s       <= 1'b0;
      dts_s       <= 1'b0;
      pcr_s       <= 1'b0;
      pts_f       <= 1'b0;
      dts_f       <= 1'b0;
      pcr_req     <= 1'b0;
      ts          <= '0;
      fidx_cnt    <= '0;
      frame_index <= '0;
      k           <= '0;
      first_pay   <= 1'b0;
    end else begin
      pts_s <= (pts_s && !start_hdr) || pts_en;
      dts_s <= (dts_s && !start_hdr) || dts_en;
      pcr_s <= (pcr_s && !start_hdr) || pcr_en;
      if (start_hdr) begin
        state       <= S_HDR;
        k           <= '0;
        pts_f       <= pts_s;
        dts_f       <= dts_s;
        pcr_req     <= pcr_s;
        ts          <= stc_base;
        frame_index <= fidx_cnt;
        fidx_cnt    <= fidx_cnt + 1'b1;
      end else begin
        case (state)
          S_HDR: if (out_ready) begin
            if (k == hlen - 1'b1) begin
              state     <= S_PAY;
              first_pay <= 1'b1;
            end
            k <= k + 1'b1;
          end
          S_PAY: if (buf_pop) first_pay <= 1'b0;
          default: ;
        endcase
      end
    end
  end
endmodule
