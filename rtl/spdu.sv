// spdu: one SPDU channel, the first SPDU step.
//
// The encoder's byte stream enters the buffer controller (start-code
// detector), which tags the first byte of every access-unit start code,
// and then the SPDU buffer.  The header FSM reads the buffer and puts an
// SPDU header in front of every access unit; the SPDU mux then passes the
// payload.  PTS/DTS/PCR enables come from the encoder, the time stamps from
// the shared STC counter.  This structure is the paper's; the buffer
// depth and the overflow rule (a byte arriving at a full buffer is dropped
// and sets the sticky overflow flag) are this design's choices.
//
// Interface: in_valid/in_data one byte per strobe, at most one per clock;
// out_* is a valid/ready byte stream with out_sop on the first header
// byte and frame_index/pcr_req valid while that SPDU is sent.  A byte
// reaches the buffer three input bytes after it arrived.
module spdu #(
  parameter int unsigned BUF_DEPTH = 32,
  parameter logic [6:0]  PKT_ID    = 7'd1,
  parameter bit          REF_FLAG  = 1'b1,
  parameter bit          MASTER    = 1'b0,
  parameter logic [6:0]  REF_ID    = 7'd2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  input  logic        pts_en,
  input  logic        dts_en,
  input  logic        pcr_en,
  input  logic [32:0] stc_base,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic        out_sop,
  output logic [7:0]  frame_index,
  output logic        pcr_req,
  output logic        overflow
);
  logic       d_valid, d_tag;
  logic [7:0] d_data;
  logic [8:0] b_dout;
  logic       b_empty, b_full, b_pop;
  logic [$clog2(BUF_DEPTH+1)-1:0] b_count;

  start_code_detector u_ctrl (
    .clk, .rst_n, .in_valid, .in_data,
    .out_valid(d_valid), .out_data(d_data), .out_au_start(d_tag)
  );

  sync_fifo #(.W(9), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push(d_valid), .din({d_tag, d_data}), .pop(b_pop),
    .dout(b_dout), .empty(b_empty), .full(b_full), .count(b_count)
  );

  spdu_header #(.PKT_ID(PKT_ID), .REF_FLAG(REF_FLAG), .MASTER(MASTER), .REF_ID(REF_ID)) u_hdr (
    .clk, .rst_n, .buf_dout(b_dout), .buf_empty(b_empty), .buf_pop(b_pop),
    .pts_en, .dts_en, .pcr_en, .stc_base,
    .out_valid, .out_ready, .out_data, .out_sop, .frame_index, .pcr_req
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                 overflow <= 1'b0;
    else if (d_valid && b_full) overflow <= 1'b1;
  end
endmodule
