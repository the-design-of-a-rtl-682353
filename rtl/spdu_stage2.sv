// spdu_stage2: second SPDU step of one source.
//
// Between the byte-wide SPDU channel and the DSS packetizer each source
// has an input byte register, a FIFO and an output byte register (across
// the twelve sources these are the paper's twelve registers in front of
// and twelve behind the buffers).  While bytes enter, the stage cuts the
// SPDU stream into DSS payload segments: a segment closes when it holds
// SEG_MAX bytes or when the next SPDU begins, so every SPDU starts a fresh
// DSS packet.  A closed segment is described by a seg_info_t (length,
// payload-unit-start, frame index, PCR request) kept in a small info FIFO,
// and req tells the arbitration controller that a complete segment waits.
// The request rule is the paper's; the segment rule, SEG_MAX and the
// FIFO depths are this design's choices.
//
// Interface: valid/ready input; in_sop/in_fidx/in_pcr qualify in_data.
// The DSS reads the head segment with rd (one byte per pulse, rd_data is
// the byte taken) and pulses seg_done with or after the last rd.  rd pulses
// must be at least two clocks apart; the output register refills one
// clock after a read.
module spdu_stage2 #(
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned SEG_MAX = 181,
  parameter int unsigned IDEPTH  = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [7:0]          in_data,
  input  logic                in_sop,
  input  logic [7:0]          in_fidx,
  input  logic                in_pcr,
  output logic                req,
  output mux_pkg::seg_info_t  seg,
  input  logic                rd,
  output logic [7:0]          rd_data,
  input  logic                seg_done
);
  import mux_pkg::*;

  // front register
  logic       r_valid, r_sop, r_pcr;
  logic [7:0] r_data, r_fidx;

  // open segment being filled
  logic [7:0] open_len, open_fidx;
  logic       open_pusi, open_pcr;

  logic [7:0] d_dout;
  logic       d_empty, d_full, d_pop;
  logic [$clog2(DEPTH+1)-1:0] d_count;

  seg_info_t  i_din, i_dout;
  logic       i_push, i_empty, i_full;
  logic [$clog2(IDEPTH+1)-1:0] i_count;

  // behind register
  logic       o_valid;
  logic [7:0] o_data;

  assign in_ready = (32'(d_count) + 2 < DEPTH) && (32'(i_count) + 2 < IDEPTH);

  sync_fifo #(.W(8), .DEPTH(DEPTH)) u_data (
    .clk, .rst_n, .push(r_valid), .din(r_data), .pop(d_pop),
    .dout(d_dout), .empty(d_empty), .full(d_full), .count(d_count)
  );

  sync_fifo #(.W($bits(seg_info_t)), .DEPTH(IDEPTH)) u_info (
    .clk, .rst_n, .push(i_push), .din(i_din), .pop(seg_done),
    .dout(i_dout), .empty(i_empty), .full(i_full), .count(i_count)
  );

  assign req     = !i_empty;
  assign seg     = i_dout;
  assign rd_data = o_data;
  assign d_pop   = (!o_valid || rd) && !d_empty;

  // segment closing
  always_comb begin
    i_push = 1'b0;
    i_din  = '{len: open_len, pusi: open_pusi, fidx: open_fidx, pcr: open_pcr};
    if (r_valid) begin
      if (r_sop && open_len != '0) begin
        i_push = 1'b1;
      end else if (32'(open_len) + 1 == SEG_MAX) begin
        i_push = 1'b1;
        i_din  = '{len: 8'(SEG_MAX), pusi: open_pusi || r_sop,
                   fidx: r_sop ? r_fidx : open_fidx, pcr: r_sop ? r_pcr : open_pcr};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_valid   <= 1'b0;
      r_sop     <= 1'b0;
      r_pcr     <= 1'b0;
      r_data    <= '0;
      r_fidx    <= '0;
      open_len  <= '0;
      open_fidx <= '0;
      open_pusi <= 1'b0;
      open_pcr  <= 1'b0;
      o_valid   <= 1'b0;
      o_data    <= '0;
    end else begin
      r_valid <= in_valid && in_ready;
      r_data  <= in_data;
      r_sop   <= in_sop;
      r_fidx  <= in_fidx;
      r_pcr   <= in_pcr;

      if (r_valid) begin
        if (r_sop) begin
          open_len  <= 8'd1;
          open_pusi <= 1'b1;
          open_fidx <= r_fidx;
          open_pcr  <= r_pcr;
        end else begin
          open_len <= open_len + 1'b1;
        end
        if (i_push && !(r_sop && open_len != '0)) begin
          // closed at SEG_MAX: the next segment continues the same SPDU
          open_len  <= '0;
          open_pusi <= 1'b0;
          open_pcr  <= 1'b0;
          if (r_sop) open_fidx <= r_fidx;
        end
      end

      if (d_pop) begin
        o_valid <= 1'b1;
        o_data  <= d_dout;
      end else if (rd) begin
        o_valid <= 1'b0;
      end
    end
  end

  a_rd_valid: assert property (@(posedge clk) disable iff (!rst_n) rd |-> o_valid);
  a_no_drop:  assert property (@(posedge clk) disable iff (!rst_n) r_valid |-> !d_full);
endmodule
