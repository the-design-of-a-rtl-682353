// pmt_section: Program Map Table generator.
//
// The one program of the multiplex has nine elementary streams, the nine
// camera views; the PMT lists each with its stream type and PID, and names
// the PID that carries the PCR (the fifth channel).  Every PERIOD clocks
// (0.3 s at 54 MHz) the section becomes pending and req asks the arbiter
// for a DSS packet; the DSS then reads a pointer field 0x00, the section
// (through the CRC32 block) and the four CRC bytes.  Field widths follow the
// paper's PMT figure; the stream_type width and value, the pointer field
// and the identifier values are standard or this design's choices.
//
//   table_id 8 | syntax 1 | '0' | '11' | section_length 12 | program 16 |
//   '11' | version 5 | current_next 1 | section 8 | last_section 8 |
//   '111' | PCR_PID 13 | '1111' | program_info_length 12 |
//   N_CH x { stream_type 8 | '111' | elementary_PID 13 | '1111' |
//            ES_info_length 12 } | CRC32 32
//
// Interface: as pat_section; the payload is 5 * N_CH + 17 bytes.
module pmt_section #(
  parameter int unsigned PERIOD      = 16_200_000,
  parameter int unsigned N_CH        = 9,
  parameter logic [15:0] PROG_NUM    = 16'h0001,
  parameter logic [12:0] PCR_PID     = 13'h0105,
  parameter logic [12:0] ES_PID0     = 13'h0101,
  parameter logic [7:0]  STREAM_TYPE = 8'h02,
  parameter logic [4:0]  VERSION     = 5'd0
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               req,
  output mux_pkg::seg_info_t seg,
  input  logic               rd,
  output logic [7:0]         rd_data,
  input  logic               seg_done
);
  localparam int LEN = 5 * N_CH + 17;
  localparam logic [11:0] SEC_LEN = 12'(5 * N_CH + 13);

  localparam int TW = $clog2(LEN - 4);

  logic [31:0] timer;
  logic        pending;
  logic [7:0]  idx;
  logic [31:0] crc;
  logic [7:0]  tbl [LEN-4];

  always_comb begin
    tbl[0]  = 8'h00;                         // pointer_field
    tbl[1]  = 8'h02;                         // table_id
    tbl[2]  = {1'b1, 1'b0, 2'b11, SEC_LEN[11:8]};
    tbl[3]  = SEC_LEN[7:0];
    tbl[4]  = PROG_NUM[15:8];
    tbl[5]  = PROG_NUM[7:0];
    tbl[6]  = {2'b11, VERSION, 1'b1};
    tbl[7]  = 8'h00;
    tbl[8]  = 8'h00;
    tbl[9]  = {3'b111, PCR_PID[12:8]};
    tbl[10] = PCR_PID[7:0];
    tbl[11] = 8'hF0;                         // '1111', program_info_length = 0
    tbl[12] = 8'h00;
    for (int i = 0; i < int'(N_CH); i++) begin
      logic [12:0] pid;
      pid = ES_PID0 + 13'(i);
      tbl[13 + 5*i] = STREAM_TYPE;
      tbl[14 + 5*i] = {3'b111, pid[12:8]};
      tbl[15 + 5*i] = pid[7:0];
      tbl[16 + 5*i] = 8'hF0;                 // '1111', ES_info_length = 0
      tbl[17 + 5*i] = 8'h00;
    end
  end

  always_comb begin
    if (32'(idx) < LEN - 4) rd_data = tbl[idx[TW-1:0]];
    else case (32'(idx) - (LEN - 4))
      0:       rd_data = crc[31:24];
      1:       rd_data = crc[23:16];
      2:       rd_data = crc[15:8];
      default: rd_data = crc[7:0];
    endcase
  end

  assign req = pending;
  assign seg = '{len: 8'(LEN), pusi: 1'b1, fidx: 8'h00, pcr: 1'b0};

  crc32 u_crc (
    .clk, .rst_n, .init(seg_done),
    .en(rd && idx != 8'd0 && 32'(idx) < LEN - 4), .din(rd_data), .crc
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer   <= '0;
      pending <= 1'b1;
      idx     <= '0;
    end else begin
      if (timer == PERIOD - 1) timer <= '0;
      else                     timer <= timer + 1'b1;
      if (seg_done) begin
        pending <= 1'b0;
        idx     <= '0;
      end else if (rd) begin
        idx <= idx + 1'b1;
      end
      if (timer == PERIOD - 1) pending <= 1'b1;
    end
  end
endmodule
