// pat_section: Program Association Table generator.
//
// The multiplex carries one program, so the PAT has a single loop entry
// that maps the program number to the PID of the PMT.  Every PERIOD clocks
// (0.3 s at 54 MHz) the section becomes pending and req asks the arbiter
// for a DSS packet.  When granted, the DSS reads the payload byte by byte:
// a pointer field 0x00, then the section, whose bytes pass through the
// CRC32 block on their way out, then the four CRC bytes.  Field widths
// follow the paper's PAT figure; table_id, version, the pointer field
// and the identifier values are standard or this design's choices.
//
//   table_id 8 | syntax 1 | '0' | '11' | section_length 12 | ts_id 16 |
//   '11' | version 5 | current_next 1 | section 8 | last_section 8 |
//   program_number 16 | '111' | program_map_PID 13 | CRC32 32
//
// Interface: as a second SPDU step: req, seg (17 bytes, PUSI set), rd
// takes one byte (rd_data is that byte), seg_done ends the section.  The
// first PAT is pending right after reset.
module pat_section #(
  parameter int unsigned PERIOD   = 16_200_000,
  parameter logic [15:0] TS_ID    = 16'h0001,
  parameter logic [15:0] PROG_NUM = 16'h0001,
  parameter logic [12:0] PMT_PID  = 13'h0100,
  parameter logic [4:0]  VERSION  = 5'd0
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               req,
  output mux_pkg::seg_info_t seg,
  input  logic               rd,
  output logic [7:0]         rd_data,
  input  logic               seg_done
);
  localparam int LEN    = 17;              // pointer + 12 section bytes + CRC
  localparam logic [11:0] SEC_LEN = 12'd13;

  localparam int TW = $clog2(LEN - 4);

  logic [31:0] timer;
  logic        pending;
  logic [7:0]  idx;
  logic [31:0] crc;
  logic [7:0]  tbl [LEN-4];

  always_comb begin
    tbl[0]  = 8'h00;                         // pointer_field
    tbl[1]  = 8'h00;                         // table_id
    tbl[2]  = {1'b1, 1'b0, 2'b11, SEC_LEN[11:8]};
    tbl[3]  = SEC_LEN[7:0];
    tbl[4]  = TS_ID[15:8];
    tbl[5]  = TS_ID[7:0];
    tbl[6]  = {2'b11, VERSION, 1'b1};
    tbl[7]  = 8'h00;                         // section_number
    tbl[8]  = 8'h00;                         // last_section_number
    tbl[9]  = PROG_NUM[15:8];
    tbl[10] = PROG_NUM[7:0];
    tbl[11] = {3'b111, PMT_PID[12:8]};
    tbl[12] = PMT_PID[7:0];
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
