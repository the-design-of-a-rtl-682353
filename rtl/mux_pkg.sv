// mux_pkg: constants and types shared by the multiview multiplexer.
//
// The multiplexer merges nine video channels, a PAT and a PMT into one
// stream of 188-byte DSS packets (a transport-stream packet with a frame
// index added).  Sources are numbered at the packet arbiter as follows:
// 0..8 are the video channels (SPDU1..SPDU9), 9 is the PAT, 10 the PMT and
// 11 the NULL packet that the DSS packetizer makes by itself.  The PID
// values below are this design's choice; the paper leaves them to the
// user, except PAT 0x0000 and NULL 0x1FFF, which follow the transport
// stream convention.
package mux_pkg;

  localparam int N_CH      = 9;            // video channels
  localparam int N_SRC     = N_CH + 2;     // sources that request the arbiter
  localparam int SRC_PAT   = N_CH;
  localparam int SRC_PMT   = N_CH + 1;
  localparam int SRC_NULL  = N_CH + 2;

  localparam int PKT_BYTES = 188;          // DSS packet
  localparam logic [7:0] SYNC_BYTE = 8'h47;

  localparam logic [12:0] PID_PAT   = 13'h0000;
  localparam logic [12:0] PID_PMT   = 13'h0100;
  localparam logic [12:0] PID_CH0   = 13'h0101; // channel i uses PID_CH0 + i
  localparam logic [12:0] PID_NULL  = 13'h1FFF;

  // Description of one DSS payload segment offered by a source.
  typedef struct packed {
    logic [7:0] len;    // payload bytes, 1..184
    logic       pusi;   // segment starts an SPDU or a section
    logic [7:0] fidx;   // frame index of the SPDU it belongs to
    logic       pcr;    // a PCR is requested in this packet
  } seg_info_t;

  function automatic logic [12:0] src_pid(input logic [4:0] src);
    if (src == 5'(SRC_PAT))       return PID_PAT;
    else if (src == 5'(SRC_PMT))  return PID_PMT;
    else if (src >= 5'(SRC_NULL)) return PID_NULL;
    else                          return PID_CH0 + 13'(src);
  endfunction

endpackage
