// start_code_detector: the buffer controller of one SPDU channel.
//
// It watches the encoder's byte stream for the MPEG-2 start codes that open
// an access unit (AU): sequence header 00 00 01 B3, group of pictures
// 00 00 01 B8 and picture 00 00 01 00.  Every such code begins a new AU,
// which ends where the next one begins; the sequence end code 00 00 01 B7
// is not an AU start and travels as payload.  That the buffer controller
// finds AU starts and tells the header creation is the paper's; the
// code values are MPEG-2's and the delay line is this design's.
//
// Timing: bytes leave through a three-byte delay line, so that the first
// byte of a four-byte code can carry the out_au_start tag.  A byte appears
// on out_* in the cycle the third byte after it arrives on in_*; the last
// three bytes of a stream wait for the next byte.
module start_code_detector (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       out_valid,
  output logic [7:0] out_data,
  output logic       out_au_start
);
  logic [7:0] d0, d1, d2;  // d2 is the oldest byte held
  logic [1:0] fill;

  wire is_au_code = (in_data == 8'hB3) || (in_data == 8'hB8) || (in_data == 8'h00);

  assign out_valid    = in_valid && (fill == 2'd3);
  assign out_data     = d2;
  assign out_au_start = (d2 == 8'h00) && (d1 == 8'h00) && (d0 == 8'h01) && is_au_code;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fill <= '0;
      d0   <= '0;
      d1   <= '0;
      d2   <= '0;
    end else if (in_valid) begin
      d0 <= in_data;
      d1 <= d0;
      d2 <= d1;
      if (fill != 2'd3) fill <= fill + 1'b1;
    end
  end
endmodule
