// crc32: CRC-32 of the PSI sections (PAT and PMT).
//
// The checksum of the transport stream standard: generator polynomial
// 0x04C11DB7, the 32 registers preset to ones, data shifted in MSB first,
// no final inversion.  A decoder that runs a whole section including its
// CRC through the same registers ends with all of them at zero.  The
// paper draws the register chain bit-serially (Z(0)..Z(31) with XORs
// in the feedback); here one byte is absorbed per clock by applying that
// one-bit step eight times in combinational logic.
//
// init (priority over en) presets the registers; en absorbs din.  crc is
// the register content, valid the clock after the last byte.
module crc32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  din,
  output logic [31:0] crc
);
  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  function automatic logic [31:0] step8(input logic [31:0] c, input logic [7:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 7; i >= 0; i--) begin
      if (r[31] ^ d[i]) r = {r[30:0], 1'b0} ^ POLY;
      else              r = {r[30:0], 1'b0};
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || init) crc <= '1;
    else if (en)        crc <= step8(crc, din);
  end
endmodule
