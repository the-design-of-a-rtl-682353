// serial_out: output interface of the multiplexer.
//
// The interior produces one DSS byte per 8 clocks (6.75 MHz); the output
// sends one bit per 54 MHz clock.  This shift register takes a byte every
// eighth clock (load is high in the cycle it takes byte_in and sop_in) and
// shifts it out MSB first.  sop_out is high with the first bit of a byte
// that was marked sop_in, i.e. the first bit of each DSS packet.  The 8:1
// rate relation is the paper's; MSB-first order is this design's choice.
// After reset the first load happens in the first clock.
module serial_out (
  input  logic       clk,
  input  logic       rst_n,
  output logic       load,
  input  logic [7:0] byte_in,
  input  logic       sop_in,
  output logic       bit_out,
  output logic       sop_out
);
  logic [2:0] cnt;
  logic [7:0] sr;
  logic       sop_q;

  assign load    = (cnt == 3'd0);
  assign bit_out = sr[7];
  assign sop_out = sop_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      sr    <= '0;
      sop_q <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (load) begin
        sr    <= byte_in;
        sop_q <= sop_in;
      end else begin
        sr    <= {sr[6:0], 1'b0};
        sop_q <= 1'b0;
      end
    end
  end
endmodule
