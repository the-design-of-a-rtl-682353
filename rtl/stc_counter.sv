// stc_counter: system time clock of the multiplexer (PCR counter and
// PTS/DTS counter).
//
// A 10-bit extension counter runs through 0..EXT_MOD-1 on every 54 MHz
// clock; each time it wraps it advances a 33-bit base counter, which thus
// counts at 54 MHz / 600 = 90 kHz.  The base is the time stamp written into
// PTS and DTS fields; base and extension together form the PCR.  Both
// counters and the 1/600 division follow the paper; the reset value of
// zero is this design's choice.  Outputs are registered and change one
// clock after the edge that counts.
module stc_counter #(
  parameter int unsigned EXT_MOD = 600,
  parameter int unsigned BASE_W  = 33
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [BASE_W-1:0] base,
  output logic [9:0]        ext
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ext  <= '0;
      base <= '0;
    end else if (ext == 10'(EXT_MOD - 1)) begin
      ext  <= '0;
      base <= base + 1'b1;
    end else begin
      ext  <= ext + 1'b1;
    end
  end
endmodule
