// continuity_counter: one 4-bit continuity counter per DSS source.
//
// sel names the source of the packet being built (5 bits, as drawn in the
// paper's DSS figure); cc shows that source's current count, which goes
// into the packet header.  inc advances the selected counter modulo 16 once
// the packet is under way.  The paper places this counter outside the
// DSS header packetizer; which sources count is this design's choice (the
// caller does not pulse inc for NULL packets).
module continuity_counter #(
  parameter int unsigned N = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [4:0] sel,
  input  logic       inc,
  output logic [3:0] cc
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [3:0]    cnt [N];
  logic [IW-1:0] idx;

  assign idx = sel[IW-1:0];

  assign cc = (32'(sel) < N) ? cnt[idx] : 4'd0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else if (inc && (32'(sel) < N)) begin
      cnt[idx] <= cnt[idx] + 1'b1;
    end
  end
endmodule
