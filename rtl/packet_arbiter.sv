// packet_arbiter: SPDU packet arbitration.
//
// Each source (nine SPDU channels, PAT, PMT) raises req when it holds a
// complete DSS payload.  When the DSS starts a packet it pulses next; at
// that edge the arbiter grants one requesting source and holds the grant
// for the whole packet, so the others wait their turn.  With no request,
// gnt_valid is low and the DSS sends a NULL packet.  That one stream is
// served per packet while the rest wait is the paper's; the round-robin
// order (search starts after the last granted source) is this design's.
//
// Timing: gnt, gnt_valid and gnt_idx are registered and valid from the
// clock after next until the following next.
module packet_arbiter #(
  parameter int unsigned N_SRC = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] req,
  input  logic             next,
  output logic [N_SRC-1:0] gnt,
  output logic             gnt_valid,
  output logic [3:0]       gnt_idx
);
  logic [3:0] last;
  logic [3:0] pick;
  logic       any;

  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int k = 1; k <= int'(N_SRC); k++) begin
      int j;
      j = (int'(last) + k) % int'(N_SRC);
      if (!any && req[j]) begin
        pick = 4'(j);
        any  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last      <= 4'(N_SRC - 1);
      gnt_valid <= 1'b0;
      gnt_idx   <= '0;
      gnt       <= '0;
    end else if (next) begin
      gnt_valid <= any;
      gnt_idx   <= pick;
      gnt       <= any ? (N_SRC'(1) << pick) : '0;
      if (any) last <= pick;
    end
  end

  // The grant is one-hot and points at a source that asked for it.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n)
                             gnt_valid |-> (gnt == (N_SRC'(1) << gnt_idx)));
endmodule
