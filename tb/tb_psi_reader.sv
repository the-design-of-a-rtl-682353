// tb_psi_reader: testbench helper that plays the DSS side of a PSI source.
// It waits for req, then takes seg.len bytes with one rd pulse every
// eight clocks (the DSS byte rate), pulses seg_done with the last one and
// returns the bytes in got.  It also records the clock count at which req
// rose, for the repetition-period check.
module tb_psi_reader (
  input  logic               clk,
  input  logic               req,
  input  mux_pkg::seg_info_t seg,
  output logic               rd,
  output logic               seg_done,
  input  logic [7:0]         rd_data
);
  byte unsigned got[$];
  longint cyc = 0;
  longint req_rise[$];
  logic req_q = 0;

  initial begin rd = 0; seg_done = 0; end

  always @(posedge clk) begin
    cyc++;
    if (req && !req_q) req_rise.push_back(cyc);
    req_q <= req;
  end

  task automatic read_section();
    int n;
    got = {};
    while (!req) @(negedge clk);
    n = seg.len;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rd = 1;
      seg_done = (i == n - 1);
      #1 got.push_back(rd_data);
      @(negedge clk);
      rd = 0; seg_done = 0;
      repeat (6) @(negedge clk);
    end
  endtask
endmodule
