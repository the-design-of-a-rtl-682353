// tb_workload_rates: the multiplexer under the traffic it is sized for.
//
// All nine encoders send at a constant bit rate (bytes paced by a
// fractional accumulator on the 54 MHz clock), in access units of 1.5 to
// 2.5 kbytes.  Two runs, each from reset, with the design at its defaults:
//
//   5 Mb/s per view (45 Mb/s in all): must fit.  No overflow may occur,
//     and every byte sent must come out on its channel's PID, inside SPDUs
//     (checked by size and by the SPDU start prefix at every packet that
//     starts a unit).
//   6 Mb/s per view (54 Mb/s, the paper's maximum): the 54 Mb/s output
//     cannot also carry packet headers, so the buffers must eventually
//     overflow; the test checks that they do and reports when.  It comes
//     within a few milliseconds: a channel already holds about one round
//     of packet slots' worth of input plus a part-filled segment, so the
//     512-byte second-step buffer has little room for any deficit.
module tb_workload_rates;
  import tb_ref_pkg::*;
  localparam int NCH = 9;
  localparam longint CLK_HZ = 54_000_000;

  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] vid_valid = 0, pts_en = 0, dts_en = 0, pcr_en = 0;
  logic [NCH-1:0][7:0] vid_data = 0;
  logic ts_bit, ts_sop;
  logic [NCH-1:0] overflow;

  int checks = 0, failures = 0;
  longint sent[NCH], recv[NCH], exp_bytes[NCH];
  longint rate_bps = 0;
  bit     run = 0;
  longint cyc = 0, first_ovf = -1;
  int     n_null = 0;

  mux_top dut (.clk, .rst_n, .vid_valid, .vid_data, .pts_en, .dts_en, .pcr_en,
               .ts_bit, .ts_sop, .overflow);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ output side
  byte unsigned pkt[$];
  logic [7:0] sh;
  int nb = -1;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (overflow != 0 && first_ovf < 0) first_ovf = cyc;
    if (ts_sop) begin pkt = {}; nb = 0; end
    if (nb >= 0) begin
      sh = {sh[6:0], ts_bit};
      if (++nb == 8) begin
        pkt.push_back(sh);
        nb = 0;
        if (pkt.size() == 188) begin
          take(pkt);
          nb = -1;
        end
      end
    end
  end

  function automatic void take(bq_t p);
    int pid, at;
    pid = {p[1][4:0], p[2]};
    if (pid == 13'h1FFF) begin n_null++; return; end
    if (pid < 13'h101 || pid > 13'h109) return;
    at = p[3][5] ? 5 + p[4] : 4;
    if (p[1][6]) begin
      checks++;
      if (p[at] != 0 || p[at+1] != 0 || p[at+2] != 0 || p[at+3] != 1) begin
        failures++; $display("PID %h: unit does not start with an SPDU header", pid);
      end
    end
    recv[pid - 13'h101] += 188 - at;
  endfunction

  // ------------------------------------------------------------- input side
  task automatic encoder(input int ch, input longint nbytes);
    longint acc = 0, n = 0;
    int k = 0;
    byte unsigned codes[3] = '{8'hB3, 8'hB8, 8'h00};
    while (run) begin
      bq_t body;
      bit p;
      p = $urandom % 2;
      body = {8'h00, 8'h00, 8'h01, codes[k % 3]};
      repeat (1500 + $urandom % 1000) body.push_back(8'($urandom % 250 + 2));
      if (n + body.size() > nbytes) body = {8'h00, 8'h00, 8'h01, 8'h00, 8'h22};  // closes the last unit
      foreach (body[i]) begin
        // wait for the byte's turn at the channel's bit rate
        do begin
          @(negedge clk);
          vid_valid[ch] = 0; pts_en[ch] = 0; dts_en[ch] = 0;
          acc += rate_bps;
        end while (acc < 8 * CLK_HZ);
        acc -= 8 * CLK_HZ;
        vid_valid[ch] = 1; vid_data[ch] = body[i];
        pts_en[ch] = (i == 0) && p; dts_en[ch] = (i == 0) && p;
      end
      @(negedge clk) vid_valid[ch] = 0;
      if (body.size() == 5) break;
      // bytes of a complete unit, with its header (PTS+DTS or none)
      exp_bytes[ch] += body.size() + 11 + (p ? 10 : 0);
      sent[ch] += body.size();
      n += body.size();
      k++;
    end
  endtask

  task automatic one_run(input longint bps, input longint nbytes, input bit must_fit);
    rst_n = 0;
    foreach (sent[i]) begin sent[i] = 0; recv[i] = 0; exp_bytes[i] = 0; end
    first_ovf = -1; n_null = 0; cyc = 0;
    rate_bps = bps;
    repeat (4) @(posedge clk);
    rst_n = 1;
    run = 1;
    for (int i = 0; i < NCH; i++) begin
      automatic int ch = i;
      fork encoder(ch, nbytes); join_none
    end
    wait fork;
    run = 0;
    if (must_fit) begin
      // let the buffers drain
      for (int i = 0; i < NCH; i++) while (recv[i] < exp_bytes[i] && cyc < 4_000_000) @(posedge clk);
      repeat (20 * 1504) @(posedge clk);
      for (int i = 0; i < NCH; i++) begin
        checks++;
        // the closing unit's header and first byte may also have left
        if (recv[i] < exp_bytes[i] || recv[i] > exp_bytes[i] + 22) begin
          failures++;
          $display("%0d b/s ch %0d: received %0d payload bytes, expected %0d", bps, i, recv[i], exp_bytes[i]);
        end
      end
      checks++;
      if (overflow != 0) begin failures++; $display("%0d b/s: overflow %b", bps, overflow); end
      $display("%0d b/s per view: %0d bytes per view delivered in %0d clocks, %0d NULL packets, no overflow",
               bps, exp_bytes[0], cyc, n_null);
    end else begin
      checks++;
      if (first_ovf < 0) begin failures++; $display("%0d b/s: no overflow", bps); end
      else $display("%0d b/s per view: first overflow after %0d clocks (%0d ms)", bps, first_ovf,
                    first_ovf * 1000 / CLK_HZ);
    end
  endtask

  initial begin
    one_run(5_000_000, 12_000, 1);
    one_run(6_000_000, 80_000, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
