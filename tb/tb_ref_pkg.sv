// tb_ref_pkg: reference models shared by the testbenches.
//
// spdu_hdr builds the expected SPDU header bytes from the field list of the
// SPDU syntax; crc32_ref is a bit-at-a-time CRC-32 (polynomial 0x04C11DB7,
// preset to ones, MSB first), written as a plain long division so that it
// does not share code with the design.
package tb_ref_pkg;

  typedef byte unsigned bq_t[$];

  function automatic void put_ts(ref bq_t q, input bit [3:0] pfx, input bit [32:0] t);
    bit [39:0] f;
    f = {pfx, t[32:30], 1'b1, t[29:15], 1'b1, t[14:0], 1'b1};
    for (int i = 4; i >= 0; i--) q.push_back(f[i*8 +: 8]);
  endfunction

  function automatic bq_t spdu_hdr(input int pkt_id, input bit ref_flag, input bit master,
                                   input int ref_id, input bit pts, input bit dts,
                                   input bit [32:0] ts, input int fidx);
    bq_t q;
    int  n;
    q = {8'h00, 8'h00, 8'h00, 8'h01};
    q.push_back(8'h80 | pkt_id[6:0]);
    q.push_back(0);
    q.push_back(0);
    q.push_back({4'b0000, 1'b1, ref_flag, pts, pts && dts});
    n = 1 + (ref_flag ? 1 : 0) + (pts ? 5 : 0) + ((pts && dts) ? 5 : 0);
    q.push_back(n[7:0]);
    q.push_back(fidx[7:0]);
    if (ref_flag) q.push_back({master, ref_id[6:0]});
    if (pts) put_ts(q, dts ? 4'b0011 : 4'b0010, ts);
    if (pts && dts) put_ts(q, 4'b0001, ts);
    return q;
  endfunction

  function automatic bit [31:0] crc32_ref(input bq_t q, input int from, input int upto);
    bit [31:0] c;
    c = '1;
    for (int i = from; i < upto; i++)
      for (int b = 7; b >= 0; b--) begin
        bit fb;
        fb = c[31] ^ q[i][b];
        c  = c << 1;
        if (fb) c = c ^ 32'h04C11DB7;
      end
    return c;
  endfunction

endpackage
