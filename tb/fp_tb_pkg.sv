// fp_tb_pkg: packet construction helpers shared by the FlexPipe testbenches.
//
// Packets are Ethernet II / IPv4 / UDP frames. The first 64-byte beat holds
// the headers (IPv4 total length = size - 14, the 5-tuple at the usual
// offsets); bytes 56..63 of the first beat are zero and serve as a trace field
// that the offload unit model shifts its offload id into, so a receiver can
// read back which offloads processed a packet and in which order. All other
// payload bytes are a function of a packet tag and the beat index, so a
// receiver can recompute them.
package fp_tb_pkg;
  import flexpipe_pkg::*;

  function automatic logic [DATA_W-1:0] payload(int unsigned tag, int unsigned beat);
    logic [DATA_W-1:0] d;
    for (int unsigned w = 0; w < DATA_W / 32; w++)
      d[32*w +: 32] = (tag * 32'h9E37_79B9) ^ (beat << 16) ^ w;
    return d;
  endfunction

  function automatic logic [DATA_W-1:0] header_beat(int unsigned tag, int unsigned len,
                                                     logic [31:0] sip, logic [31:0] dip,
                                                     logic [15:0] sport, logic [15:0] dport);
    logic [DATA_W-1:0] d = payload(tag, 0);
    logic [15:0] iplen = 16'(len - 14);
    d[8*12 +: 8] = 8'h08; d[8*13 +: 8] = 8'h00;
    d[8*14 +: 8] = 8'h45; d[8*15 +: 8] = 8'h00;
    d[8*16 +: 8] = iplen[15:8]; d[8*17 +: 8] = iplen[7:0];
    d[8*23 +: 8] = 8'd17;
    for (int i = 0; i < 4; i++) begin
      d[8*(26+i) +: 8] = sip[8*(3-i) +: 8];
      d[8*(30+i) +: 8] = dip[8*(3-i) +: 8];
    end
    d[8*34 +: 8] = sport[15:8]; d[8*35 +: 8] = sport[7:0];
    d[8*36 +: 8] = dport[15:8]; d[8*37 +: 8] = dport[7:0];
    d[DATA_W-1 -: 64] = '0;   // trace field
    return d;
  endfunction

  function automatic int unsigned nbeats(int unsigned len);
    return (len + BEAT_BYTES - 1) / BEAT_BYTES;
  endfunction

  function automatic logic [KEEP_W-1:0] keep_of(int unsigned len, int unsigned beat);
    int unsigned rem;
    if (beat + 1 < nbeats(len)) return '1;
    rem = len - beat * BEAT_BYTES;
    return KEEP_W'((65'd1 << rem) - 1);
  endfunction

  // Expected trace after a packet visited offloads ids[0..n-1] in that order.
  function automatic logic [63:0] trace_of(off_id_t ids [MAX_CHAIN], int unsigned n);
    logic [63:0] t = '0;
    for (int unsigned i = 0; i < n; i++) t = {t[55:0], 8'(ids[i]) + 8'd1};
    return t;
  endfunction

  function automatic pkt_meta_t make_meta(int unsigned len, off_id_t ids [MAX_CHAIN],
                                          int unsigned n, int unsigned hop);
    pkt_meta_t m = '0;
    m.pkt_len   = LEN_W'(len);
    m.chain_len = 4'(n);
    m.hop       = 4'(hop);
    for (int unsigned i = 0; i < MAX_CHAIN; i++) m.chain[i] = ids[i];
    m.next_off  = (hop < n) ? ids[hop] : off_id_t'(OFF_NONE);
    return m;
  endfunction
endpackage
