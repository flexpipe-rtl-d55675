// pre_processor: parses arriving packets and attaches the pipeline metadata.
//
// It works as two match-action stages in sequence. Stage 1 parses the first
// 64-byte beat of a packet (Ethernet II, IPv4 without options, TCP/UDP ports),
// takes the packet size from the IPv4 total length plus the 14-byte Ethernet
// header, samples the timestamp counter, and classifies the packet: the
// 5-tuple is compared against FLOW_ENTRIES ternary entries (key and mask), the
// first valid hit giving flow type and priority class; a miss gives flow 0,
// priority 0. Stage 2 maps the flow type to its offload chain and fills in the
// metadata: size, flow, priority, chain, chain length, hop 0, next required
// offload (the first chain entry, or none for an empty chain) and timestamp.
// The following beats of the packet carry the same metadata.
//
// Both tables are written at run time through the cfg_* ports (the SDN
// controller's path); a write affects packets whose first beat is parsed
// afterwards. After reset all flow entries are invalid and all chains empty.
//
// Interface: AXI4-Stream in (in_beat.tuser is ignored) and out, with full
// back-pressure. Latency: two cycles, one beat per cycle. now is the
// free-running cycle counter used for timestamps.
//
// Following the pipeline's design: a sequence of match-action tables, flow
// type from header fields, runtime-reconfigurable flow-to-chain mapping, and
// the metadata fields. The header format, table sizes, match semantics and
// the write port are this design's choices.
module pre_processor
  import flexpipe_pkg::*;
#(
  parameter int unsigned FLOW_ENTRIES = 16,
  parameter int unsigned NUM_FLOWS    = 16,
  localparam int unsigned FEW = $clog2(FLOW_ENTRIES),
  localparam int unsigned NFW = $clog2(NUM_FLOWS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  axis_beat_t        in_beat,
  output logic              out_valid,
  input  logic              out_ready,
  output axis_beat_t        out_beat,
  input  logic              cfg_flow_we,
  input  logic [FEW-1:0]    cfg_flow_addr,
  input  flow_entry_t       cfg_flow_entry,
  input  logic              cfg_chain_we,
  input  logic [NFW-1:0]    cfg_chain_addr,
  input  chain_entry_t      cfg_chain_entry,
  output logic [TS_W-1:0]   now
);

  // ---------------- tables ----------------
  flow_entry_t  flow_tab  [FLOW_ENTRIES];
  chain_entry_t chain_tab [NUM_FLOWS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < FLOW_ENTRIES; i++) flow_tab[i] <= '0;
      for (int unsigned i = 0; i < NUM_FLOWS; i++)    chain_tab[i] <= '0;
    end else begin
      if (cfg_flow_we)  flow_tab[cfg_flow_addr]   <= cfg_flow_entry;
      if (cfg_chain_we) chain_tab[cfg_chain_addr] <= cfg_chain_entry;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // ---------------- stage 1: parse and classify ----------------
  function automatic logic [7:0] byte_at(logic [DATA_W-1:0] d, int unsigned i);
    return d[8*i +: 8];
  endfunction

  five_tuple_t       tup;
  logic [15:0]       ethertype, ip_len;
  logic [LEN_W-1:0]  len_now;
  logic [FLOW_W-1:0] flow_now;
  logic [PRIO_W-1:0] prio_now;
  logic              hit;

  always_comb begin
    ethertype    = {byte_at(in_beat.tdata, 12), byte_at(in_beat.tdata, 13)};
    ip_len       = {byte_at(in_beat.tdata, 16), byte_at(in_beat.tdata, 17)};
    tup.proto    = byte_at(in_beat.tdata, 23);
    tup.src_ip   = {byte_at(in_beat.tdata, 26), byte_at(in_beat.tdata, 27),
                    byte_at(in_beat.tdata, 28), byte_at(in_beat.tdata, 29)};
    tup.dst_ip   = {byte_at(in_beat.tdata, 30), byte_at(in_beat.tdata, 31),
                    byte_at(in_beat.tdata, 32), byte_at(in_beat.tdata, 33)};
    tup.src_port = {byte_at(in_beat.tdata, 34), byte_at(in_beat.tdata, 35)};
    tup.dst_port = {byte_at(in_beat.tdata, 36), byte_at(in_beat.tdata, 37)};
    // Size known from the header; a non-IPv4 frame counts as maximum size.
    len_now      = (ethertype == 16'h0800) ? LEN_W'(ip_len + 16'd14) : LEN_W'(1518);

    hit      = 1'b0;
    flow_now = '0;
    prio_now = '0;
    for (int unsigned i = 0; i < FLOW_ENTRIES; i++) begin
      if (!hit && flow_tab[i].valid &&
          (((tup ^ flow_tab[i].key) & flow_tab[i].mask) == '0)) begin
        hit      = 1'b1;
        flow_now = flow_tab[i].flow_id;
        prio_now = flow_tab[i].prio;
      end
    end
  end

  logic              mid_pkt;              // next input beat is not a first beat
  logic              s1_valid, s1_first;
  logic [DATA_W-1:0] s1_data;
  logic [KEEP_W-1:0] s1_keep;
  logic              s1_last;
  logic [FLOW_W-1:0] s1_flow;
  logic [PRIO_W-1:0] s1_prio;
  logic [LEN_W-1:0]  s1_len;
  logic [TS_W-1:0]   s1_ts;
  logic              s1_move, in_xfer;

  assign in_ready = !s1_valid || s1_move;
  assign in_xfer  = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      mid_pkt  <= 1'b0;
      s1_first <= 1'b0;
      s1_data  <= '0;
      s1_keep  <= '0;
      s1_last  <= 1'b0;
      s1_flow  <= '0;
      s1_prio  <= '0;
      s1_len   <= '0;
      s1_ts    <= '0;
    end else begin
      if (in_xfer) begin
        s1_valid <= 1'b1;
        s1_first <= !mid_pkt;
        s1_data  <= in_beat.tdata;
        s1_keep  <= in_beat.tkeep;
        s1_last  <= in_beat.tlast;
        mid_pkt  <= !in_beat.tlast;
        if (!mid_pkt) begin
          s1_flow <= flow_now;
          s1_prio <= prio_now;
          s1_len  <= len_now;
          s1_ts   <= now;
        end
      end else if (s1_move) begin
        s1_valid <= 1'b0;
      end
    end
  end

  // ---------------- stage 2: flow -> offload chain ----------------
  chain_entry_t ch;
  pkt_meta_t    meta_new;
  logic         s2_valid;

  assign s1_move = s1_valid && (!s2_valid || out_ready);
  assign ch      = chain_tab[NFW'(s1_flow)];

  always_comb begin
    meta_new           = '0;
    meta_new.pkt_len   = s1_len;
    meta_new.flow_id   = s1_flow;
    meta_new.prio      = s1_prio;
    meta_new.chain     = ch.chain;
    meta_new.chain_len = ch.chain_len;
    meta_new.hop       = '0;
    meta_new.next_off  = (ch.chain_len != '0) ? ch.chain[0] : off_id_t'(OFF_NONE);
    meta_new.timestamp = s1_ts;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      out_beat <= '0;
    end else begin
      if (s1_move) begin
        s2_valid       <= 1'b1;
        out_beat.tdata <= s1_data;
        out_beat.tkeep <= s1_keep;
        out_beat.tlast <= s1_last;
        // Later beats keep the metadata chosen at the first beat.
        if (s1_first) out_beat.tuser <= meta_new;
      end else if (out_ready) begin
        s2_valid <= 1'b0;
      end
    end
  end

  assign out_valid = s2_valid;

endmodule
