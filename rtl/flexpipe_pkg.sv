// flexpipe_pkg: types and constants shared by the FlexPipe packet pipeline.
//
// Every block talks AXI4-Stream. A beat carries 512 bits of data (64 bytes,
// byte i in tdata[8*i +: 8]), a byte-enable mask, tlast, and the packet
// metadata as a per-beat sideband (the AXI4-Stream tuser field). Carrying the
// metadata beside the data, rather than ahead of it in the data path, keeps
// the full 512-bit width for packet bytes; the metadata is the same on every
// beat of one packet.
//
// The six offloads sit in a fixed order, and an offload id is its position in
// that order: CRC, firewall, SHA-3, AES, JPEG decoder, RSS. The per-offload
// unit counts follow from the unit input width and clock against the 512-bit,
// 250 MHz pipeline (see num_units_for below).
//
// Field widths of the metadata, the table sizes and the maximum chain length
// are choices of this design.
package flexpipe_pkg;

  localparam int unsigned DATA_W    = 512;          // pipeline data width
  localparam int unsigned KEEP_W    = DATA_W / 8;   // bytes per beat
  localparam int unsigned BEAT_BYTES = KEEP_W;
  localparam int unsigned F_PIPE_MHZ = 250;         // pipeline clock

  localparam int unsigned NUM_OFFLOADS = 6;
  localparam int unsigned MAX_CHAIN    = 8;         // chain entries in metadata
  localparam int unsigned FLOW_W       = 4;         // up to 16 flow types
  localparam int unsigned PRIO_W       = 3;
  localparam int unsigned LEN_W        = 16;        // packet size in bytes
  localparam int unsigned TS_W         = 32;

  // Offload ids, in pipeline order.
  typedef enum logic [2:0] {
    OFF_CRC   = 3'd0,
    OFF_FW    = 3'd1,
    OFF_SHA3  = 3'd2,
    OFF_AES   = 3'd3,
    OFF_JPEG  = 3'd4,
    OFF_RSS   = 3'd5,
    OFF_NONE  = 3'd7   // chain complete
  } offload_id_e;

  typedef logic [2:0] off_id_t;   // raw offload id as stored in tables

  // Per-offload unit count, input width and unit clock (in offload order).
  typedef int unsigned uint_arr_t [NUM_OFFLOADS];
  localparam uint_arr_t UNIT_W      = '{64, 8, 64, 128, 32, 256};
  localparam uint_arr_t UNIT_F_MHZ  = '{250, 150, 150, 250, 100, 200};
  localparam uint_arr_t UNIT_COUNT  = '{8, 128, 39, 4, 40, 3};

  // Units needed for line rate: ceil(w_pipe/w_unit * f_pipe/f_unit + delay),
  // with delay the unit's non-pipelined cycles.
  function automatic int unsigned num_units_for(int unsigned w_unit,
                                                int unsigned f_unit_mhz,
                                                int unsigned delay);
    int unsigned num, den;
    num = DATA_W * F_PIPE_MHZ + delay * w_unit * f_unit_mhz;
    den = w_unit * f_unit_mhz;
    return (num + den - 1) / den;
  endfunction

  // Offset of offload k's units in a flat array of all units, and the total.
  function automatic int unsigned base_of(uint_arr_t n, int unsigned k);
    int unsigned s = 0;
    for (int unsigned i = 0; i < NUM_OFFLOADS; i++)
      if (i < k) s += n[i];
    return s;
  endfunction

  function automatic int unsigned total_units(uint_arr_t n);
    return base_of(n, NUM_OFFLOADS);
  endfunction

  localparam int unsigned TOTAL_UNITS = total_units(UNIT_COUNT);

  // Packet metadata (AXI4-Stream tuser).
  typedef struct packed {
    logic [LEN_W-1:0]             pkt_len;    // bytes
    logic [FLOW_W-1:0]            flow_id;
    logic [PRIO_W-1:0]            prio;
    off_id_t [MAX_CHAIN-1:0]      chain;      // chain[0] is visited first
    logic [3:0]                   chain_len;  // 0..MAX_CHAIN
    logic [3:0]                   hop;        // index of next required offload
    off_id_t                      next_off;   // chain[hop] or OFF_NONE
    logic [TS_W-1:0]              timestamp;  // cycle the packet was parsed
  } pkt_meta_t;

  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic [KEEP_W-1:0] tkeep;
    logic              tlast;
    pkt_meta_t         tuser;
  } axis_beat_t;

  // Flow-classification entry: ternary match on the 5-tuple.
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } five_tuple_t;

  typedef struct packed {
    logic            valid;
    five_tuple_t     key;
    five_tuple_t     mask;     // 1 = bit must match
    logic [FLOW_W-1:0] flow_id;
    logic [PRIO_W-1:0] prio;
  } flow_entry_t;

  // Flow-to-chain entry.
  typedef struct packed {
    off_id_t [MAX_CHAIN-1:0] chain;
    logic [3:0]              chain_len;
  } chain_entry_t;

  // Number of 64-byte beats of a packet of len bytes.
  function automatic logic [LEN_W-1:0] beats_of(logic [LEN_W-1:0] len);
    return (len + LEN_W'(BEAT_BYTES - 1)) / LEN_W'(BEAT_BYTES);
  endfunction

  // Metadata after the current offload has processed the packet.
  function automatic pkt_meta_t advance_hop(pkt_meta_t m);
    pkt_meta_t r = m;
    r.hop = m.hop + 4'd1;
    if (r.hop < m.chain_len && r.hop < 4'(MAX_CHAIN))
      r.next_off = m.chain[r.hop[2:0]];
    else
      r.next_off = OFF_NONE;
    return r;
  endfunction

endpackage
