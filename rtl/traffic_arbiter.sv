// traffic_arbiter: exit of one Offload; merges bypassed and processed packets.
//
// Two sources feed the Offload's output: packets the Traffic Splitter sent
// past the processing units, and packets the Offload Units have processed.
// Bypassed packets are stored in a bypass queue. Each unit writes its
// processed packet into a small output queue of its own; a nested round-robin
// scheduler (rr_scheduler) loops over the units and lets a unit that holds a
// complete packet move that whole packet into the processed queue. On the way
// the metadata is advanced to the next offload of the packet's chain.
//
// A highest-demand-first scheduler then forwards whole packets: among the two
// queues that hold at least one complete packet it takes the one with the
// higher fill level (the processed queue on a tie), and keeps it until the
// packet's last beat. The choice is made combinationally while idle, so the
// arbiter passes from waiting to forwarding, and from one queue to the other,
// without an idle cycle.
//
// Interface: AXI4-Stream bypass input, NUM_UNITS AXI4-Stream unit outputs,
// AXI4-Stream output. out_src tells which queue the current beat comes from
// (1 = processed). Latency: a packet is forwarded once it is completely in
// its queue (store-and-forward), then one beat per cycle.
//
// The two schedulers and the 16 kB queues follow the pipeline's design. The
// split into a bypass and a processed queue, the per-unit output queues and
// their depth, the tie rule and advancing the chain here are this design's
// choices.
module traffic_arbiter
  import flexpipe_pkg::*;
#(
  parameter int unsigned NUM_UNITS    = 8,
  parameter int unsigned Q_DEPTH      = 256,
  parameter int unsigned UNIT_Q_DEPTH = 32,
  localparam int unsigned SW = (NUM_UNITS > 1) ? $clog2(NUM_UNITS) : 1,
  localparam int unsigned CW = $clog2(Q_DEPTH + 1),
  localparam int unsigned UCW = $clog2(UNIT_Q_DEPTH + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 byp_valid,
  output logic                 byp_ready,
  input  axis_beat_t           byp_beat,
  input  logic [NUM_UNITS-1:0] u_valid,
  output logic [NUM_UNITS-1:0] u_ready,
  input  axis_beat_t           u_beat [NUM_UNITS],
  output logic                 out_valid,
  input  logic                 out_ready,
  output axis_beat_t           out_beat,
  output logic                 out_src
);

  // ---------------- bypass queue ----------------
  logic       bq_full, bq_empty, bq_pop, bq_last;
  axis_beat_t bq_beat;
  logic [CW-1:0] bq_count, bq_pkts;

  pkt_fifo #(.DEPTH(Q_DEPTH), .T(axis_beat_t)) u_bypass_q (
    .clk, .rst_n,
    .push(byp_valid && !bq_full), .in_beat(byp_beat), .in_last(byp_beat.tlast), .full(bq_full),
    .pop(bq_pop), .out_beat(bq_beat), .out_last(bq_last), .empty(bq_empty),
    .count(bq_count), .pkt_count(bq_pkts));
  assign byp_ready = !bq_full;

  // ---------------- per-unit output queues ----------------
  logic [NUM_UNITS-1:0] uq_full, uq_empty, uq_pop, uq_last, uq_req;
  axis_beat_t           uq_beat [NUM_UNITS];

  for (genvar i = 0; i < NUM_UNITS; i++) begin : g_uq
    logic [UCW-1:0] cnt, pkts;
    pkt_fifo #(.DEPTH(UNIT_Q_DEPTH), .T(axis_beat_t)) u_unit_q (
      .clk, .rst_n,
      .push(u_valid[i] && !uq_full[i]), .in_beat(u_beat[i]), .in_last(u_beat[i].tlast),
      .full(uq_full[i]),
      .pop(uq_pop[i]), .out_beat(uq_beat[i]), .out_last(uq_last[i]), .empty(uq_empty[i]),
      .count(cnt), .pkt_count(pkts));
    assign u_ready[i] = !uq_full[i];
    assign uq_req[i]  = (pkts != '0);
  end

  // ---------------- nested round robin -> processed queue ----------------
  logic          gnt_valid, rr_xfer, pq_full, pq_empty, pq_pop, pq_last;
  logic [SW-1:0] gnt;
  axis_beat_t    rr_beat, pq_beat;
  logic [CW-1:0] pq_count, pq_pkts;

  rr_scheduler #(.N(NUM_UNITS)) u_rr (
    .clk, .rst_n, .req(uq_req), .xfer(rr_xfer), .xfer_last(rr_beat.tlast),
    .gnt_valid, .gnt);

  always_comb begin
    rr_beat       = uq_beat[gnt];
    rr_beat.tuser = advance_hop(uq_beat[gnt].tuser);
  end
  assign rr_xfer = gnt_valid && !pq_full && !uq_empty[gnt];

  always_comb begin
    uq_pop = '0;
    uq_pop[gnt] = rr_xfer;
  end

  pkt_fifo #(.DEPTH(Q_DEPTH), .T(axis_beat_t)) u_proc_q (
    .clk, .rst_n,
    .push(rr_xfer), .in_beat(rr_beat), .in_last(rr_beat.tlast), .full(pq_full),
    .pop(pq_pop), .out_beat(pq_beat), .out_last(pq_last), .empty(pq_empty),
    .count(pq_count), .pkt_count(pq_pkts));

  // ---------------- highest-demand-first ----------------
  logic locked, lock_src, sel, el_b, el_p, out_xfer;

  assign el_b = (bq_pkts != '0);
  assign el_p = (pq_pkts != '0);

  always_comb begin
    if (locked) begin
      sel       = lock_src;
      out_valid = lock_src ? !pq_empty : !bq_empty;
    end else begin
      sel       = el_p && (!el_b || pq_count >= bq_count);
      out_valid = el_b || el_p;
    end
  end

  assign out_beat = sel ? pq_beat : bq_beat;
  assign out_src  = sel;
  assign out_xfer = out_valid && out_ready;
  assign pq_pop   = out_xfer &&  sel;
  assign bq_pop   = out_xfer && !sel;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_src <= 1'b0;
    end else if (out_xfer) begin
      locked   <= !out_beat.tlast;
      lock_src <= sel;
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (out_valid && !out_ready) |=> out_valid)
    else $error("traffic_arbiter: tvalid dropped before tready");

endmodule
