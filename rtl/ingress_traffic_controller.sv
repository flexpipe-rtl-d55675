// ingress_traffic_controller: entry of the offload pipeline.
//
// Merges two packet streams into the first Offload: new packets from the
// Pre-Processor (net_*) and packets the Egress Traffic Controller sends back
// because their offload chain is not finished (rec_*). Recirculated packets
// are collected in a queue of RECIRC_DEPTH beats (16 kB by default) and become
// eligible once a whole packet is stored. At every packet boundary a complete
// recirculated packet is preferred over a new one, so the recirculation loop
// always drains and cannot block the pipeline; new packets pass straight
// through (cut-through). A selected packet keeps the output until its last
// beat. The choice is combinational while idle: no idle cycle between packets.
//
// Interface: three AXI4-Stream ports with per-beat metadata; out_is_rec marks
// beats of recirculated packets. Latency: zero cycles for new packets.
//
// That recirculated and new packets share the pipeline entry follows the
// pipeline's design; the priority rule and the queue are this design's choices.
module ingress_traffic_controller
  import flexpipe_pkg::*;
#(
  parameter int unsigned RECIRC_DEPTH = 256,
  localparam int unsigned CW = $clog2(RECIRC_DEPTH + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       net_valid,
  output logic       net_ready,
  input  axis_beat_t net_beat,
  input  logic       rec_valid,
  output logic       rec_ready,
  input  axis_beat_t rec_beat,
  output logic       out_valid,
  input  logic       out_ready,
  output axis_beat_t out_beat,
  output logic       out_is_rec
);

  logic          rq_full, rq_empty, rq_pop, rq_last;
  axis_beat_t    rq_beat;
  logic [CW-1:0] rq_count, rq_pkts;

  pkt_fifo #(.DEPTH(RECIRC_DEPTH), .T(axis_beat_t)) u_recirc_q (
    .clk, .rst_n,
    .push(rec_valid && !rq_full), .in_beat(rec_beat), .in_last(rec_beat.tlast), .full(rq_full),
    .pop(rq_pop), .out_beat(rq_beat), .out_last(rq_last), .empty(rq_empty),
    .count(rq_count), .pkt_count(rq_pkts));
  assign rec_ready = !rq_full;

  logic locked, lock_rec, sel_rec, xfer;

  always_comb begin
    if (locked) sel_rec = lock_rec;
    else        sel_rec = (rq_pkts != '0);
  end

  assign out_valid  = sel_rec ? !rq_empty : net_valid;
  assign out_beat   = sel_rec ? rq_beat : net_beat;
  assign out_is_rec = sel_rec;
  assign xfer       = out_valid && out_ready;
  assign rq_pop     = xfer && sel_rec;
  assign net_ready  = out_ready && !sel_rec;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_rec <= 1'b0;
    end else if (xfer) begin
      locked   <= !out_beat.tlast;
      lock_rec <= sel_rec;
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               (out_valid && !out_ready) |=> out_valid)
    else $error("ingress_traffic_controller: tvalid dropped before tready");

endmodule
