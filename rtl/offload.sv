// offload: one stage of the offload pipeline (one offload type).
//
// A packet enters the Traffic Splitter. If its next required offload is this
// one (OFFLOAD_ID) it goes to the Load Balancer, which stores it in the input
// queue of the least loaded of NUM_UNITS Offload Units; otherwise it bypasses
// the units. The units themselves (CRC, firewall, SHA-3, AES, JPEG decoder or
// RSS cores) are outside this module: each unit fetches 512-bit fragments of
// its packet from unit_in_* (one per handshake) and returns the processed
// packet on unit_out_*, keeping the metadata. The Traffic Arbiter merges the
// bypassed and the processed packets into the output, advancing the metadata
// of processed packets to the next offload of their chain.
//
// Interface: AXI4-Stream in and out with per-beat metadata; one AXI4-Stream
// pair per unit. A bypassed packet leaves once it is complete in the bypass
// queue; a processed one once the unit has returned all of it.
//
// Structure (splitter, load balancer, units, arbiter) follows the pipeline's
// design. The unit input queue depth (32 beats, one maximum-size packet) is
// this design's choice.
module offload
  import flexpipe_pkg::*;
#(
  parameter int unsigned OFFLOAD_ID   = 0,
  parameter int unsigned NUM_UNITS    = 8,
  parameter int unsigned Q_DEPTH      = 256,
  parameter int unsigned UNIT_Q_DEPTH = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  axis_beat_t           in_beat,
  output logic                 out_valid,
  input  logic                 out_ready,
  output axis_beat_t           out_beat,
  output logic [NUM_UNITS-1:0] unit_in_valid,
  input  logic [NUM_UNITS-1:0] unit_in_ready,
  output axis_beat_t           unit_in_beat  [NUM_UNITS],
  input  logic [NUM_UNITS-1:0] unit_out_valid,
  output logic [NUM_UNITS-1:0] unit_out_ready,
  input  axis_beat_t           unit_out_beat [NUM_UNITS]
);

  localparam int unsigned SW  = (NUM_UNITS > 1) ? $clog2(NUM_UNITS) : 1;
  localparam int unsigned UCW = $clog2(UNIT_Q_DEPTH + 1);

  logic       proc_valid, proc_ready, byp_valid, byp_ready, out_src;
  axis_beat_t proc_beat, byp_beat;

  traffic_splitter #(.OFFLOAD_ID(OFFLOAD_ID)) u_splitter (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_beat,
    .proc_valid, .proc_ready, .proc_beat,
    .byp_valid, .byp_ready, .byp_beat);

  logic [NUM_UNITS-1:0] q_push, q_full, q_pop, q_empty;
  axis_beat_t           q_beat;
  logic [11:0]          load [NUM_UNITS];
  logic [SW-1:0]        lb_sel;

  load_balancer #(.NUM_UNITS(NUM_UNITS), .LOAD_W(12)) u_lb (
    .clk, .rst_n,
    .in_valid(proc_valid), .in_ready(proc_ready), .in_beat(proc_beat),
    .q_push, .q_beat, .q_full, .q_pop, .load, .sel(lb_sel));

  for (genvar i = 0; i < NUM_UNITS; i++) begin : g_unit_q
    logic [UCW-1:0] cnt, pkts;
    logic           lst;
    pkt_fifo #(.DEPTH(UNIT_Q_DEPTH), .T(axis_beat_t)) u_in_q (
      .clk, .rst_n,
      .push(q_push[i]), .in_beat(q_beat), .in_last(q_beat.tlast), .full(q_full[i]),
      .pop(q_pop[i]), .out_beat(unit_in_beat[i]), .out_last(lst), .empty(q_empty[i]),
      .count(cnt), .pkt_count(pkts));
    assign unit_in_valid[i] = !q_empty[i];
    assign q_pop[i]         = unit_in_ready[i] && !q_empty[i];
  end

  traffic_arbiter #(.NUM_UNITS(NUM_UNITS), .Q_DEPTH(Q_DEPTH), .UNIT_Q_DEPTH(UNIT_Q_DEPTH)) u_arb (
    .clk, .rst_n,
    .byp_valid, .byp_ready, .byp_beat,
    .u_valid(unit_out_valid), .u_ready(unit_out_ready), .u_beat(unit_out_beat),
    .out_valid, .out_ready, .out_beat, .out_src);

endmodule
