// traffic_splitter: entry of one Offload; decides per packet whether the
// Offload's processing units are needed.
//
// Each beat's metadata names the next offload the packet requires. If that is
// this Offload (OFFLOAD_ID), the beat goes to the Load Balancer (proc_*);
// otherwise the packet bypasses the processing units and goes straight to the
// Traffic Arbiter (byp_*). The metadata is identical on every beat of a
// packet, so all beats follow the first one. The split is combinational: no
// cycle of latency is added and tready comes from the selected output only.
//
// The routing rule is the one the pipeline is built around; the zero-latency
// structure is this design's choice.
module traffic_splitter
  import flexpipe_pkg::*;
#(
  parameter int unsigned OFFLOAD_ID = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  axis_beat_t in_beat,
  output logic       proc_valid,
  input  logic       proc_ready,
  output axis_beat_t proc_beat,
  output logic       byp_valid,
  input  logic       byp_ready,
  output axis_beat_t byp_beat
);

  logic to_proc;

  assign to_proc    = (in_beat.tuser.next_off == off_id_t'(OFFLOAD_ID));
  assign proc_valid = in_valid &&  to_proc;
  assign byp_valid  = in_valid && !to_proc;
  assign proc_beat  = in_beat;
  assign byp_beat   = in_beat;
  assign in_ready   = to_proc ? proc_ready : byp_ready;

  // The route must not change inside a packet.
  logic mid_pkt, route_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mid_pkt <= 1'b0;
      route_q <= 1'b0;
    end else if (in_valid && in_ready) begin
      mid_pkt <= !in_beat.tlast;
      route_q <= to_proc;
    end
  end

  a_route_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   (in_valid && mid_pkt) |-> (to_proc == route_q))
    else $error("traffic_splitter: next offload changed inside a packet");
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (in_valid && !in_ready) |=> in_valid)
    else $error("traffic_splitter: tvalid dropped before tready");

endmodule
