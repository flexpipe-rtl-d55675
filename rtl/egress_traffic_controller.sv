// egress_traffic_controller: exit of the offload pipeline.
//
// A packet whose metadata says no offload is required any more (next required
// offload = none, i.e. every entry of its chain has been processed) goes to
// the DMA Engine (dma_*), which hands it to the host. Any other packet needed
// an offload that lies earlier in the pipeline than the one it last visited,
// so it could not finish on this pass; it is recirculated to the Ingress
// Traffic Controller (rec_*) for another pass. The metadata is the same on
// every beat, so all beats follow the first one.
//
// Interface: AXI4-Stream in, two AXI4-Stream outputs; tready comes from the
// selected output. Combinational, zero latency.
//
// The routing rule follows the pipeline's design; the zero-latency structure is
// this design's choice.
module egress_traffic_controller
  import flexpipe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  axis_beat_t in_beat,
  output logic       dma_valid,
  input  logic       dma_ready,
  output axis_beat_t dma_beat,
  output logic       rec_valid,
  input  logic       rec_ready,
  output axis_beat_t rec_beat
);

  logic done;

  assign done      = (in_beat.tuser.next_off == off_id_t'(OFF_NONE));
  assign dma_valid = in_valid &&  done;
  assign rec_valid = in_valid && !done;
  assign dma_beat  = in_beat;
  assign rec_beat  = in_beat;
  assign in_ready  = done ? dma_ready : rec_ready;

  logic mid_pkt, done_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mid_pkt <= 1'b0;
      done_q  <= 1'b0;
    end else if (in_valid && in_ready) begin
      mid_pkt <= !in_beat.tlast;
      done_q  <= done;
    end
  end

  a_route_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                   (in_valid && mid_pkt) |-> (done == done_q))
    else $error("egress_traffic_controller: route changed inside a packet");

endmodule
