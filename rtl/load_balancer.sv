// load_balancer: load-aware steering of packets to the Offload Units of one
// Offload.
//
// A load counter per unit estimates the work waiting for it. When the first
// beat of a packet is written into a unit's input queue, that unit's counter
// grows by the packet size (in 64-byte beats, from the metadata's pkt_len);
// every time the unit fetches a fragment (one beat) from its queue (q_pop),
// the counter drops by one. Each new packet goes to the unit with the lowest
// counter, the lowest index winning a tie; the choice is held until the
// packet's last beat, so a packet is never split across units.
//
// Interface: AXI4-Stream input; one write strobe per unit input queue
// (q_push, all queues share q_beat) and their full flags. tready is low while
// the selected queue is full. The selection is combinational on the current
// counters, so a packet can start in the cycle after the previous one ended.
//
// The counting rule (up by packet size when storing starts, down per fragment
// fetched) and least-loaded selection follow the pipeline's design; beats as
// the load unit, the tie rule and the counter width are this design's choices.
module load_balancer
  import flexpipe_pkg::*;
#(
  parameter int unsigned NUM_UNITS = 8,
  parameter int unsigned LOAD_W    = 12,
  localparam int unsigned SW       = (NUM_UNITS > 1) ? $clog2(NUM_UNITS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  axis_beat_t              in_beat,
  output logic [NUM_UNITS-1:0]    q_push,
  output axis_beat_t              q_beat,
  input  logic [NUM_UNITS-1:0]    q_full,
  input  logic [NUM_UNITS-1:0]    q_pop,
  output logic [LOAD_W-1:0]       load [NUM_UNITS],
  output logic [SW-1:0]           sel
);

  logic          mid_pkt;
  logic [SW-1:0] sel_q, least;
  logic          start, xfer;

  // Least-loaded unit, lowest index on a tie.
  always_comb begin
    least = '0;
    for (int unsigned i = 1; i < NUM_UNITS; i++)
      if (load[i] < load[least]) least = SW'(i);
  end

  assign sel      = mid_pkt ? sel_q : least;
  assign in_ready = !q_full[sel];
  assign xfer     = in_valid && in_ready;
  assign start    = xfer && !mid_pkt;
  assign q_beat   = in_beat;

  always_comb begin
    q_push = '0;
    q_push[sel] = xfer;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mid_pkt <= 1'b0;
      sel_q   <= '0;
    end else if (xfer) begin
      mid_pkt <= !in_beat.tlast;
      sel_q   <= sel;
    end
  end

  logic [LOAD_W-1:0] inc;
  assign inc = LOAD_W'(beats_of(in_beat.tuser.pkt_len));

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < NUM_UNITS; i++) begin
      if (!rst_n)
        load[i] <= '0;
      else
        load[i] <= load[i] + ((start && sel == SW'(i)) ? inc : '0) - LOAD_W'(q_pop[i]);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   q_pop[0] |-> (load[0] != '0 || (start && sel == '0)))
    else $error("load_balancer: unit 0 fetched more than was counted");

endmodule
