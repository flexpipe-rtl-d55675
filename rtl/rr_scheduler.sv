// rr_scheduler: nested round-robin scheduler over the Offload Units of one
// Offload.
//
// req[i] is high while unit i has at least one completely processed packet
// waiting in its output queue. The scheduler loops over the units starting one
// past the unit it granted last and grants the first requester; the grant is
// then held until the granted packet's last beat has been forwarded
// (xfer && xfer_last), after which the search moves on. While no packet is in
// flight the grant is computed combinationally, so a new packet can follow the
// previous one without an idle cycle.
//
// Interface: req[N] in, xfer/xfer_last from the consumer, gnt_valid/gnt out.
// Looping order and whole-packet grants follow the pipeline's design; the
// start point after a grant is this design's choice.
module rr_scheduler #(
  parameter int unsigned N  = 8,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          xfer,
  input  logic          xfer_last,
  output logic          gnt_valid,
  output logic [SW-1:0] gnt
);

  logic          locked;
  logic [SW-1:0] lock_idx, ptr, pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = int'(ptr) + k;
      if (idx >= N) idx -= N;
      if (!any && req[idx]) begin
        any  = 1'b1;
        pick = SW'(idx);
      end
    end
  end

  assign gnt_valid = locked || any;
  assign gnt       = locked ? lock_idx : pick;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_idx <= '0;
      ptr      <= SW'(N - 1);   // first search starts at unit 0
    end else if (xfer && gnt_valid) begin
      if (xfer_last) begin
        locked <= 1'b0;
        ptr    <= gnt;
      end else begin
        locked   <= 1'b1;
        lock_idx <= gnt;
      end
    end
  end

  a_xfer_needs_grant: assert property (@(posedge clk) disable iff (!rst_n) xfer |-> gnt_valid)
    else $error("rr_scheduler: transfer without a grant");

endmodule
