// pkt_fifo: synchronous packet-beat FIFO with fill level and packet count.
//
// Holds up to DEPTH beats of type T. Reads are first-word fall-through: the
// head beat is visible on out_beat whenever empty is low, and pop removes it
// at the clock edge. Besides the usual full/empty the FIFO reports its fill
// level (count, in beats), which the highest-demand-first arbiter compares,
// and the number of complete packets it holds (pkt_count: beats with
// in_last set that are still stored), which lets schedulers forward only
// whole packets. A push into a full FIFO or a pop from an empty one is
// ignored (and flagged by an assertion).
//
// The default depth, 256 beats of 64 bytes, is the 16 kB queue size of the
// pipeline's queues. The memory is a plain array; its organisation is this
// design's choice.
module pkt_fifo #(
  parameter int unsigned DEPTH = 256,
  parameter type         T     = logic [7:0],
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  T              in_beat,
  input  logic          in_last,
  output logic          full,
  input  logic          pop,
  output T              out_beat,
  output logic          out_last,
  output logic          empty,
  output logic [CW-1:0] count,
  output logic [CW-1:0] pkt_count
);

  T                 mem  [DEPTH];
  logic             lmem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign full     = (count == CW'(DEPTH));
  assign empty    = (count == '0);
  assign do_push  = push && !full;
  assign do_pop   = pop && !empty;
  assign out_beat = mem[rp];
  assign out_last = lmem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) begin
      mem[wp]  <= in_beat;
      lmem[wp] <= in_last;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      count     <= '0;
      pkt_count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count     <= count + CW'(do_push) - CW'(do_pop);
      pkt_count <= pkt_count + CW'(do_push && in_last) - CW'(do_pop && lmem[rp]);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full)
    else $error("pkt_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("pkt_fifo: pop while empty");

endmodule
