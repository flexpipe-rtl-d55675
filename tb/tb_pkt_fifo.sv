// tb_pkt_fifo: self-checking test of the packet FIFO.
//
// Random pushes and pops (pushes only when not full, pops only when not
// empty) against a reference queue: every popped beat and last flag must match
// the reference, and count, pkt_count, full and empty must match the reference
// after every cycle. The FIFO is filled to full and drained to empty at least
// once. DEPTH is reduced to 16 to reach full quickly.
module tb_pkt_fifo;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push, pop, in_last, out_last, full, empty;
  logic [31:0] in_beat, out_beat;
  logic [$clog2(DEPTH+1)-1:0] count, pkt_count;

  pkt_fifo #(.DEPTH(DEPTH), .T(logic [31:0])) dut (.*);

  int checks = 0, failures = 0;
  logic [32:0] ref_q [$];
  int ref_pkts = 0, saw_full = 0, saw_empty_after_full = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; in_last = 0; in_beat = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int phase;
      phase = (cyc / 400) % 3;   // fill-biased, drain-biased, balanced
      @(negedge clk);
      push    = !full  && ($urandom_range(0, 99) < (phase == 0 ? 85 : phase == 1 ? 20 : 50));
      pop     = !empty && ($urandom_range(0, 99) < (phase == 0 ? 20 : phase == 1 ? 85 : 50));
      in_beat = $urandom;
      in_last = ($urandom_range(0, 3) == 0);
      if (pop) begin
        check(ref_q.size() > 0, "pop from empty reference");
        if (ref_q.size() > 0) begin
          check(out_beat == ref_q[0][31:0], "data order");
          check(out_last == ref_q[0][32], "last flag");
        end
      end
      @(posedge clk);
      if (pop && ref_q.size() > 0) begin
        if (ref_q[0][32]) ref_pkts--;
        void'(ref_q.pop_front());
      end
      if (push) begin
        ref_q.push_back({in_last, in_beat});
        if (in_last) ref_pkts++;
      end
      #1;
      check(count == ref_q.size(), "count");
      check(pkt_count == ref_pkts, "pkt_count");
      check(full == (ref_q.size() == DEPTH), "full");
      check(empty == (ref_q.size() == 0), "empty");
      if (full) saw_full = 1;
      if (saw_full && empty) saw_empty_after_full = 1;
    end
    check(saw_full == 1, "reached full");
    check(saw_empty_after_full == 1, "drained after full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
