// tb_egress_traffic_controller: self-checking test of the Egress Traffic
// Controller.
//
// Random packets that have either finished their chain (next offload = none)
// or still need an offload are sent under random back-pressure on both
// outputs. Every packet must come out complete and unchanged on the DMA output
// if it is finished and on the recirculation output otherwise, in order, and
// with no added cycle of latency.
module tb_egress_traffic_controller;
  import flexpipe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, dma_valid, dma_ready, rec_valid, rec_ready;
  axis_beat_t in_beat, dma_beat, rec_beat;

  egress_traffic_controller dut (.*);

  int checks = 0, failures = 0, n_dma = 0, n_rec = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  axis_beat_t exp_dma [$], exp_rec [$];
  always @(posedge clk) if (rst_n) begin
    if (dma_valid && dma_ready) begin
      check(exp_dma.size() > 0 && dma_beat == exp_dma[0], "dma beat");
      if (exp_dma.size() > 0) void'(exp_dma.pop_front());
      if (dma_beat.tlast) n_dma++;
    end
    if (rec_valid && rec_ready) begin
      check(exp_rec.size() > 0 && rec_beat == exp_rec[0], "recirculated beat");
      if (exp_rec.size() > 0) void'(exp_rec.pop_front());
      if (rec_beat.tlast) n_rec++;
    end
  end

  initial begin
    int sent_dma = 0, sent_rec = 0;
    in_valid = 0; in_beat = '0; dma_ready = 0; rec_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int unsigned nb;
      off_id_t nxt;
      nb  = $urandom_range(1, 4);
      nxt = ($urandom_range(0, 1) == 0) ? off_id_t'(OFF_NONE) : off_id_t'($urandom_range(0, 5));
      for (int unsigned b = 0; b < nb; b++) begin
        in_valid = 1;
        in_beat.tdata = {16{$urandom}};
        in_beat.tkeep = '1;
        in_beat.tlast = (b == nb - 1);
        in_beat.tuser = '0;
        in_beat.tuser.next_off = nxt;
        in_beat.tuser.timestamp = 32'(p);
        if (nxt == off_id_t'(OFF_NONE)) exp_dma.push_back(in_beat);
        else                            exp_rec.push_back(in_beat);
        forever begin
          dma_ready = $urandom_range(0, 2) != 0;
          rec_ready = $urandom_range(0, 2) != 0;
          #1;
          check(dma_valid == (nxt == off_id_t'(OFF_NONE)), "dma_valid same cycle");
          check(rec_valid == (nxt != off_id_t'(OFF_NONE)), "rec_valid same cycle");
          @(posedge clk);
          if (in_ready) break;
        end
      end
      if (nxt == off_id_t'(OFF_NONE)) sent_dma++; else sent_rec++;
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) @(posedge clk);
    end
    @(posedge clk);
    check(n_dma == sent_dma && n_rec == sent_rec, "all packets delivered");
    check(n_dma > 50 && n_rec > 50, "both routes used");
    $display("to DMA %0d, recirculated %0d", n_dma, n_rec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
