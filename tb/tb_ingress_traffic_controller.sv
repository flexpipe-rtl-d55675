// tb_ingress_traffic_controller: self-checking test of the Ingress Traffic
// Controller.
//
// A network source and a recirculation source each send random packets
// (1..5 beats) with random gaps; the output sees random back-pressure. A
// monitor checks that packets leave whole and unchanged, in order per source,
// that a packet start picks a completely stored recirculated packet whenever
// one is waiting, and that a new packet passes with no added cycle when
// nothing is recirculated. RECIRC_DEPTH is reduced to 16 beats so the
// recirculation queue also fills up.
module tb_ingress_traffic_controller;
  import flexpipe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic net_valid, net_ready, rec_valid, rec_ready, out_valid, out_ready, out_is_rec;
  axis_beat_t net_beat, rec_beat, out_beat;

  ingress_traffic_controller #(.RECIRC_DEPTH(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NPKT = 300;
  axis_beat_t exp_net [$], exp_rec [$];
  int rec_done_in = 0, rec_started = 0, n_net = 0, n_rec = 0, prio_hits = 0, rec_full = 0, cut_through = 0;
  bit mid = 0, cur_rec = 0;

  // Sources: drive after the falling edge, sample tready just before the
  // rising edge.
  int net_sent = 0, rec_sent = 0;
  initial begin
    net_valid = 0; net_beat = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      int nb;
      nb = $urandom_range(1, 5);
      for (int b = 0; b < nb; b++) begin
        bit acc;
        @(negedge clk);
        net_valid = 1;
        net_beat = '0;
        net_beat.tdata = {16{$urandom}};
        net_beat.tkeep = '1;
        net_beat.tlast = (b == nb - 1);
        net_beat.tuser.flow_id = 4'd2;
        net_beat.tuser.timestamp = 32'(p);
        exp_net.push_back(net_beat);
        acc = 0;
        while (!acc) begin
          #4 acc = net_ready;
          if (!acc) @(negedge clk);
        end
      end
      @(negedge clk);
      net_valid = 0;
      while ($urandom_range(0, 2) == 0) @(negedge clk);
    end
  end
  initial begin
    rec_valid = 0; rec_beat = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      int nb;
      nb = $urandom_range(1, 5);
      for (int b = 0; b < nb; b++) begin
        bit acc;
        @(negedge clk);
        rec_valid = 1;
        rec_beat = '0;
        rec_beat.tdata = {16{$urandom}};
        rec_beat.tkeep = '1;
        rec_beat.tlast = (b == nb - 1);
        rec_beat.tuser.flow_id = 4'd1;
        rec_beat.tuser.timestamp = 32'(p);
        exp_rec.push_back(rec_beat);
        acc = 0;
        while (!acc) begin
          #4 acc = rec_ready;
          if (!acc) @(negedge clk);
        end
      end
      @(negedge clk);
      rec_valid = 0;
      while ($urandom_range(0, 2) == 0) @(negedge clk);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (rec_valid && rec_ready && rec_beat.tlast) rec_done_in <= rec_done_in + 1;
    if (rec_valid && !rec_ready) rec_full <= rec_full + 1;
    if (out_valid && !mid) begin
      if (rec_done_in > rec_started) begin
        check(out_is_rec, "waiting recirculated packet goes first");
        prio_hits++;
      end
      if (rec_done_in == rec_started && net_valid) begin
        check(!out_is_rec && out_beat == net_beat, "new packet cut through");
        cut_through++;
      end
    end
    if (out_valid && out_ready) begin
      if (!mid) begin
        cur_rec = out_is_rec;
        if (out_is_rec) rec_started <= rec_started + 1;
      end else begin
        check(out_is_rec == cur_rec, "no interleaving inside a packet");
      end
      if (out_is_rec) begin
        check(exp_rec.size() > 0 && out_beat == exp_rec[0], "recirculated data in order");
        if (exp_rec.size() > 0) void'(exp_rec.pop_front());
        if (out_beat.tlast) n_rec++;
      end else begin
        check(exp_net.size() > 0 && out_beat == exp_net[0], "new data in order");
        if (exp_net.size() > 0) void'(exp_net.pop_front());
        if (out_beat.tlast) n_net++;
      end
      mid = !out_beat.tlast;
    end
  end

  initial begin
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    fork
      forever begin
        @(negedge clk);
        out_ready = (($time / 3000) % 3 == 1) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0);
      end
    join_none
    wait (n_net == NPKT && n_rec == NPKT);
    check(prio_hits > 20, "recirculation priority exercised");
    check(cut_through > 5, "cut-through exercised");
    check(rec_full > 0, "recirculation queue back-pressure seen");
    $display("net %0d rec %0d priority %0d cut-through %0d rec-full %0d", n_net, n_rec, prio_hits, cut_through, rec_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
