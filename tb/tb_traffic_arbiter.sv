// tb_traffic_arbiter: self-checking test of the Traffic Arbiter.
//
// A bypass source and three unit sources send random packets (1..6 beats)
// while the output sees phases of heavy and light back-pressure. Checked:
//  - every packet leaves whole, unchanged in data, in order per source, and
//    out_src tells correctly whether it was processed;
//  - processed packets leave with the metadata advanced to the next offload
//    of their chain (hop + 1, next offload = next chain entry or none), and
//    bypassed packets with their metadata unchanged;
//  - at each packet start with both queues holding a complete packet, the
//    queue with the higher fill level is chosen (processed on a tie);
//  - no idle output cycle while a complete packet waits and no packet is in
//    flight (immediate switching).
// Queue depths are reduced (32 and 8 beats) so that they fill up.
module tb_traffic_arbiter;
  import flexpipe_pkg::*;
  localparam int unsigned N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic byp_valid, byp_ready, out_valid, out_ready, out_src;
  axis_beat_t byp_beat, out_beat;
  logic [N-1:0] u_valid, u_ready;
  axis_beat_t u_beat [N];

  traffic_arbiter #(.NUM_UNITS(N), .Q_DEPTH(32), .UNIT_Q_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NPKT = 200;
  // expected beats per source: index 0..N-1 units, N bypass
  axis_beat_t exp_q [N+1][$];
  int done_src [N+1];

  function automatic axis_beat_t rand_beat(int src, int p, int b, int nb, int hop);
    axis_beat_t bt;
    bt = '0;
    bt.tdata = {16{$urandom}};
    bt.tdata[7:0] = 8'(src);
    bt.tkeep = '1;
    bt.tlast = (b == nb - 1);
    bt.tuser.timestamp = 32'(p);
    bt.tuser.chain_len = 4'd3;
    bt.tuser.chain[0] = off_id_t'(1);
    bt.tuser.chain[1] = off_id_t'(2);
    bt.tuser.chain[2] = off_id_t'(5);
    bt.tuser.hop = 4'(hop);
    bt.tuser.next_off = bt.tuser.chain[hop];
    return bt;
  endfunction

  // expected metadata after processing, computed here
  function automatic axis_beat_t processed(axis_beat_t bt);
    axis_beat_t r = bt;
    r.tuser.hop = bt.tuser.hop + 1;
    case (bt.tuser.hop)
      4'd0: r.tuser.next_off = off_id_t'(2);
      4'd1: r.tuser.next_off = off_id_t'(5);
      default: r.tuser.next_off = off_id_t'(7);
    endcase
    return r;
  endfunction

  initial begin
    byp_valid = 0; byp_beat = '0;
    wait (rst_n);
    for (int p = 0; p < NPKT; p++) begin
      int nb, hop;
      nb = $urandom_range(1, 6);
      hop = $urandom_range(0, 2);
      for (int b = 0; b < nb; b++) begin
        bit acc;
        @(negedge clk);
        byp_valid = 1;
        byp_beat = rand_beat(N, p, b, nb, hop);
        exp_q[N].push_back(byp_beat);
        acc = 0;
        while (!acc) begin
          #4 acc = byp_ready;
          if (!acc) @(negedge clk);
        end
      end
      @(negedge clk);
      byp_valid = 0;
      while ($urandom_range(0, 1) == 0) @(negedge clk);
    end
  end

  for (genvar u = 0; u < N; u++) begin : g_src
    initial begin
      u_valid[u] = 0; u_beat[u] = '0;
      wait (rst_n);
      for (int p = 0; p < NPKT; p++) begin
        int nb, hop;
        nb = $urandom_range(1, 6);
        hop = $urandom_range(0, 2);
        for (int b = 0; b < nb; b++) begin
          bit acc;
          @(negedge clk);
          u_valid[u] = 1;
          u_beat[u] = rand_beat(u, p, b, nb, hop);
          exp_q[u].push_back(processed(u_beat[u]));
          acc = 0;
          while (!acc) begin
            #4 acc = u_ready[u];
            if (!acc) @(negedge clk);
          end
        end
        @(negedge clk);
        u_valid[u] = 0;
        repeat ($urandom_range(0, 3 * N)) @(negedge clk);
      end
    end
  end

  bit mid = 0;
  int cur = 0, hdf_checks = 0, switches = 0, last_src = -1, idle_bad = 0, byp_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (byp_valid && !byp_ready) byp_full++;
    if (!mid && !dut.locked && (dut.bq_pkts != 0 || dut.pq_pkts != 0)) begin
      check(out_valid, "no idle cycle while a packet waits");
    end
    if (out_valid && !mid && dut.bq_pkts != 0 && dut.pq_pkts != 0) begin
      check(out_src == (dut.pq_count >= dut.bq_count), "highest fill level first");
      hdf_checks++;
    end
    if (out_valid && out_ready) begin
      int s;
      s = out_src ? int'(out_beat.tdata[7:0]) : N;
      if (!mid) begin
        cur = s;
        if (last_src >= 0 && (s == N) != (last_src == N)) switches++;
        last_src = s;
      end
      check(s == cur, "no interleaving inside a packet");
      check(out_src == (out_beat.tdata[7:0] != 8'(N)), "out_src matches source");
      if (s <= N) begin
        check(exp_q[s].size() > 0 && out_beat == exp_q[s][0], "beat and metadata");
        if (exp_q[s].size() > 0) void'(exp_q[s].pop_front());
      end
      if (out_beat.tlast) done_src[s]++;
      mid = !out_beat.tlast;
    end
  end

  initial begin
    out_ready = 0;
    for (int i = 0; i <= N; i++) done_src[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      forever begin
        @(negedge clk);
        out_ready = (($time / 2000) % 2 == 1) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 7) != 0);
      end
    join_none
    wait (done_src[0] == NPKT && done_src[1] == NPKT && done_src[2] == NPKT && done_src[3] == NPKT);
    check(hdf_checks > 20, "highest-demand-first decisions exercised");
    check(switches > 20, "switching between bypass and processed");
    check(byp_full > 0, "bypass queue back-pressure seen");
    $display("hdf decisions %0d, switches %0d, bypass full %0d", hdf_checks, switches, byp_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
