// tb_workload_sweep: the evaluation's load and recirculation sweeps on the
// pipeline with fewer, correspondingly faster Offload Units (as in
// tb_flexpipe_top).
//
// Sweep 1 (throughput against offered load): flows 1-4 with random sizes
// (64..1500 B) offered at 64, 80, 96, 112 and 128 Gbit/s. At every rate the
// pipeline must accept the traffic without throttling the source and deliver
// it at the offered rate.
// Sweep 2 (recirculation): at 90 Gbit/s (70 % of the 128 Gbit/s on-chip
// bandwidth) a share of the packets belongs to flow 5 (CRC, AES, SHA-3), which
// needs a second pass. A recirculated packet uses the pipeline twice, so the
// load is 0.7 * (1 + share): shares of 20 % and 35 % must be carried, while a
// share of 60 % exceeds the bandwidth and must throttle the source.
// Each phase drains before the next starts. Every packet is checked for
// delivery exactly once, intact payload and the offloads visited in chain
// order; the DMA side never stalls here.
module tb_workload_sweep;
  import flexpipe_pkg::*;
  import fp_tb_pkg::*;

  localparam int NPKT = 12000;   // all phases together

  logic clk = 0, rst_n = 0;
  always #2ns clk = ~clk;                // 250 MHz

  logic net_in_valid, net_in_ready, dma_out_valid, dma_out_ready;
  axis_beat_t net_in_beat, dma_out_beat;
  logic cfg_flow_we, cfg_chain_we;
  logic [3:0] cfg_flow_addr, cfg_chain_addr;
  flow_entry_t cfg_flow_entry;
  chain_entry_t cfg_chain_entry;
  logic [TOT-1:0] unit_in_valid, unit_in_ready, unit_out_valid, unit_out_ready;
  axis_beat_t unit_in_beat [TOT];
  axis_beat_t unit_out_beat [TOT];
  logic [31:0] now;

  localparam uint_arr_t NU = '{2, 4, 3, 1, 2, 1};
  localparam uint_arr_t WU = '{256, 256, 832, 512, 640, 768};
  localparam int unsigned TOT = total_units(NU);

  flexpipe_top #(.NUM_UNITS(NU)) dut (.*);

  // ---------------- Offload Unit models ----------------
  localparam uint_arr_t DELAY_PIPE = '{0, 8, 8, 0, 0, 0};
  for (genvar k = 0; k < NUM_OFFLOADS; k++) begin : g_off
    for (genvar u = 0; u < NU[k]; u++) begin : g_u
      localparam int unsigned IDX = base_of(NU, k) + u;
      offload_unit_model #(.ID(k), .W_UNIT(WU[k]), .F_UNIT_MHZ(UNIT_F_MHZ[k]),
                           .DELAY(DELAY_PIPE[k])) m (
        .clk, .rst_n,
        .in_valid(unit_in_valid[IDX]), .in_ready(unit_in_ready[IDX]), .in_beat(unit_in_beat[IDX]),
        .out_valid(unit_out_valid[IDX]), .out_ready(unit_out_ready[IDX]), .out_beat(unit_out_beat[IDX]));
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- flows and chains ----------------
  off_id_t chain_of [6][MAX_CHAIN];
  int      chain_n  [6];

  // per packet expectations
  int      exp_len  [NPKT];
  int      exp_flow [NPKT];
  logic [63:0] exp_trace [NPKT];
  int      exp_hops [NPKT];
  int      got      [NPKT];
  int      inj_cyc  [NPKT];

  // ---------------- mechanism counters ----------------
  int n_proc = 0, n_byp = 0, n_recirc = 0, n_dma_stall = 0, n_hdf_switch = 0,
      n_rewrite = 0, n_miss = 0, n_rec_first = 0;
  int fw_units_used = 0;
  bit fw_used [NU[1]];
  logic last_src [NUM_OFFLOADS];
  bit   mid_out  [NUM_OFFLOADS];

  for (genvar k = 0; k < NUM_OFFLOADS; k++) begin : g_mon
    always @(posedge clk) if (rst_n) begin
      if (dut.g_off[k].u_offload.u_splitter.in_valid && dut.g_off[k].u_offload.u_splitter.in_ready &&
          dut.g_off[k].u_offload.u_splitter.in_beat.tlast) begin
        if (dut.g_off[k].u_offload.u_splitter.proc_valid) n_proc++; else n_byp++;
      end
      if (dut.g_off[k].u_offload.out_valid && dut.g_off[k].u_offload.out_ready) begin
        if (!mid_out[k]) begin
          if (dut.g_off[k].u_offload.u_arb.out_src != last_src[k]) n_hdf_switch++;
          last_src[k] = dut.g_off[k].u_offload.u_arb.out_src;
        end
        mid_out[k] = !dut.g_off[k].u_offload.out_beat.tlast;
      end
    end
  end
  for (genvar u = 0; u < NU[1]; u++) begin : g_fw
    always @(posedge clk) if (unit_in_valid[base_of(NU, 1) + u] &&
                              unit_in_ready[base_of(NU, 1) + u] && !fw_used[u]) begin
      fw_used[u] = 1;
      fw_units_used++;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.rec_valid && dut.rec_ready && dut.rec_beat.tlast) n_recirc++;
    if (dma_out_valid && !dma_out_ready) n_dma_stall++;
    if (dut.u_ingress.out_valid && dut.u_ingress.out_ready && dut.u_ingress.out_is_rec &&
        dut.u_ingress.out_beat.tlast) n_rec_first++;
  end

  // ---------------- sink ----------------
  int n_rx = 0, rx_beat = 0, rx_pkt = -1, rx_bytes_win = 0, win_start = -1, win_end = -1;
  longint lat_sum [6];
  int     lat_n   [6];
  always @(posedge clk) if (rst_n && dma_out_valid && dma_out_ready) begin
    int p;
    p = int'(dma_out_beat.tdata[8*40 +: 16]);   // packet number in the payload
    if (rx_beat == 0) rx_pkt = p;
    if (rx_pkt < 0 || rx_pkt >= NPKT) begin
      check(0, "unknown packet");
    end else begin
      logic [DATA_W-1:0] want;
      if (rx_beat == 0) begin
        want = tag_header(rx_pkt);
        check(dma_out_beat.tdata[DATA_W-64-1:0] == want[DATA_W-64-1:0], "header intact");
        check(dma_out_beat.tdata[DATA_W-1 -: 64] == exp_trace[rx_pkt], "offloads visited in chain order");
        check(dma_out_beat.tuser.next_off == off_id_t'(OFF_NONE) &&
              int'(dma_out_beat.tuser.hop) == exp_hops[rx_pkt], "metadata says chain done");
        check(int'(dma_out_beat.tuser.flow_id) == exp_flow[rx_pkt] &&
              int'(dma_out_beat.tuser.pkt_len) == exp_len[rx_pkt], "flow and size");
      end else begin
        check(dma_out_beat.tdata == payload(rx_pkt, rx_beat), "payload intact");
      end
      check(dma_out_beat.tkeep == keep_of(exp_len[rx_pkt], rx_beat), "byte enables");
      check(dma_out_beat.tlast == (rx_beat == nbeats(exp_len[rx_pkt]) - 1), "packet boundary");
      if (dma_out_beat.tlast) begin
        got[rx_pkt]++;
        n_rx++;
        lat_sum[exp_flow[rx_pkt]] += longint'(now - dma_out_beat.tuser.timestamp);
        lat_n[exp_flow[rx_pkt]]++;
        if (n_rx == 30) win_start = cyc;
        if (n_rx > 30 && n_rx <= NPKT - 30) rx_bytes_win += exp_len[rx_pkt];
        if (n_rx == NPKT - 30) win_end = cyc;
      end
    end
    rx_beat = dma_out_beat.tlast ? 0 : rx_beat + 1;
  end

  function automatic logic [15:0] dport_of(int f);
    return (f == 0) ? 16'd80 : 16'(1000 + f);
  endfunction

  // header of packet p (packet number stored at bytes 40..41)
  function automatic logic [DATA_W-1:0] tag_header(int p);
    logic [DATA_W-1:0] d;
    d = header_beat(p, exp_len[p], 32'hC0A8_0001, 32'h0A00_0001, 16'd5000, dport_of(exp_flow[p]));
    d[8*40 +: 16] = 16'(p);
    return d;
  endfunction

  task automatic set_chain(int f, off_id_t ids [MAX_CHAIN], int n);
    @(negedge clk);
    cfg_chain_we = 1; cfg_chain_addr = 4'(f);
    cfg_chain_entry = '0;
    for (int i = 0; i < MAX_CHAIN; i++) cfg_chain_entry.chain[i] = ids[i];
    cfg_chain_entry.chain_len = 4'(n);
    @(negedge clk);
    cfg_chain_we = 0;
    chain_of[f] = ids; chain_n[f] = n;
  endtask

  int phase_rx_bytes = 0, phase_first_rx = -1, phase_last_rx = -1;
  always @(posedge clk) if (rst_n && dma_out_valid && dma_out_ready && dma_out_beat.tlast) begin
    if (phase_first_rx < 0) phase_first_rx = cyc;
    phase_last_rx = cyc;
  end
  always @(posedge clk) if (rst_n && dma_out_valid && dma_out_ready)
    phase_rx_bytes += $countones(dma_out_beat.tkeep);

  initial begin
    off_id_t c [MAX_CHAIN];
    five_tuple_t k, m;
    int sizes [6] = '{64, 128, 256, 512, 1024, 1500};
    real rates [8] = '{64.0, 80.0, 96.0, 112.0, 128.0, 90.0, 90.0, 90.0};
    real share [8] = '{0.0, 0.0, 0.0, 0.0, 0.0, 0.20, 0.35, 0.60};
    int  npk   [8] = '{1500, 1500, 1500, 1500, 1500, 1500, 1500, 1500};
    bit  feasible [8] = '{1, 1, 1, 1, 1, 1, 1, 0};
    real credit;
    int p;
    net_in_valid = 0; net_in_beat = '0; dma_out_ready = 1;
    cfg_flow_we = 0; cfg_chain_we = 0; cfg_flow_addr = 0; cfg_chain_addr = 0;
    cfg_flow_entry = '0; cfg_chain_entry = '0;
    for (int f = 0; f < 6; f++) begin chain_n[f] = 0; lat_sum[f] = 0; lat_n[f] = 0; for (int i = 0; i < MAX_CHAIN; i++) chain_of[f][i] = '0; end
    for (int q = 0; q < NPKT; q++) got[q] = 0;
    for (int u = 0; u < NU[1]; u++) fw_used[u] = 0;
    for (int i = 0; i < NUM_OFFLOADS; i++) begin last_src[i] = 0; mid_out[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int f = 1; f <= 5; f++) begin
      @(negedge clk);
      k = '0; m = '0; k.dst_port = dport_of(f); m.dst_port = '1;
      cfg_flow_we = 1; cfg_flow_addr = 4'(f - 1);
      cfg_flow_entry = '{valid: 1'b1, key: k, mask: m, flow_id: 4'(f), prio: 3'(f)};
      @(negedge clk);
      cfg_flow_we = 0;
    end
    c = '{OFF_CRC, OFF_FW, OFF_SHA3, OFF_AES, OFF_RSS, 0, 0, 0}; set_chain(1, c, 5);
    c = '{OFF_CRC, OFF_SHA3, OFF_JPEG, OFF_RSS, 0, 0, 0, 0};     set_chain(2, c, 4);
    c = '{OFF_CRC, OFF_AES, OFF_JPEG, 0, 0, 0, 0, 0};            set_chain(3, c, 3);
    c = '{OFF_CRC, OFF_FW, 0, 0, 0, 0, 0, 0};                    set_chain(4, c, 2);
    c = '{OFF_CRC, OFF_AES, OFF_SHA3, 0, 0, 0, 0, 0};            set_chain(5, c, 3);
    p = 0;
    for (int ph = 0; ph < 8; ph++) begin
      real rate, in_gbps, out_gbps;
      int t0, t1, in_bytes, p0;
      rate = rates[ph] / 128.0;
      credit = 0.0;
      in_bytes = 0;
      p0 = p;
      phase_rx_bytes = 0; phase_first_rx = -1; phase_last_rx = -1;
      @(negedge clk);
      t0 = cyc;
      for (int i = 0; i < npk[ph]; i++, p++) begin
        int f, len, nb;
        f = ($urandom_range(0, 999) < int'(share[ph] * 1000.0)) ? 5 : $urandom_range(1, 4);
        len = sizes[$urandom_range(0, 5)];
        nb = nbeats(len);
        exp_len[p] = len; exp_flow[p] = f;
        exp_trace[p] = trace_of(chain_of[f], chain_n[f]);
        exp_hops[p] = chain_n[f];
        while (credit < 0.0) begin credit += rate; @(negedge clk); end
        for (int b = 0; b < nb; b++) begin
          bit acc;
          net_in_valid = 1;
          net_in_beat = '0;
          net_in_beat.tdata = (b == 0) ? tag_header(p) : payload(p, b);
          net_in_beat.tkeep = keep_of(len, b);
          net_in_beat.tlast = (b == nb - 1);
          acc = 0;
          while (!acc) begin
            #1ns acc = net_in_ready;
            credit += rate;
            @(negedge clk);
          end
          credit -= 1.0;
        end
        net_in_valid = 0;
        in_bytes += len;
      end
      t1 = cyc;
      wait (n_rx == p);
      in_gbps  = real'(in_bytes) * 8.0 / real'(t1 - t0) * 0.25;
      out_gbps = (phase_last_rx > phase_first_rx) ?
                 real'(phase_rx_bytes) * 8.0 / real'(phase_last_rx - phase_first_rx) * 0.25 : 0.0;
      $display("phase %0d: offered %0.0f Gbit/s, recirculated share %0.2f: accepted %0.1f Gbit/s, delivered %0.1f Gbit/s",
               ph, rates[ph], share[ph], in_gbps, out_gbps);
      if (feasible[ph]) begin
        check(in_gbps > 0.95 * rates[ph], "source not throttled at a load the pipeline can carry");
        check(out_gbps > 0.90 * rates[ph], "delivered rate follows the offered rate");
      end else begin
        check(in_gbps < 0.95 * rates[ph], "source throttled when recirculation exceeds the bandwidth");
      end
      repeat (20) @(negedge clk);
    end
    for (int q = 0; q < NPKT; q++) check(got[q] == 1, "packet delivered exactly once");
    check(n_recirc > 0, "recirculation happened");
    $display("recirculated %0d", n_recirc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
