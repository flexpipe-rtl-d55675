// tb_flexpipe_top: end-to-end test of the whole pipeline with fewer, faster
// Offload Units (a quick-to-build version of tb_flexpipe_full).
//
// The pipeline is built with 2, 4, 3, 1, 2 and 1 units for CRC, firewall,
// SHA-3, AES, JPEG and RSS; each unit model is made correspondingly wider so
// every offload keeps the bandwidth of its full set of units. The testbench plays the traffic
// generator and sink: it writes the classification and chain tables, then
// injects NPKT packets of random size (64..1500 B) at 90 Gbit/s, spread over
// these flows (destination port selects the flow):
//   flow 1: CRC, firewall, SHA-3, AES, RSS    flow 2: CRC, SHA-3, JPEG, RSS
//   flow 3: CRC, AES, JPEG                    flow 4: CRC, firewall
//   flow 5: CRC, AES, SHA-3 (needs one recirculation)
//   no match: flow 0, empty chain (straight to DMA)
// Halfway the chain of flow 4 is changed to CRC, RSS at run time. The DMA
// side stalls one cycle in sixteen. The sink checks that every packet arrives
// exactly once, with its payload intact, with a trace showing exactly its
// chain's offloads in chain order, and with metadata marking the chain done;
// it measures latency per flow and throughput. It also counts how often each
// mechanism happened: processing, bypass, use of several units of one offload,
// highest-demand-first switches, recirculation, DMA back-pressure, table
// rewrite, table miss. A mechanism that never happened counts as a failure.
module tb_flexpipe_top;
  import flexpipe_pkg::*;
  import fp_tb_pkg::*;

  localparam int NPKT = 300;
  localparam real RATE = 90.0 / 128.0;   // offered load, beats per cycle

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
    repeat (400000) @(posedge clk);
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

  initial begin
    off_id_t c [MAX_CHAIN];
    five_tuple_t k, m;
    int sizes [6] = '{64, 128, 256, 512, 1024, 1500};
    real credit;
    net_in_valid = 0; net_in_beat = '0; dma_out_ready = 1;
    cfg_flow_we = 0; cfg_chain_we = 0; cfg_flow_addr = 0; cfg_chain_addr = 0;
    cfg_flow_entry = '0; cfg_chain_entry = '0;
    for (int f = 0; f < 6; f++) begin chain_n[f] = 0; lat_sum[f] = 0; lat_n[f] = 0; for (int i = 0; i < MAX_CHAIN; i++) chain_of[f][i] = '0; end
    for (int p = 0; p < NPKT; p++) got[p] = 0;
    for (int u = 0; u < NU[1]; u++) fw_used[u] = 0;
    for (int i = 0; i < NUM_OFFLOADS; i++) begin last_src[i] = 0; mid_out[i] = 0; end
    repeat (4) @(posedge clk);
    rst_n = 1;
    // SDN controller: flow table (by destination port) and chains
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
    fork
      forever begin
        @(negedge clk);
        dma_out_ready = (cyc % 16) != 7;
      end
    join_none
    // traffic generator
    credit = 0.0;
    @(negedge clk);
    for (int p = 0; p < NPKT; p++) begin
      int f, len, nb;
      if (p == NPKT / 2) begin
        repeat (4) @(negedge clk);
        c = '{OFF_CRC, OFF_RSS, 0, 0, 0, 0, 0, 0};
        set_chain(4, c, 2);
        n_rewrite++;
        @(negedge clk);
      end
      f = (p % 25 == 0) ? 0 : $urandom_range(1, 5);
      if (f == 0) n_miss++;
      len = sizes[$urandom_range(0, 5)];
      nb = nbeats(len);
      exp_len[p] = len; exp_flow[p] = f;
      exp_trace[p] = trace_of(chain_of[f], chain_n[f]);
      exp_hops[p] = chain_n[f];
      // pace to the offered rate
      while (credit < 0.0) begin credit += RATE; @(negedge clk); end
      for (int b = 0; b < nb; b++) begin
        bit acc;
        net_in_valid = 1;
        net_in_beat = '0;
        net_in_beat.tdata = (b == 0) ? tag_header(p) : payload(p, b);
        net_in_beat.tkeep = keep_of(len, b);
        net_in_beat.tlast = (b == nb - 1);
        if (b == 0) inj_cyc[p] = cyc;
        acc = 0;
        while (!acc) begin
          #1ns acc = net_in_ready;
          credit += RATE;
          @(negedge clk);
        end
        credit -= 1.0;
      end
      net_in_valid = 0;
    end
    wait (n_rx == NPKT);
    repeat (100) @(posedge clk);
    for (int p = 0; p < NPKT; p++) check(got[p] == 1, "packet delivered exactly once");
    check(n_rx == NPKT, "all packets delivered");
    begin
      real thr;
      thr = (win_end > win_start) ? (real'(rx_bytes_win) * 8.0 / real'(win_end - win_start)) * 0.25 : 0.0;
      $display("throughput over the measurement window: %0.1f Gbit/s (offered %0.1f)", thr, RATE * 128.0);
      check(thr > 0.8 * RATE * 128.0, "throughput keeps up with the offered load");
    end
    for (int f = 0; f < 6; f++)
      if (lat_n[f] > 0)
        $display("flow %0d: %0d packets, mean latency %0d cycles (%0.2f us)", f, lat_n[f],
                 lat_sum[f] / lat_n[f], real'(lat_sum[f]) / lat_n[f] / 250.0);
    $display("processed %0d bypassed %0d recirculated %0d (taken first %0d) firewall units used %0d",
             n_proc, n_byp, n_recirc, n_rec_first, fw_units_used);
    $display("hdf switches %0d dma stalls %0d table rewrites %0d table misses %0d",
             n_hdf_switch, n_dma_stall, n_rewrite, n_miss);
    check(n_proc > 0, "mechanism: processing");
    check(n_byp > 0, "mechanism: bypass");
    check(fw_units_used > 1, "mechanism: load balancing over several units");
    check(n_hdf_switch > 0, "mechanism: highest-demand-first switching");
    check(n_recirc > 0, "mechanism: recirculation");
    check(n_rec_first > 0, "mechanism: recirculated packet re-enters");
    check(n_dma_stall > 0, "mechanism: DMA back-pressure");
    check(n_rewrite > 0, "mechanism: runtime chain rewrite");
    check(n_miss > 0, "mechanism: flow-table miss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
