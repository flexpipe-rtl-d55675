// tb_pre_processor: self-checking test of the Pre-Processor.
//
// The flow table is loaded with four entries that classify UDP packets by
// destination port or destination address (flows 1-4, with priorities), and
// the chain table with the four offload chains of the evaluation traffic:
//   flow 1: CRC, firewall, SHA-3, AES, RSS    flow 2: CRC, SHA-3, JPEG, RSS
//   flow 3: CRC, AES, JPEG                    flow 4: CRC, firewall
// Unmatched packets get flow 0 with an empty chain. Random packets of the
// evaluation sizes (64..1500 bytes) are sent with random output back-pressure;
// every output beat is compared with independently computed metadata (size,
// flow, priority, chain, hop 0, next offload, timestamp = cycle the first beat
// was accepted) and unchanged data. Halfway, the chain of flow 4 is rewritten
// at run time and later packets must carry the new chain. With no
// back-pressure the latency must be two cycles.
module tb_pre_processor;
  import flexpipe_pkg::*;
  import fp_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  axis_beat_t in_beat, out_beat;
  logic cfg_flow_we, cfg_chain_we;
  logic [3:0] cfg_flow_addr, cfg_chain_addr;
  flow_entry_t cfg_flow_entry;
  chain_entry_t cfg_chain_entry;
  logic [31:0] now;

  pre_processor dut (.*);

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

  localparam int NPKT = 400;
  int unsigned sizes [6] = '{64, 128, 256, 512, 1024, 1500};
  off_id_t chains [5][MAX_CHAIN];
  int chain_n [5];
  axis_beat_t exp_q [$];
  int lat_q [$];
  int n_out = 0, flows_seen [5], lat_ok = 0;
  bit strict_latency = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic set_chain(int f, off_id_t ids [MAX_CHAIN], int n);
    @(negedge clk);
    cfg_chain_we = 1; cfg_chain_addr = 4'(f);
    cfg_chain_entry = '0;
    for (int i = 0; i < MAX_CHAIN; i++) cfg_chain_entry.chain[i] = ids[i];
    cfg_chain_entry.chain_len = 4'(n);
    @(negedge clk);
    cfg_chain_we = 0;
    chains[f] = ids; chain_n[f] = n;
  endtask

  task automatic set_flow(int addr, five_tuple_t key, five_tuple_t mask, int f, int prio);
    @(negedge clk);
    cfg_flow_we = 1; cfg_flow_addr = 4'(addr);
    cfg_flow_entry = '{valid: 1'b1, key: key, mask: mask, flow_id: 4'(f), prio: 3'(prio)};
    @(negedge clk);
    cfg_flow_we = 0;
  endtask

  // Monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(exp_q.size() > 0 && out_beat == exp_q[0], "output beat and metadata");
    if (exp_q.size() > 0 && out_beat != exp_q[0])
      $display("  got flow %0d len %0d ts %0d next %0d; exp flow %0d len %0d ts %0d next %0d",
               out_beat.tuser.flow_id, out_beat.tuser.pkt_len, out_beat.tuser.timestamp, out_beat.tuser.next_off,
               exp_q[0].tuser.flow_id, exp_q[0].tuser.pkt_len, exp_q[0].tuser.timestamp, exp_q[0].tuser.next_off);
    if (exp_q.size() > 0) void'(exp_q.pop_front());
    if (strict_latency && lat_q.size() > 0) begin
      check(cyc - lat_q[0] == 2, "two-cycle latency");
      lat_ok++;
    end
    if (lat_q.size() > 0) void'(lat_q.pop_front());
    if (out_beat.tlast) begin
      n_out++;
      flows_seen[out_beat.tuser.flow_id]++;
    end
  end

  initial begin
    off_id_t c [MAX_CHAIN];
    five_tuple_t k, m;
    in_valid = 0; in_beat = '0; out_ready = 1;
    cfg_flow_we = 0; cfg_chain_we = 0; cfg_flow_addr = 0; cfg_chain_addr = 0;
    cfg_flow_entry = '0; cfg_chain_entry = '0;
    for (int f = 0; f < 5; f++) begin chain_n[f] = 0; flows_seen[f] = 0; foreach (c[i]) chains[f][i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // tables
    c = '{OFF_CRC, OFF_FW, OFF_SHA3, OFF_AES, OFF_RSS, 0, 0, 0};  set_chain(1, c, 5);
    c = '{OFF_CRC, OFF_SHA3, OFF_JPEG, OFF_RSS, 0, 0, 0, 0};      set_chain(2, c, 4);
    c = '{OFF_CRC, OFF_AES, OFF_JPEG, 0, 0, 0, 0, 0};             set_chain(3, c, 3);
    c = '{OFF_CRC, OFF_FW, 0, 0, 0, 0, 0, 0};                     set_chain(4, c, 2);
    k = '0; m = '0; k.dst_port = 16'd1001; m.dst_port = '1;            set_flow(0, k, m, 1, 2);
    k = '0; m = '0; k.dst_port = 16'd1002; m.dst_port = '1;            set_flow(1, k, m, 2, 1);
    k = '0; m = '0; k.dst_ip = 32'h0A00_0300; m.dst_ip = 32'hFFFF_FF00; set_flow(2, k, m, 3, 5);
    k = '0; m = '0; k.dst_port = 16'd1004; m.dst_port = '1; k.proto = 8'd17; m.proto = '1; set_flow(3, k, m, 4, 0);
    for (int p = 0; p < NPKT; p++) begin
      int f, len, nb, prio;
      logic [31:0] dip;
      logic [15:0] dport;
      pkt_meta_t mt;
      if (p == NPKT / 2) begin
        c = '{OFF_CRC, OFF_RSS, 0, 0, 0, 0, 0, 0};
        set_chain(4, c, 2);
      end
      strict_latency = (p >= NPKT - 40);
      f = $urandom_range(0, 4);
      len = sizes[$urandom_range(0, 5)];
      nb = nbeats(len);
      dip = 32'h0A00_0001; dport = 16'd80; prio = 0;
      case (f)
        1: begin dport = 16'd1001; prio = 2; end
        2: begin dport = 16'd1002; prio = 1; end
        3: begin dip = 32'h0A00_0300 | 32'($urandom_range(0, 255)); prio = 5; end
        4: begin dport = 16'd1004; prio = 0; end
        default: ;
      endcase
      for (int b = 0; b < nb; b++) begin
        bit acc;
        @(negedge clk);
        out_ready = strict_latency ? 1'b1 : ($urandom_range(0, 3) != 0);
        in_valid = 1;
        in_beat = '0;
        in_beat.tdata = (b == 0) ? header_beat(p, len, 32'hC0A8_0001, dip, 16'd5000, dport) : payload(p, b);
        in_beat.tkeep = keep_of(len, b);
        in_beat.tlast = (b == nb - 1);
        in_beat.tuser = '1;   // must be ignored
        acc = 0;
        while (!acc) begin
          #4 acc = in_ready;
          if (acc && b == 0) begin
            mt = make_meta(len, chains[f], chain_n[f], 0);
            mt.flow_id = 4'(f);
            mt.prio = 3'(prio);
            mt.timestamp = now;
          end
          if (!acc) begin
            @(negedge clk);
            out_ready = strict_latency ? 1'b1 : ($urandom_range(0, 3) != 0);
          end
        end
        begin
          axis_beat_t e;
          e = in_beat;
          e.tuser = mt;
          exp_q.push_back(e);
          lat_q.push_back(cyc);
        end
      end
      @(negedge clk);
      in_valid = 0;
    end
    repeat (20) @(posedge clk);
    check(n_out == NPKT, "all packets out");
    for (int f = 0; f < 5; f++) check(flows_seen[f] > 40, "every flow and the miss case seen");
    check(lat_ok > 10, "latency measured");
    $display("packets %0d, per flow %0d %0d %0d %0d %0d", n_out, flows_seen[0], flows_seen[1], flows_seen[2], flows_seen[3], flows_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
