// tb_offload: self-checking test of one Offload (splitter, load balancer,
// unit queues, arbiter) with four behavioural Offload Units attached.
//
// The Offload has id 2; each unit model takes 128 bits per pipeline cycle
// (a quarter of line rate) and adds 5 cycles. Phase 1 sends single bypass
// packets into the idle Offload and a back-to-back burst of bypass packets:
// a lone packet must leave one cycle after its last beat entered, and the
// burst must stream at one beat per cycle. Phase 2 sends a random mix of
// packets that need this Offload and packets that do not. Every packet must
// leave exactly once with its data unchanged, except that processed packets
// carry this Offload in their trace field and metadata advanced to the next
// chain entry; bypassed packets keep their metadata. All four units must get
// work.
module tb_offload;
  import flexpipe_pkg::*;
  import fp_tb_pkg::*;
  localparam int unsigned N = 4, ID = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  axis_beat_t in_beat, out_beat;
  logic [N-1:0] unit_in_valid, unit_in_ready, unit_out_valid, unit_out_ready;
  axis_beat_t unit_in_beat [N];
  axis_beat_t unit_out_beat [N];

  offload #(.OFFLOAD_ID(ID), .NUM_UNITS(N)) dut (.*);

  for (genvar u = 0; u < N; u++) begin : g_unit
    offload_unit_model #(.ID(ID), .W_UNIT(128), .F_UNIT_MHZ(250), .DELAY(5)) m (
      .clk, .rst_n,
      .in_valid(unit_in_valid[u]), .in_ready(unit_in_ready[u]), .in_beat(unit_in_beat[u]),
      .out_valid(unit_out_valid[u]), .out_ready(unit_out_ready[u]), .out_beat(unit_out_beat[u]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected packets keyed by packet number (carried in the timestamp field)
  axis_beat_t exp_pkt [int][$];
  int out_beat_idx [int];
  int n_out = 0, n_proc_out = 0, n_byp_out = 0, first_out_cyc = -1, last_out_cyc = -1;
  int unit_pkts [N];
  bit mid = 0;
  int cur = 0;

  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < N; u++)
      if (unit_in_valid[u] && unit_in_ready[u] && unit_in_beat[u].tlast) unit_pkts[u]++;
    if (out_valid && out_ready) begin
      int p;
      p = int'(out_beat.tuser.timestamp);
      if (!mid) cur = p;
      check(p == cur, "no interleaving");
      if (!exp_pkt.exists(p) || exp_pkt[p].size() == 0) begin
        check(0, "unexpected beat");
      end else begin
        check(out_beat == exp_pkt[p][0], "beat, trace and metadata");
        void'(exp_pkt[p].pop_front());
      end
      if (first_out_cyc < 0) first_out_cyc = cyc;
      last_out_cyc = cyc;
      if (out_beat.tlast) begin
        n_out++;
        if (out_beat.tuser.hop == 2) n_proc_out++; else n_byp_out++;
      end
      mid = !out_beat.tlast;
    end
  end

  int last_in_cyc;
  task automatic send(int p, int len, bit proc, bit gap);
    int nb;
    off_id_t ids [MAX_CHAIN];
    nb = nbeats(len);
    ids = '{0, 2, 4, 0, 0, 0, 0, 0};   // chain CRC, SHA-3, JPEG; hop 1 -> id 2
    for (int b = 0; b < nb; b++) begin
      bit acc;
      axis_beat_t e;
      in_valid = 1;
      in_beat = '0;
      in_beat.tdata = (b == 0) ? header_beat(p, len, 1, 2, 3, 4) : payload(p, b);
      in_beat.tkeep = keep_of(len, b);
      in_beat.tlast = (b == nb - 1);
      in_beat.tuser = make_meta(len, ids, 3, proc ? 1 : 0);
      in_beat.tuser.timestamp = 32'(p);
      e = in_beat;
      if (proc) begin
        if (b == 0) e.tdata[DATA_W-1 -: 64] = trace_of('{off_id_t'(ID), 0, 0, 0, 0, 0, 0, 0}, 1);
        e.tuser = make_meta(len, ids, 3, 2);
        e.tuser.timestamp = 32'(p);
      end
      exp_pkt[p].push_back(e);
      acc = 0;
      while (!acc) begin
        #4 acc = in_ready;
        if (!acc) @(negedge clk);
      end
      last_in_cyc = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    if (gap) repeat ($urandom_range(0, 4)) @(negedge clk);
  endtask

  initial begin
    int sizes [6] = '{64, 128, 256, 512, 1024, 1500};
    int total_beats, t_start;
    in_valid = 0; in_beat = '0; out_ready = 1;
    for (int u = 0; u < N; u++) unit_pkts[u] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Phase 1a: lone bypass packet, latency
    for (int i = 0; i < 3; i++) begin
      int n_before;
      n_before = n_out;
      first_out_cyc = -1;
      send(i, 256, 0, 0);
      wait (n_out == n_before + 1);
      check(first_out_cyc == last_in_cyc + 1, "bypass latency: out one cycle after last beat in");
      @(negedge clk);
    end
    // Phase 1b: back-to-back burst of 20 bypass packets of 1024 B
    first_out_cyc = -1;
    t_start = cyc;
    for (int i = 0; i < 20; i++) send(10 + i, 1024, 0, 0);
    wait (n_out == 23);
    @(negedge clk);
    check(last_in_cyc - t_start == 20 * 16 - 1, "input accepted at line rate");
    check(last_out_cyc - first_out_cyc == 20 * 16 - 1, "output at one beat per cycle");
    // Phase 2: random mix
    fork
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(0, 9) != 0);
      end
    join_none
    total_beats = 0;
    for (int p = 100; p < 400; p++) send(p, sizes[$urandom_range(0, 5)], $urandom_range(0, 1), 1);
    wait (n_out == 323);
    repeat (50) @(posedge clk);
    check(n_out == 323, "every packet left exactly once");
    for (int u = 0; u < N; u++) check(unit_pkts[u] > 8, "every unit used");
    check(n_proc_out > 100 && n_byp_out > 100, "both paths used");
    $display("out %0d (processed %0d, bypassed %0d), per unit %0d %0d %0d %0d", n_out, n_proc_out, n_byp_out,
             unit_pkts[0], unit_pkts[1], unit_pkts[2], unit_pkts[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
