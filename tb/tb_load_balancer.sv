// tb_load_balancer: self-checking test of the load-aware Load Balancer.
//
// Four units with 8-beat input queues modelled by the testbench; the units
// fetch fragments at random (slow units 2 and 3 fetch rarely). Packets of
// random size (1..400 bytes) arrive back to back. A reference keeps its own
// load counters: +ceil(size/64) when a packet starts, -1 per fetched
// fragment. Checked: each packet start goes to the least loaded unit (lowest
// index on a tie), all beats of a packet go to the same unit, tready follows
// the selected queue's full flag, and the DUT counters equal the reference
// after every cycle. Least-loaded steering must send fewer packets to the
// slow units.
module tb_load_balancer;
  import flexpipe_pkg::*;
  import fp_tb_pkg::*;
  localparam int unsigned N = 4, QCAP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  axis_beat_t in_beat, q_beat;
  logic [N-1:0] q_push, q_full, q_pop;
  logic [11:0] load [N];
  logic [1:0] sel;

  load_balancer #(.NUM_UNITS(N), .LOAD_W(12)) dut (.*);

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

  int ref_load [N], qcnt [N], pkts_to [N];
  int cur_unit = -1, stalls = 0;

  function automatic int least();
    int l = 0;
    for (int i = 1; i < N; i++) if (ref_load[i] < ref_load[l]) l = i;
    return l;
  endfunction

  initial begin
    in_valid = 0; in_beat = '0; q_pop = '0; q_full = '0;
    for (int i = 0; i < N; i++) begin ref_load[i] = 0; qcnt[i] = 0; pkts_to[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 600; p++) begin
      int len, nb;
      len = $urandom_range(1, 400);
      nb  = nbeats(len);
      for (int b = 0; b < nb; b++) begin
        bit done;
        done = 0;
        while (!done) begin
          @(negedge clk);
          in_valid = 1;
          in_beat = '0;
          in_beat.tdata = {16{32'(p)}};
          in_beat.tlast = (b == nb - 1);
          in_beat.tuser.pkt_len = 16'(len);
          for (int i = 0; i < N; i++) begin
            q_full[i] = (qcnt[i] == QCAP);
            q_pop[i]  = (qcnt[i] > 0) && ($urandom_range(0, 99) < ((i < 2) ? 35 : 8));
          end
          #1;
          if (b == 0) begin
            check(sel == least(), "least loaded unit chosen");
            cur_unit = least();
          end else begin
            check(sel == cur_unit, "packet stays on one unit");
          end
          check(in_ready == !q_full[cur_unit], "ready follows selected queue");
          if (in_ready) check(q_push == (N'(1) << cur_unit) && q_beat == in_beat, "push strobe");
          else          check(q_push == '0, "no push when full");
          if (!in_ready) stalls++;
          @(posedge clk);
          done = in_ready;
          if (in_ready) begin
            qcnt[cur_unit]++;
            if (b == 0) begin ref_load[cur_unit] += nb; pkts_to[cur_unit]++; end
          end
          for (int i = 0; i < N; i++) if (q_pop[i]) begin qcnt[i]--; ref_load[i]--; end
          #1;
          for (int i = 0; i < N; i++) check(load[i] == 12'(ref_load[i]), "load counter");
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    check(pkts_to[0] + pkts_to[1] > 2 * (pkts_to[2] + pkts_to[3]), "slow units get less traffic");
    check(stalls > 0, "queue-full back-pressure seen");
    $display("packets per unit %0d %0d %0d %0d, stall cycles %0d", pkts_to[0], pkts_to[1], pkts_to[2], pkts_to[3], stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
