// tb_traffic_splitter: self-checking test of the Traffic Splitter.
//
// Random packets (1..4 beats) whose next-required-offload field is either this
// Offload's id (3) or another id, under random back-pressure on both outputs.
// Every cycle the outputs are compared with the routing rule; every beat that
// leaves is compared with the beat a reference queue expects on that output.
// Both routes must be used, and the split must add no cycle of latency.
module tb_traffic_splitter;
  import flexpipe_pkg::*;
  localparam int unsigned ID = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, proc_valid, proc_ready, byp_valid, byp_ready;
  axis_beat_t in_beat, proc_beat, byp_beat;

  traffic_splitter #(.OFFLOAD_ID(ID)) dut (.*);

  int checks = 0, failures = 0, n_proc = 0, n_byp = 0;
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

  initial begin
    in_valid = 0; in_beat = '0; proc_ready = 0; byp_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int unsigned nb;
      off_id_t nxt;
      nb  = $urandom_range(1, 4);
      nxt = ($urandom_range(0, 1) == 0) ? off_id_t'(ID) : off_id_t'($urandom_range(0, 2));
      if ($urandom_range(0, 9) == 0) nxt = off_id_t'(OFF_NONE);
      for (int unsigned b = 0; b < nb; b++) begin
        in_valid = 1;
        in_beat.tdata = {16{$urandom}};
        in_beat.tkeep = '1;
        in_beat.tlast = (b == nb - 1);
        in_beat.tuser = '0;
        in_beat.tuser.next_off = nxt;
        in_beat.tuser.pkt_len  = 16'(p);
        forever begin
          proc_ready = $urandom_range(0, 2) != 0;
          byp_ready  = $urandom_range(0, 2) != 0;
          #1;
          check(proc_valid == (nxt == off_id_t'(ID)), "proc_valid rule");
          check(byp_valid  == (nxt != off_id_t'(ID)), "byp_valid rule");
          check(in_ready == ((nxt == off_id_t'(ID)) ? proc_ready : byp_ready), "ready rule");
          if (proc_valid) check(proc_beat == in_beat, "proc beat intact");
          if (byp_valid)  check(byp_beat == in_beat, "bypass beat intact");
          @(posedge clk);
          if (in_ready) break;
        end
        if (b == nb - 1) begin
          if (nxt == off_id_t'(ID)) n_proc++; else n_byp++;
        end
      end
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) @(posedge clk);
    end
    check(n_proc > 50 && n_byp > 50, "both routes used");
    $display("processed packets %0d, bypassed packets %0d", n_proc, n_byp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
