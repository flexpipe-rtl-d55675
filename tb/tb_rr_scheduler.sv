// tb_rr_scheduler: self-checking test of the nested round-robin scheduler.
//
// Five units (a non-power-of-two count) hold random numbers of finished
// packets of random length; new packets arrive at random. The testbench
// forwards the granted packet beat by beat with random stalls. At each packet
// start the grant must be the first requesting unit after the previously
// granted one (reference pointer model); during a packet the grant must not
// move. With all units requesting the grants must visit every unit in turn,
// and a new packet must be granted in the cycle after the previous packet's
// last beat.
module tb_rr_scheduler;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req;
  logic xfer, xfer_last, gnt_valid;
  logic [$clog2(N)-1:0] gnt;

  rr_scheduler #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
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

  int pending [N];
  int last_gnt = N - 1;
  int grants [N];
  int back_to_back = 0;

  function automatic int expected();
    for (int k = 1; k <= N; k++) begin
      int i = (last_gnt + k) % N;
      if (pending[i] > 0) return i;
    end
    return -1;
  endfunction

  always_comb for (int i = 0; i < N; i++) req[i] = pending[i] > 0;

  initial begin
    xfer = 0; xfer_last = 0;
    for (int i = 0; i < N; i++) begin pending[i] = 0; grants[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Phase 1: all units busy, in-order rotation.
    for (int i = 0; i < N; i++) pending[i] = 3;
    for (int p = 0; p < 2000; p++) begin
      int e, len, g;
      bit prev_last;
      if (p >= 15 && $urandom_range(0, 1) == 0) pending[$urandom_range(0, N - 1)]++;
      #1;
      e = expected();
      if (e < 0) begin
        check(!gnt_valid, "no grant without request");
        @(posedge clk);
        continue;
      end
      check(gnt_valid && gnt == e, "round-robin order");
      if (p < 15) check(e == p % N, "rotation with all requesting");
      g = gnt;
      len = $urandom_range(1, 3);
      for (int b = 0; b < len; b++) begin
        while ($urandom_range(0, 3) == 0) begin
          xfer = 0; @(posedge clk); #1;
          check(gnt_valid && gnt == g, "grant held while stalled");
        end
        xfer = 1; xfer_last = (b == len - 1);
        #1 check(gnt == g, "grant held in packet");
        @(posedge clk);
        #0;
        xfer = 0; xfer_last = 0;
      end
      pending[g]--;
      grants[g]++;
      last_gnt = g;
      #1;
      if (expected() >= 0) begin
        check(gnt_valid, "grant available right after last beat");
        back_to_back++;
      end
    end
    for (int i = 0; i < N; i++) check(grants[i] > 100, "every unit served");
    $display("grants %0d %0d %0d %0d %0d, back-to-back %0d", grants[0], grants[1], grants[2], grants[3], grants[4], back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
