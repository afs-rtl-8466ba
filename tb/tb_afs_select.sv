// tb_afs_select: self-checking test of the first-ready select logic (4
// producers).
//
// Producers raise requests at random times and hold them until served; the
// consumer takes the granted producer after a random delay, after which that
// request drops.  A behavioural model of the policy (requests join a queue in
// the order raised; requests raised in the same cycle join one per cycle in
// round-robin order after the last joined index) predicts every grant; the
// testbench also checks that a granted producer is always requesting and that
// no request waits longer than a bound.  Mechanism counted: cycles with
// several new requests at once (round-robin tie-breaking), which must occur.
module tb_afs_select;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] req = '0;
  logic         take = 0;
  logic         gnt_valid;
  logic [1:0]   gnt_idx;

  afs_select #(.N(N)) dut (.*);

  int checks = 0, failures = 0, ties = 0;
  int mq [$];
  bit [N-1:0] mqueued = '0;
  int rr = 0;
  int wait_cyc [N];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) wait_cyc[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      bit [N-1:0] pend;
      int pick;
      bit deq;
      @(negedge clk);
      // consumer
      take = gnt_valid && ($urandom_range(2) == 0);
      // producers raise requests; some raise together
      if ($urandom_range(3) == 0) req = req | N'($urandom_range(15));
      #1;
      check(gnt_valid == (mq.size() != 0), "grant valid");
      if (gnt_valid) begin
        check(int'(gnt_idx) == mq[0], $sformatf("grant %0d expected %0d", gnt_idx, mq[0]));
        check(req[gnt_idx], "granted producer is not requesting");
      end
      for (int i = 0; i < N; i++) begin
        if (req[i]) wait_cyc[i]++;
        check(wait_cyc[i] < 40 * N, "request starved");
      end
      // model update at the clock edge
      pend = req & ~mqueued;
      if ($countones(pend) > 1) ties++;
      pick = -1;
      for (int i = 0; i < N; i++)
        if (pick < 0 && pend[(rr + i) % N]) pick = (rr + i) % N;
      deq = take && mq.size() != 0;
      @(posedge clk);
      if (deq) begin
        int g;
        g = mq.pop_front();
        mqueued[g] = 0;
        #1 req[g] = 0;
        wait_cyc[g] = 0;
      end
      if (pick >= 0) begin
        mq.push_back(pick);
        mqueued[pick] = 1;
        rr = (pick + 1) % N;
      end
    end
    $display("mechanisms: round_robin_ties=%0d", ties);
    check(ties > 0, "no simultaneous new requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
