// tb_afs_round_buffer: self-checking test of the round buffer (distance 5).
//
// Random syndrome rounds arrive with random gaps.  The testbench computes the
// expected detection events (each round XOR the previous one, the first round
// after reset against zeros), collects D rounds per logical cycle, and checks
// the X and Z halves of every logical cycle the consumer takes.  The consumer
// is sometimes slow, so a cycle completes before the previous one was taken:
// then `backlog` must pulse and the newer cycle replaces the older one.
// Mechanisms counted: cycles taken and backlogs, both must occur.
module tb_afs_round_buffer;
  localparam int D = 5, RC = D * (D - 1), NLAT = D * RC;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              rnd_valid = 0;
  logic [2*RC-1:0]   rnd_syn = '0;
  logic              out_valid, out_ready = 0, backlog;
  logic [NLAT-1:0]   out_syn_x, out_syn_z;

  afs_round_buffer #(.D(D)) dut (.*);

  int checks = 0, failures = 0, n_taken = 0, n_backlog = 0, exp_backlog = 0;
  bit [2*RC-1:0] prev = '0;
  bit [NLAT-1:0] cx, cz, lastx, lastz;
  bit            avail = 0;
  int            t = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && backlog) n_backlog++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      bit slow;
      @(negedge clk);
      slow = (it / 500) % 2;
      rnd_valid = ($urandom_range(2) == 0);
      for (int i = 0; i < 2 * RC; i++) rnd_syn[i] = ($urandom_range(7) == 0);
      out_ready = slow ? ($urandom_range(40) == 0) : ($urandom_range(1) == 0);
      #1;
      check(out_valid == avail, "output valid");
      if (out_valid && out_ready) begin
        check(out_syn_x == lastx && out_syn_z == lastz, "logical cycle contents");
        n_taken++;
      end
      @(posedge clk);
      if (out_valid && out_ready) avail = 0;
      if (rnd_valid) begin
        bit [2*RC-1:0] diff;
        diff = rnd_syn ^ prev;
        prev = rnd_syn;
        cx[t*RC +: RC] = diff[RC-1:0];
        cz[t*RC +: RC] = diff[2*RC-1:RC];
        t++;
        if (t == D) begin
          t = 0;
          if (avail) exp_backlog++;
          lastx = cx;
          lastz = cz;
          avail = 1;
        end
      end
    end
    repeat (2) @(posedge clk);
    check(n_backlog == exp_backlog, $sformatf("backlogs %0d expected %0d", n_backlog, exp_backlog));
    $display("mechanisms: cycles_taken=%0d backlogs=%0d", n_taken, n_backlog);
    check(n_taken > 0, "no logical cycle taken");
    check(n_backlog > 0, "no backlog");
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
