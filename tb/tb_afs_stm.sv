// tb_afs_stm: self-checking test of the Spanning Tree Memory and its Zero Data
// Register (distance 5).
//
// A reference model (array of words plus row flags) follows every load and
// write.  Random syndromes are loaded, random growth-state writes (including
// writes to the boundary node, which must be ignored) are applied, and in every
// cycle both read ports are compared with the model at random addresses and
// the ZDR with the rows that hold any non-zero bit.  Port A reads back the last
// written address one cycle later to check write-then-read timing.
module tb_afs_stm;
  import afs_pkg::*;

  localparam int D = 5, C = D - 1, NLAT = D * D * C, NROWS = D * D;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             load_en = 0;
  logic [NLAT-1:0]  load_syn = '0;
  node_t            a_node = '0, b_node = '0;
  stm_word_t        a_word, b_word;
  logic             a_we = 0;
  dir_t             a_dir = DIR_E;
  grow_t            a_wdata = '0;
  logic [NROWS-1:0] zdr;

  afs_stm #(.D(D)) dut (.*);

  int checks = 0, failures = 0;
  stm_word_t     m [NLAT];
  bit [NROWS-1:0] mz;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      load_en = 0;
      a_we    = 0;
      if (it % 300 == 0) begin
        load_en = 1;
        for (int i = 0; i < NLAT; i++) load_syn[i] = ($urandom_range(9) == 0);
      end else if ($urandom_range(1)) begin
        a_we    = 1;
        a_node  = node_t'($urandom_range(NLAT));       // NLAT is the boundary
        a_dir   = dir_t'($urandom_range(3));
        a_wdata = grow_t'($urandom_range(2));
      end else begin
        a_node  = node_t'($urandom_range(NLAT - 1));
      end
      b_node = node_t'($urandom_range(NLAT));
      #1;
      if (!load_en) begin
        check(a_word == ((int'(a_node) < NLAT) ? m[a_node] : '0), "port A read");
        check(b_word == ((int'(b_node) < NLAT) ? m[b_node] : '0), "port B read");
      end
      check(zdr == mz, "zero data register");
      @(posedge clk);
      if (load_en) begin
        for (int i = 0; i < NLAT; i++) m[i] = '{nb: load_syn[i], grow: '0};
        for (int r = 0; r < NROWS; r++) mz[r] = |load_syn[r*C +: C];
      end else if (a_we && int'(a_node) < NLAT) begin
        m[a_node].grow[a_dir] = a_wdata;
        if (a_wdata != 0) mz[int'(a_node) / C] = 1'b1;
      end
    end
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
