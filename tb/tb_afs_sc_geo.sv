// tb_afs_sc_geo: checks the geometry-based (Geo-Comp) encoder against the
// reference format for distance 11 rounds of increasing density (all zero,
// sparse, dense, all ones): packet length and every payload bit.
module tb_afs_sc_geo;
  import tb_sc_ref_pkg::*;
  localparam int D = 11, W = 8;
  localparam int NS = 2 * D * (D - 1);
  localparam int PW = afs_pkg::sc_pw(D, W, 2, 2);

  logic [NS-1:0] syn;
  logic [15:0]   len;
  logic [PW-1:0] payload;
  int checks = 0, failures = 0;

  afs_sc_geo #(.D(D)) dut (.syn, .len, .payload);

  initial begin
    for (int t = 0; t < 300; t++) begin
      bits_t s, p;
      int el;
      case (t % 5)
        0: s = '0;
        1: s = rand_round(D, 1);
        2: s = rand_round(D, 4);
        3: s = rand_round(D, 60);
        default: s = {MAXB{1'b1}} >> (MAXB - NS);
      endcase
      syn = s[NS-1:0];
      #1;
      ref_geo(D, 2, 2, s, p, el);
      checks++;
      if (int'(len) != el || payload != p[PW-1:0]) begin
        failures++;
        $display("FAIL: trial %0d len %0d expected %0d", t, len, el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
