// afs_round_buffer: collects the d syndrome rounds of one logical cycle.
//
// Measurement errors are tolerated by decoding d rounds together as one 3-D
// graph.  Each incoming round (X and Z syndromes, d x (d-1) bits each) is
// XORed with the previous round, so a node of the decoding graph is set where
// an ancilla's outcome changed: a data error lights two neighbouring nodes in
// one round, a measurement error the same node in two consecutive rounds.
// Round t of the logical cycle fills layer t.  After the d-th round the
// complete graph moves to the output register and `out_valid` rises until the
// decoder takes it (`out_ready`).  The next logical cycle is collected
// meanwhile; if it completes before the previous one was taken, it overwrites
// it and `backlog` pulses (the decoder has fallen behind).
//
// Decoding d rounds at once follows the measurement-error description; the
// round-difference (detection event) encoding, the double buffering and the
// backlog flag are this design's choices.  The first round after reset is
// compared with an all-zero round.
module afs_round_buffer #(
  parameter int unsigned D = 11
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   rnd_valid,
  input  logic [2*D*(D-1)-1:0]   rnd_syn,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [D*D*(D-1)-1:0]   out_syn_x,
  output logic [D*D*(D-1)-1:0]   out_syn_z,
  output logic                   backlog
);
  localparam int unsigned RC   = D * (D - 1);
  localparam int unsigned NLAT = D * RC;

  logic [2*RC-1:0]          prev;
  logic [NLAT-1:0]          acc_x, acc_z;
  logic [$clog2(D+1)-1:0]   t;
  logic [2*RC-1:0]          diff;

  assign diff = rnd_syn ^ prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      acc_x     <= '0;
      acc_z     <= '0;
      t         <= '0;
      out_valid <= 1'b0;
      out_syn_x <= '0;
      out_syn_z <= '0;
      backlog   <= 1'b0;
    end else begin
      backlog <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (rnd_valid) begin
        prev <= rnd_syn;
        if (int'(t) == D - 1) begin
          out_syn_x <= acc_x;
          out_syn_z <= acc_z;
          out_syn_x[int'(t)*RC +: RC] <= diff[RC-1:0];
          out_syn_z[int'(t)*RC +: RC] <= diff[2*RC-1:RC];
          out_valid <= 1'b1;
          if (out_valid && !out_ready) backlog <= 1'b1;
          t <= '0;
        end else begin
          acc_x[int'(t)*RC +: RC] <= diff[RC-1:0];
          acc_z[int'(t)*RC +: RC] <= diff[2*RC-1:RC];
          t <= t + 1'b1;
        end
      end
    end
  end

endmodule
