// afs_stm: Spanning Tree Memory (STM) with its Zero Data Register (ZDR).
//
// The STM holds, for every node of the 3-D decoding graph, the syndrome bit
// and a 2-bit growth state for each of the four edges the node owns (edges grow
// by half an edge, so two bits are needed).  The ZDR holds one bit per lattice
// row (the d-1 nodes of one ancilla row in one round): it is set as soon as any
// bit of that row becomes non-zero, so later stages can skip all-zero rows.
// Both structures follow the decoder's Graph Generator description; the
// one-node-per-word organisation and the port set are this design's choice.
//
// Ports:
//   load_en/load_syn : one-cycle load of a new syndrome; all edge states
//                      return to 0 and the ZDR is recomputed from the syndrome.
//   a_*              : Graph Generator port, asynchronous read of one word,
//                      synchronous write of one edge's growth state.
//   b_*              : DFS Engine port, asynchronous read of one word.
//   zdr              : the Zero Data Register, one bit per row.
// A write on port A is visible on both read ports in the next cycle.
module afs_stm
  import afs_pkg::*;
#(
  parameter int unsigned D = 11
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        load_en,
  input  logic [D*D*(D-1)-1:0]        load_syn,
  input  node_t                       a_node,
  output stm_word_t                   a_word,
  input  logic                        a_we,
  input  dir_t                        a_dir,
  input  grow_t                       a_wdata,
  input  node_t                       b_node,
  output stm_word_t                   b_word,
  output logic [D*D-1:0]              zdr
);
  localparam int unsigned C     = D - 1;
  localparam int unsigned NLAT  = D * D * (D - 1);
  localparam int unsigned NROWS = D * D;

  stm_word_t mem [NLAT];

  // The boundary node (id NLAT) owns no edges and has no syndrome bit.
  always_comb begin
    a_word = '0;
    b_word = '0;
    if (int'(a_node) < NLAT) a_word = mem[a_node];
    if (int'(b_node) < NLAT) b_word = mem[b_node];
  end

  always_ff @(posedge clk) begin
    if (load_en) begin
      for (int unsigned i = 0; i < NLAT; i++) begin
        mem[i].nb   <= load_syn[i];
        mem[i].grow <= '0;
      end
    end else if (a_we && int'(a_node) < NLAT) begin
      mem[a_node].grow[a_dir] <= a_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zdr <= '0;
    end else if (load_en) begin
      for (int unsigned rw = 0; rw < NROWS; rw++) zdr[rw] <= |load_syn[rw*C +: C];
    end else if (a_we && int'(a_node) < NLAT && a_wdata != '0) begin
      zdr[int'(a_node) / C] <= 1'b1;
    end
  end

endmodule
