// afs_decoder_block: decoder block of the Conjoined-Decoder Architecture (CDA).
//
// N logical qubits share one block.  Each qubit has its own Graph Generator
// and two Spanning Tree Memories, one for the X and one for the Z syndrome; the
// Graph Generator grows the X clusters first and the Z clusters next.  All 2N
// memories share one DFS Engine and one Correction Engine (in the main
// configuration two qubits, i.e. two Graph Generators, share a DFS Engine and
// each DFS Engine has its own Correction Engine).  While the DFS Engine
// traverses a qubit's X memory, that qubit's Graph Generator already grows the
// Z clusters in the other memory, and while the Correction Engine peels one
// cluster the DFS Engine traverses the next one.
//
// A memory that holds grown clusters raises a request; the select logic
// (afs_select) grants the DFS Engine to the first ready memory, round robin
// among memories that became ready together, and drives the multiplexer of
// the DFS Engine's memory port.  A memory is free again once the DFS Engine
// has traversed it.  Corrections from the Correction Engine are XORed into a
// per-qubit Pauli frame (one bit per data qubit and error type); measurement-
// error edges change no frame bit.
//
// Per qubit, `in_valid`/`in_ready` hand over one logical cycle (d rounds of X
// and Z syndromes, the 3-D decoding-graph node bits).  `dec_done` pulses when
// both error types are decoded, `latency` then holds the number of cycles
// since the hand-over, and `timeout` pulses once when a decode runs past
// TIMEOUT_CYCLES (350 ns at the 4 GHz clock assumed for the decoder): the
// qubit was denied timely access to the shared units, a timeout failure.
// The sharing structure and select logic follow the CDA description; the
// hand-shake, the Pauli frame and the timeout counter are this design's choices.
module afs_decoder_block
  import afs_pkg::*;
#(
  parameter int unsigned D              = 11,
  parameter int unsigned N              = 2,
  parameter int unsigned TIMEOUT_CYCLES = 1400,
  parameter int unsigned FUSE_DEPTH     = 64,
  parameter int unsigned RT_DEPTH       = 32,
  parameter int unsigned ES_DEPTH       = 32
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [N-1:0]                          in_valid,
  output logic [N-1:0]                          in_ready,
  input  logic [D*D*(D-1)-1:0]                  in_syn_x [N],
  input  logic [D*D*(D-1)-1:0]                  in_syn_z [N],
  output logic [D*D+(D-1)*(D-1)-1:0]            frame_x [N],
  output logic [D*D+(D-1)*(D-1)-1:0]            frame_z [N],
  output logic [N-1:0]                          dec_done,
  output logic [N-1:0]                          timeout,
  output logic [15:0]                           latency [N],
  // Correction stream (every peeled edge, measurement-error edges included)
  output logic                                  corr_valid,
  output tag_t                                  corr_tag,
  output node_t                                 corr_owner,
  output dir_t                                  corr_dir,
  // Status
  output logic [15:0]                           dfs_stall_cycles,
  output logic [15:0]                           early_merges,
  output logic                                  err
);
  localparam int unsigned NLAT  = D * D * (D - 1);
  localparam int unsigned NROWS = D * D;
  localparam int unsigned NDATA = D * D + (D - 1) * (D - 1);
  localparam int unsigned NSTM  = 2 * N;
  localparam int unsigned SW    = $clog2(NSTM);

  typedef enum logic [1:0] { M_FREE, M_GROWING, M_READY, M_TRAV } mstate_t;
  typedef enum logic [1:0] { Q_IDLE, Q_GROW_X, Q_GROW_Z, Q_WAIT } qstate_t;

  mstate_t mstate [NSTM];
  logic    done_valid, peel_err, corr_busy;
  tag_t    done_tag;
  qstate_t qstate [N];

  // STM ports (index 2q = X memory of qubit q, 2q+1 = Z memory).
  logic      m_load   [NSTM];
  logic [NLAT-1:0] m_load_syn [NSTM];
  node_t     m_a_node [NSTM];
  stm_word_t m_a_word [NSTM];
  logic      m_a_we   [NSTM];
  dir_t      m_a_dir  [NSTM];
  grow_t     m_a_wdata[NSTM];
  node_t     m_b_node;
  stm_word_t m_b_word [NSTM];
  logic [NROWS-1:0] m_zdr [NSTM];

  for (genvar m = 0; m < NSTM; m++) begin : g_stm
    afs_stm #(.D(D)) u_stm (
      .clk, .rst_n,
      .load_en(m_load[m]), .load_syn(m_load_syn[m]),
      .a_node(m_a_node[m]), .a_word(m_a_word[m]), .a_we(m_a_we[m]), .a_dir(m_a_dir[m]),
      .a_wdata(m_a_wdata[m]),
      .b_node(m_b_node), .b_word(m_b_word[m]), .zdr(m_zdr[m])
    );
  end

  // ------------------------------------------------------------------
  // Graph Generators, one per qubit, each alternating between its X and Z
  // memories.
  // ------------------------------------------------------------------
  logic [NLAT-1:0] syn_z_reg [N];
  logic [N-1:0]    gg_start, gg_done, gg_busy, gg_load;
  logic [NLAT-1:0] gg_syn [N];
  node_t           gg_a_node [N];
  stm_word_t       gg_a_word [N];
  logic [N-1:0]    gg_a_we;
  dir_t            gg_a_dir [N];
  grow_t           gg_a_wdata [N];
  logic [NROWS-1:0] gg_zdr [N];
  logic [7:0]      gg_rounds [N];
  logic [15:0]     gg_early [N];
  logic [N-1:0]    x_done, z_done;
  logic [15:0]     lat_cnt [N];
  logic [N-1:0]    to_flag;

  for (genvar q = 0; q < N; q++) begin : g_q
    logic tgt_z;
    assign tgt_z = (qstate[q] == Q_GROW_Z);

    assign in_ready[q] = (qstate[q] == Q_IDLE) && (mstate[2*q] == M_FREE) &&
                         (mstate[2*q+1] == M_FREE);
    assign gg_start[q] = (in_valid[q] && in_ready[q]) ||
                         (qstate[q] == Q_GROW_X && gg_done[q]);
    assign gg_syn[q]   = (qstate[q] == Q_IDLE) ? in_syn_x[q] : syn_z_reg[q];
    assign gg_a_word[q] = tgt_z ? m_a_word[2*q+1] : m_a_word[2*q];
    assign gg_zdr[q]    = tgt_z ? m_zdr[2*q+1]    : m_zdr[2*q];

    for (genvar xz = 0; xz < 2; xz++) begin : g_port
      localparam int unsigned M = 2 * q + xz;
      assign m_load[M]     = gg_load[q] && ((xz == 0) ? (qstate[q] == Q_IDLE)
                                                      : (qstate[q] == Q_GROW_X));
      assign m_load_syn[M] = gg_syn[q];
      assign m_a_node[M]   = gg_a_node[q];
      assign m_a_we[M]     = gg_a_we[q] && (tgt_z == (xz == 1));
      assign m_a_dir[M]    = gg_a_dir[q];
      assign m_a_wdata[M]  = gg_a_wdata[q];
    end

    afs_grgen #(.D(D), .FUSE_DEPTH(FUSE_DEPTH)) u_grgen (
      .clk, .rst_n,
      .start(gg_start[q]), .syn(gg_syn[q]), .busy(gg_busy[q]), .done(gg_done[q]),
      .rounds(gg_rounds[q]), .early_merges(gg_early[q]),
      .stm_load(gg_load[q]), .stm_a_node(gg_a_node[q]), .stm_a_word(gg_a_word[q]),
      .stm_a_we(gg_a_we[q]), .stm_a_dir(gg_a_dir[q]), .stm_a_wdata(gg_a_wdata[q]),
      .stm_zdr(gg_zdr[q])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        qstate[q]   <= Q_IDLE;
        x_done[q]   <= 1'b0;
        z_done[q]   <= 1'b0;
        lat_cnt[q]  <= '0;
        latency[q]  <= '0;
        to_flag[q]  <= 1'b0;
        dec_done[q] <= 1'b0;
        timeout[q]  <= 1'b0;
      end else begin
        dec_done[q] <= 1'b0;
        timeout[q]  <= 1'b0;
        if (qstate[q] != Q_IDLE) begin
          lat_cnt[q] <= lat_cnt[q] + 1'b1;
          if (int'(lat_cnt[q]) == TIMEOUT_CYCLES && !to_flag[q]) begin
            to_flag[q] <= 1'b1;
            timeout[q] <= 1'b1;
          end
        end
        if (done_valid && int'(done_tag[7:2]) == q) begin
          if (done_tag[0]) z_done[q] <= 1'b1;
          else             x_done[q] <= 1'b1;
        end
        unique case (qstate[q])
          Q_IDLE: if (in_valid[q] && in_ready[q]) begin
            syn_z_reg[q] <= in_syn_z[q];
            x_done[q]    <= 1'b0;
            z_done[q]    <= 1'b0;
            lat_cnt[q]   <= 16'd1;
            to_flag[q]   <= 1'b0;
            qstate[q]    <= Q_GROW_X;
          end
          Q_GROW_X: if (gg_done[q]) qstate[q] <= Q_GROW_Z;
          Q_GROW_Z: if (gg_done[q]) qstate[q] <= Q_WAIT;
          default:  if (x_done[q] && z_done[q]) begin
            dec_done[q] <= 1'b1;
            latency[q]  <= lat_cnt[q];
            qstate[q]   <= Q_IDLE;
          end
        endcase
      end
    end
  end

  // ------------------------------------------------------------------
  // Select logic and the shared DFS Engine.
  // ------------------------------------------------------------------
  logic [NSTM-1:0] m_req;
  logic            gnt_valid, take;
  logic [SW-1:0]   gnt_idx;
  logic [SW-1:0]   dfs_cur;
  logic            dfs_busy, dfs_done, dfs_ovf;
  logic [15:0]     dfs_trees;

  for (genvar m = 0; m < NSTM; m++) begin : g_req
    assign m_req[m] = (mstate[m] == M_READY);
  end

  afs_select #(.N(NSTM)) u_select (
    .clk, .rst_n, .req(m_req), .take(take), .gnt_valid(gnt_valid), .gnt_idx(gnt_idx)
  );

  assign take = gnt_valid && !dfs_busy;

  tag_t        dfs_tag;
  assign dfs_tag = {gnt_idx[SW-1:1], 1'b0, gnt_idx[0]};

  logic [1:0]  es_ready, es_last, es_empty, es_pop, es_release;
  tag_t        es_tag [2];
  edge_entry_t es_top [2];

  afs_dfs #(.D(D), .RT_DEPTH(RT_DEPTH), .ES_DEPTH(ES_DEPTH)) u_dfs (
    .clk, .rst_n, .start(take), .start_tag(dfs_tag), .busy(dfs_busy), .done(dfs_done),
    .ovf(dfs_ovf), .stall_cycles(dfs_stall_cycles), .trees(dfs_trees),
    .stm_b_node(m_b_node), .stm_b_word(m_b_word[dfs_cur]), .stm_zdr(m_zdr[dfs_cur]),
    .es_ready, .es_last, .es_tag, .es_top, .es_empty, .es_pop, .es_release
  );

  // ------------------------------------------------------------------
  // Correction Engine and Pauli frames.
  // ------------------------------------------------------------------
  afs_corr #(.D(D)) u_corr (
    .clk, .rst_n, .es_ready, .es_last, .es_tag, .es_top, .es_empty, .es_pop, .es_release,
    .corr_valid, .corr_tag, .corr_owner, .corr_dir, .done_valid, .done_tag,
    .peel_err, .busy(corr_busy)
  );

  logic        corr_dvalid;
  int unsigned corr_didx;
  always_comb corr_didx = data_index(D, corr_owner, corr_dir, corr_dvalid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned q = 0; q < N; q++) begin
        frame_x[q] <= '0;
        frame_z[q] <= '0;
      end
    end else if (corr_valid && corr_dvalid) begin
      if (corr_tag[0]) frame_z[corr_tag[7:2]][corr_didx] <= ~frame_z[corr_tag[7:2]][corr_didx];
      else             frame_x[corr_tag[7:2]][corr_didx] <= ~frame_x[corr_tag[7:2]][corr_didx];
    end
  end

  // ------------------------------------------------------------------
  // Memory states.
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned m = 0; m < NSTM; m++) mstate[m] <= M_FREE;
      dfs_cur <= '0;
      err     <= 1'b0;
    end else begin
      for (int unsigned m = 0; m < NSTM; m++) begin
        if (m_load[m]) mstate[m] <= M_GROWING;
      end
      for (int unsigned q = 0; q < N; q++) begin
        if (gg_done[q]) mstate[2*q + ((qstate[q] == Q_GROW_Z) ? 1 : 0)] <= M_READY;
      end
      if (dfs_done) mstate[dfs_cur] <= M_FREE;
      if (take) begin
        mstate[gnt_idx] <= M_TRAV;
        dfs_cur         <= gnt_idx;
      end
      if (dfs_ovf || peel_err) err <= 1'b1;
    end
  end

  logic [15:0] early_sum;
  always_comb begin
    early_sum = '0;
    for (int unsigned q = 0; q < N; q++) early_sum += gg_early[q];
  end
  assign early_merges = early_sum;

endmodule
