// afs_top: error-decoding subsystem of a fault-tolerant quantum computer with
// L logical qubits, each encoded in a distance-D surface code.
//
// Every syndrome measurement round, each logical qubit delivers its X and Z
// syndrome bits (2*D*(D-1) bits, `rnd_syn[q]`, all qubits in the same cycle
// with `rnd_valid`).  Per qubit the round passes through
//   afs_sc_compress   (hybrid Syndrome Compression: the shortest of DZC,
//                      sparse and Geo-Comp packets crosses the link),
//   afs_sc_decompress (expansion at the decoder side),
//   afs_round_buffer  (D rounds of differences form the 3-D decoding graph),
// and every logical cycle of D rounds is decoded by the Conjoined-Decoder
// Architecture: L/N decoder blocks (afs_decoder_block), each shared by N
// logical qubits.  A block returns, per qubit, the Pauli frame of X and Z
// corrections on the data qubits (`frame_x`, `frame_z`, one bit per data
// qubit, index layout in afs_pkg::data_index), and a `dec_done` pulse per
// decoded logical cycle.
//
// Status outputs: `timeout` pulses for a qubit whose decode ran longer than
// TIMEOUT_CYCLES, `backlog` for a qubit whose next logical cycle was complete
// before the decoder took the previous one, and `err` reports a stack
// overflow or a failed peeling check in any block.  `link_bits` accumulates
// the bits sent over the compressed links and `raw_bits` the bits the
// uncompressed syndromes would have needed; their ratio is the achieved
// compression ratio.  Latency from a round to the decoder input: 2 cycles.
//
// The chain compression, decoding per logical cycle and the sharing of decoder
// blocks follow the system described for this decoder; L must be a multiple
// of N.  FUSE_DEPTH, RT_DEPTH and ES_DEPTH size the stacks inside each
// decoder block (see afs_decoder_block).
module afs_top
  import afs_pkg::*;
#(
  parameter int unsigned D              = 11,
  parameter int unsigned L              = 1000,
  parameter int unsigned N              = 2,
  parameter int unsigned TIMEOUT_CYCLES = 1400,
  parameter int unsigned SC_W           = 8,
  parameter int unsigned SC_GH          = 2,
  parameter int unsigned SC_GW          = 2,
  parameter int unsigned FUSE_DEPTH     = 64,
  parameter int unsigned RT_DEPTH       = 32,
  parameter int unsigned ES_DEPTH       = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           rnd_valid,
  input  logic [2*D*(D-1)-1:0]           rnd_syn [L],
  output logic [D*D+(D-1)*(D-1)-1:0]     frame_x [L],
  output logic [D*D+(D-1)*(D-1)-1:0]     frame_z [L],
  output logic [L-1:0]                   dec_done,
  output logic [L-1:0]                   timeout,
  output logic [L-1:0]                   backlog,
  output logic                           err,
  output logic [39:0]                    link_bits,
  output logic [39:0]                    raw_bits
);
  localparam int unsigned NLAT = D * D * (D - 1);
  localparam int unsigned NS   = 2 * D * (D - 1);
  localparam int unsigned PW   = sc_pw(D, SC_W, SC_GH, SC_GW);
  localparam int unsigned NB   = L / N;

  logic            pk_valid  [L];
  sc_scheme_t      pk_scheme [L];
  logic [15:0]     pk_len    [L];
  logic [PW-1:0]   pk_pl     [L];
  logic            dc_valid  [L];
  logic [NS-1:0]   dc_syn    [L];
  logic [L-1:0]    rb_valid, rb_ready;
  logic [NLAT-1:0] rb_syn_x  [L];
  logic [NLAT-1:0] rb_syn_z  [L];

  for (genvar q = 0; q < L; q++) begin : g_q
    afs_sc_compress #(.D(D), .W(SC_W), .GH(SC_GH), .GW(SC_GW), .PW(PW)) u_comp (
      .clk, .rst_n, .in_valid(rnd_valid), .syn(rnd_syn[q]),
      .out_valid(pk_valid[q]), .out_scheme(pk_scheme[q]), .out_len(pk_len[q]),
      .out_payload(pk_pl[q])
    );

    afs_sc_decompress #(.D(D), .W(SC_W), .GH(SC_GH), .GW(SC_GW), .PW(PW)) u_decomp (
      .clk, .rst_n, .in_valid(pk_valid[q]), .in_scheme(pk_scheme[q]), .in_len(pk_len[q]),
      .in_payload(pk_pl[q]), .out_valid(dc_valid[q]), .syn(dc_syn[q])
    );

    afs_round_buffer #(.D(D)) u_rbuf (
      .clk, .rst_n, .rnd_valid(dc_valid[q]), .rnd_syn(dc_syn[q]),
      .out_valid(rb_valid[q]), .out_ready(rb_ready[q]),
      .out_syn_x(rb_syn_x[q]), .out_syn_z(rb_syn_z[q]), .backlog(backlog[q])
    );
  end

  logic [NB-1:0] blk_err;

  for (genvar b = 0; b < NB; b++) begin : g_blk
    logic [15:0] lat [N];
    logic [15:0] stalls, early;
    logic        cv;
    tag_t        ctag;
    node_t       cown;
    dir_t        cdir;

    afs_decoder_block #(.D(D), .N(N), .TIMEOUT_CYCLES(TIMEOUT_CYCLES),
                        .FUSE_DEPTH(FUSE_DEPTH), .RT_DEPTH(RT_DEPTH), .ES_DEPTH(ES_DEPTH)) u_blk (
      .clk, .rst_n,
      .in_valid(rb_valid[b*N +: N]), .in_ready(rb_ready[b*N +: N]),
      .in_syn_x(rb_syn_x[b*N +: N]), .in_syn_z(rb_syn_z[b*N +: N]),
      .frame_x(frame_x[b*N +: N]), .frame_z(frame_z[b*N +: N]),
      .dec_done(dec_done[b*N +: N]), .timeout(timeout[b*N +: N]), .latency(lat),
      .corr_valid(cv), .corr_tag(ctag), .corr_owner(cown), .corr_dir(cdir),
      .dfs_stall_cycles(stalls), .early_merges(early), .err(blk_err[b])
    );
  end

  assign err = |blk_err;

  // Link traffic: 2 header bits plus the payload per qubit and round.
  logic [39:0] round_bits;
  always_comb begin
    round_bits = '0;
    for (int unsigned q = 0; q < L; q++) round_bits += 40'(pk_len[q]) + 40'd2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_bits <= '0;
      raw_bits  <= '0;
    end else if (pk_valid[0]) begin
      link_bits <= link_bits + round_bits;
      raw_bits  <= raw_bits + 40'(L * NS);
    end
  end

endmodule
