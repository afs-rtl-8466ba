// afs_pkg: types, constants and lattice helper functions shared by the AFS
// Union-Find decoder, the conjoined-decoder block and the syndrome compressor.
//
// Decoding graph used throughout (one error type, X or Z):
//   * d rounds (layers t = 0..d-1) of a d x (d-1) ancilla grid (rows r, columns c).
//     A lattice row is the set of d-1 nodes with the same (t, r); it is also one
//     row of the Spanning Tree Memory and one bit of the Zero Data Register.
//   * node id  = (t*R + r)*C + c, with R = d, C = d-1.  One extra node, BND,
//     stands for the whole open boundary of the lattice.
//   * every node owns up to four edges, numbered by dir_t:
//       DIR_E  : to (r, c+1), or to the boundary when c = C-1   (data qubit)
//       DIR_WB : to the boundary, only at c = 0                 (data qubit)
//       DIR_S  : to (r+1, c), only when r < R-1                 (data qubit)
//       DIR_U  : to the same ancilla one round later (t+1)      (measurement error)
//   Horizontal edges map onto the d^2 + (d-1)^2 data qubits of the planar code,
//   vertical (DIR_U) edges onto measurement errors.  This geometry is the
//   design's own concrete choice of the surface-code graph the decoder works on.
//
// Node identifiers are 16 bits wide everywhere, which covers every distance up
// to 25, the largest one the decoder is evaluated at.
package afs_pkg;

  typedef logic [15:0] node_t;
  typedef logic [7:0]  tag_t;   // {qubit index within a decoder block, 6 bits; unused, 1 bit; X/Z, 1 bit}

  typedef enum logic [1:0] {
    DIR_E  = 2'd0,
    DIR_WB = 2'd1,
    DIR_S  = 2'd2,
    DIR_U  = 2'd3
  } dir_t;

  // Growth state of an edge: 0 = untouched, 1 = half grown, 2 = fully grown.
  typedef logic [1:0] grow_t;
  localparam grow_t GROW_FULL = 2'd2;

  // One Spanning Tree Memory entry: the node's syndrome bit and the growth
  // state of the four edges it owns.
  typedef struct packed {
    logic            nb;
    grow_t [3:0]     grow;
  } stm_word_t;

  // One edge-stack entry written by the DFS Engine and peeled by the CORR
  // Engine: the tree edge, the direction information (which node owns the edge)
  // and the syndrome bits of its two vertices.
  typedef struct packed {
    node_t child;
    node_t parent;
    node_t owner;
    dir_t  dir;
    logic  syn_child;
    logic  syn_parent;
  } edge_entry_t;

  // Syndrome compression schemes (header of every compressed packet).
  typedef enum logic [1:0] {
    SC_DZC    = 2'd0,
    SC_SPARSE = 2'd1,
    SC_GEO    = 2'd2
  } sc_scheme_t;

  // ---------------------------------------------------------------------
  // Lattice geometry as functions of the code distance d.
  // ---------------------------------------------------------------------
  function automatic int unsigned n_rows(int unsigned d);   // lattice rows (all rounds)
    return d * d;
  endfunction

  function automatic int unsigned n_lat(int unsigned d);    // lattice nodes, BND excluded
    return d * d * (d - 1);
  endfunction

  function automatic int unsigned n_data(int unsigned d);   // data qubits of one type
    return d * d + (d - 1) * (d - 1);
  endfunction

  // Incident edge k (0..6) of node u: the four edges u owns, then the east edge
  // of its west neighbour, the south edge of its north neighbour and the up edge
  // of the same ancilla one round earlier.  Returns validity, owner, direction
  // and the node at the other end.
  function automatic logic incident(input int unsigned d, input node_t u, input int unsigned k,
                                    output node_t owner, output dir_t dir, output node_t other);
    int unsigned cc, rr, tt, rw, bnd;
    cc    = int'(u) % (d - 1);
    rw    = int'(u) / (d - 1);
    rr    = rw % d;
    tt    = rw / d;
    bnd   = d * d * (d - 1);
    owner = u;
    dir   = DIR_E;
    other = u;
    incident = 1'b0;
    case (k)
      0: begin
        dir = DIR_E;
        other = (cc == d - 2) ? node_t'(bnd) : node_t'(int'(u) + 1);
        incident = 1'b1;
      end
      1: begin
        dir = DIR_WB;
        other = node_t'(bnd);
        incident = (cc == 0);
      end
      2: begin
        dir = DIR_S;
        other = node_t'(int'(u) + (d - 1));
        incident = (rr < d - 1);
      end
      3: begin
        dir = DIR_U;
        other = node_t'(int'(u) + d * (d - 1));
        incident = (tt < d - 1);
      end
      4: begin
        owner = node_t'(int'(u) - 1);
        dir = DIR_E;
        other = node_t'(int'(u) - 1);
        incident = (cc > 0);
      end
      5: begin
        owner = node_t'(int'(u) - (d - 1));
        dir = DIR_S;
        other = node_t'(int'(u) - (d - 1));
        incident = (rr > 0);
      end
      6: begin
        owner = node_t'(int'(u) - d * (d - 1));
        dir = DIR_U;
        other = node_t'(int'(u) - d * (d - 1));
        incident = (tt > 0);
      end
      default: incident = 1'b0;
    endcase
  endfunction

  // Node at the far end of the edge (owner, dir).
  function automatic node_t edge_other(input int unsigned d, input node_t owner, input dir_t dir);
    node_t o, x;
    dir_t dd;
    logic v;
    v = incident(d, owner, int'(dir), o, dd, x);
    return x;
  endfunction

  // Data-qubit index of edge (owner, dir), projected over the rounds; returns
  // 0 in `valid` for measurement-error (DIR_U) edges.  Indices:
  //   DIR_E  : r*C + c                      (d*(d-1) qubits)
  //   DIR_WB : d*(d-1) + r                  (d qubits)
  //   DIR_S  : d*(d-1) + d + r*C + c        ((d-1)*(d-1) qubits)
  function automatic int unsigned data_index(input int unsigned d, input node_t owner,
                                             input dir_t dir, output logic valid);
    int unsigned cc, rr, rw;
    cc = int'(owner) % (d - 1);
    rw = int'(owner) / (d - 1);
    rr = rw % d;
    valid = 1'b1;
    case (dir)
      DIR_E:   return rr * (d - 1) + cc;
      DIR_WB:  return d * (d - 1) + rr;
      DIR_S:   return d * (d - 1) + d + rr * (d - 1) + cc;
      default: begin
        valid = 1'b0;
        return 0;
      end
    endcase
  endfunction

  // ---------------------------------------------------------------------
  // Syndrome Compression sizes.  One syndrome round of one logical qubit has
  // NS = 2*d*(d-1) bits: X-type ancillas at [r*(d-1)+c], Z-type ancillas at
  // [d*(d-1) + r*(d-1)+c].
  // ---------------------------------------------------------------------
  function automatic int unsigned sc_ns(int unsigned d);
    return 2 * d * (d - 1);
  endfunction

  // Dynamic zero compression: K blocks of W bits.
  function automatic int unsigned sc_dzc_k(int unsigned d, int unsigned w);
    return (sc_ns(d) + w - 1) / w;
  endfunction

  // Geo-Comp: tiles of gh x gw ancilla positions, X and Z bits together.
  function automatic int unsigned sc_geo_k(int unsigned d, int unsigned gh, int unsigned gw);
    return ((d + gh - 1) / gh) * ((d - 1 + gw - 1) / gw);
  endfunction

  // Index width of the sparse representation.
  function automatic int unsigned sc_iw(int unsigned d);
    return $clog2(sc_ns(d));
  endfunction

  // Payload width of a compressed packet: the longest DZC or Geo-Comp packet
  // (the hybrid selector never sends a longer sparse packet than these).
  function automatic int unsigned sc_pw(int unsigned d, int unsigned w, int unsigned gh,
                                        int unsigned gw);
    int unsigned a, b;
    a = sc_dzc_k(d, w) * (w + 1);
    b = sc_geo_k(d, gh, gw) * (2 * gh * gw + 1);
    return (a > b) ? a : b;
  endfunction

endpackage
