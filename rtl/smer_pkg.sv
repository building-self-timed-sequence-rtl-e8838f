// smer_pkg: types and constants shared by the SER/SMER sequence generators.
//
// A SER or SMER system is a (multi)graph. Each node is a processing element
// with a reversibility r (r = 1 everywhere under SER). Between two nodes a
// and b there are `mult` parallel edges; `to_a` of them initially point at
// a, the remaining mult - to_a point at b. A node may operate ("is an
// r-sink") when, on every incident link, at least r of the edges point at
// it; after operating it turns r edges of every link back towards the
// neighbour. Under SER every link is a single edge and the rule reduces to
// "a node operates when all its edges point at it".
//
// The graphs are described to the hardware as packed arrays of edge_t, so
// they can be computed at elaboration time by constant functions.
package smer_pkg;

  // Width of node indices, multiplicities and reversibilities.
  localparam int unsigned IDX_W = 8;
  localparam int unsigned CNT_W = 16;

  typedef logic [IDX_W-1:0] node_idx_t;
  typedef logic [CNT_W-1:0] rev_t;

  // One link of the multigraph (a bundle of parallel edges).
  typedef struct packed {
    node_idx_t a;     // first end node
    node_idx_t b;     // second end node
    rev_t      mult;  // number of parallel edges e_ab (1 for a SER edge)
    rev_t      to_a;  // edges oriented towards a at initialisation
  } edge_t;

  // Reference graph: the two-bit modulo-4 SMER counter.
  // Nodes: 0 = A (bit 0), 1 = B (bit 1), 2 = A* (r = 1), 3 = B* (r = 2).
  localparam int unsigned FIG4_NODES = 4;
  localparam int unsigned FIG4_EDGES = 3;
  localparam rev_t [FIG4_NODES-1:0] FIG4_REV = {16'd2, 16'd1, 16'd1, 16'd1};
  localparam edge_t [FIG4_EDGES-1:0] FIG4_EDGE = '{
    '{a: 8'd2, b: 8'd3, mult: 16'd2, to_a: 16'd1},   // A*-B*, half each way
    '{a: 8'd1, b: 8'd3, mult: 16'd2, to_a: 16'd0},   // B -B*, towards mirror
    '{a: 8'd0, b: 8'd2, mult: 16'd1, to_a: 16'd0}    // A -A*, towards mirror
  };

endpackage
