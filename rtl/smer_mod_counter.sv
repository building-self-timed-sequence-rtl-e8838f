// smer_mod_counter: a self-timed non-decreasing modulo-2^N binary counter
// built on SMER.
//
// Each bit b of the counter is a "main" node of reversibility 1, paired
// with a "mirror" node of reversibility 2^b. The link between main node b
// and its mirror has 2^b edges, all pointing at the mirror after reset.
// Every mirror of a higher bit is also linked to the mirror of bit 0 with
// 2^b edges, half of them pointing at the bit-0 mirror. Reading a 1 for
// every node that is an r-sink and a 0 for every other node, the main nodes
// step through 0, 1, 2, ..., 2^N - 1 and wrap: main node b stays a sink for
// 2^b consecutive steps (it holds 2^b edges and returns one per operation),
// then its mirror collects them all back and holds the bit at 0 for 2^b
// steps.
//
// Interface: `count` is the counter value (bit b = main node b is a sink);
// it is 0 after reset. `step` is high in the last cycle of each operation.
// `run` low (Stop) holds the count.
//
// Timing: with T_OP = 1 the count advances by one every clock cycle; in
// general every T_OP cycles. Period 2^N steps.
//
// Following the source: the main/mirror construction, reversibilities,
// initial orientation and output reading. This design's own choices: the
// multiplicity of each link is the least the SMER deadlock-freedom bound
// allows, max(r_i, r_j), and N is limited to 16 by the 16-bit link counters.
module smer_mod_counter
  import smer_pkg::*;
#(
  parameter int unsigned N    = 4,  // counter bits
  parameter int unsigned T_OP = 1   // operation time in clock cycles
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  output logic [N-1:0] count,
  output logic         step
);

  localparam int unsigned NODES = 2 * N;      // main 0..N-1, mirror N..2N-1
  localparam int unsigned EDGES = 2 * N - 1;  // N main-mirror, N-1 mirror-mirror

  typedef rev_t  [NODES-1:0] rev_list_t;
  typedef edge_t [EDGES-1:0] edge_list_t;

  function automatic rev_list_t mod_rev();
    rev_list_t r;
    for (int b = 0; b < N; b++) begin
      r[b]     = rev_t'(1);
      r[N + b] = rev_t'(1) << b;
    end
    return r;
  endfunction

  function automatic edge_list_t mod_edges();
    edge_list_t e;
    // Main node b to its mirror: 2^b edges, all towards the mirror.
    for (int b = 0; b < N; b++) begin
      e[b].a    = node_idx_t'(b);
      e[b].b    = node_idx_t'(N + b);
      e[b].mult = rev_t'(1) << b;
      e[b].to_a = '0;
    end
    // Mirror of bit 0 to mirror of bit b: 2^b edges, half each way.
    for (int b = 1; b < N; b++) begin
      e[N + b - 1].a    = node_idx_t'(N);
      e[N + b - 1].b    = node_idx_t'(N + b);
      e[N + b - 1].mult = rev_t'(1) << b;
      e[N + b - 1].to_a = rev_t'(1) << (b - 1);
    end
    return e;
  endfunction

  localparam rev_list_t  REV  = mod_rev();
  localparam edge_list_t EDGE = mod_edges();

  logic [NODES-1:0] sink, eoo;

  smer_graph #(
    .NODES(NODES), .EDGES(EDGES), .REV(REV), .EDGE(EDGE), .T_OP(T_OP)
  ) u_graph (
    .clk, .rst_n, .run,
    .sink(sink),
    .eoo (eoo)
  );

  assign count = sink[N-1:0];
  assign step  = |eoo;

endmodule
