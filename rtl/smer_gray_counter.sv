// smer_gray_counter: a self-timed N-bit Gray counter built on SMER (N >= 2).
//
// Each bit b is a main node of reversibility 1 with a mirror node linked to
// it. The mirror's reversibility is the length of a run of 1s of that bit
// in the Gray sequence: 2^(b+1) for b < N-1 and 2^(N-1) for the top bit.
// Bit 0 has a second mirror, A**, of reversibility 2. After reset:
//   - main b -> mirror b: all edges towards the mirror;
//   - bit 0 <-> A**: all edges towards bit 0; mirror 0 <-> A**: all edges
//     towards mirror 0;
//   - mirror b <-> mirror b-1 (b >= 1): r(mirror b-1) edges towards mirror
//     b-1, the rest towards mirror b;
//   - mirror b (b >= 2) is also linked to bit 0 and to mirror 0; of each of
//     these links, as many edges point at the bit-0 node as bit 0 is 1 in
//     the Gray sequence before bit b first becomes 1, i.e. 2^(b-1).
// Every link has max(r_i, r_j) edges. Reading the r-sinks of the main
// nodes as 1s gives 0, 1, 3, 2, 6, 7, 5, 4, ... with one bit changing per
// step.
//
// Interface: `gray` is the counter value, 0 after reset; `step` is high in
// the last cycle of each operation; `run` low (Stop) holds the value.
//
// Timing: one Gray code per T_OP cycles, period 2^N steps.
//
// Following the source: node set, reversibilities, link topology and the
// initial orientation rules. This design's own choices: the reversibility
// of A** (2), the link multiplicities, and the exact edge counts on the
// links that the source does not state in words; they were chosen so that
// the dynamics reproduce the Gray sequence, which the testbench checks.
module smer_gray_counter
  import smer_pkg::*;
#(
  parameter int unsigned N    = 3,  // counter bits
  parameter int unsigned T_OP = 1   // operation time in clock cycles
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  output logic [N-1:0] gray,
  output logic         step
);

  // Nodes: main 0..N-1, mirror N..2N-1, second bit-0 mirror A** = 2N.
  localparam int unsigned NODES = 2 * N + 1;
  localparam int unsigned EDGES = 4 * N - 3;
  localparam int unsigned A2    = 2 * N;

  typedef rev_t  [NODES-1:0] rev_list_t;
  typedef edge_t [EDGES-1:0] edge_list_t;

  // Length of a run of 1s of bit b in the N-bit Gray sequence.
  function automatic int unsigned run_len(int unsigned b);
    return (b < N - 1) ? (1 << (b + 1)) : (1 << (N - 1));
  endfunction

  function automatic int unsigned max2(int unsigned x, int unsigned y);
    return (x > y) ? x : y;
  endfunction

  function automatic rev_list_t gray_rev();
    rev_list_t r;
    for (int unsigned b = 0; b < N; b++) begin
      r[b]     = rev_t'(1);
      r[N + b] = rev_t'(run_len(b));
    end
    r[A2] = rev_t'(2);
    return r;
  endfunction

  function automatic edge_t link(int unsigned a, int unsigned b,
                                 int unsigned mult, int unsigned to_a);
    edge_t e;
    e.a    = node_idx_t'(a);
    e.b    = node_idx_t'(b);
    e.mult = rev_t'(mult);
    e.to_a = rev_t'(to_a);
    return e;
  endfunction

  function automatic edge_list_t gray_edges();
    edge_list_t  e;
    int unsigned k = 0;
    for (int unsigned b = 0; b < N; b++) begin          // main - mirror
      e[k] = link(b, N + b, run_len(b), 0);
      k++;
    end
    e[k] = link(0, A2, 2, 2);                           // bit 0 - A**
    k++;
    e[k] = link(N, A2, 2, 2);                           // mirror 0 - A**
    k++;
    for (int unsigned b = 1; b < N; b++) begin          // mirror chain
      int unsigned m = max2(run_len(b), run_len(b - 1));
      e[k] = link(N + b, N + b - 1, m, m - run_len(b - 1));
      k++;
    end
    for (int unsigned b = 2; b < N; b++) begin          // links to bit 0
      int unsigned m = run_len(b);
      int unsigned t = 1 << (b - 1);
      e[k] = link(N + b, 0, m, m - t);
      k++;
      e[k] = link(N + b, N, m, m - t);
      k++;
    end
    return e;
  endfunction

  localparam rev_list_t  REV  = gray_rev();
  localparam edge_list_t EDGE = gray_edges();

  logic [NODES-1:0] sink, eoo;

  smer_graph #(
    .NODES(NODES), .EDGES(EDGES), .REV(REV), .EDGE(EDGE), .T_OP(T_OP)
  ) u_graph (
    .clk, .rst_n, .run,
    .sink(sink),
    .eoo (eoo)
  );

  assign gray = sink[N-1:0];
  assign step = |eoo;

endmodule
