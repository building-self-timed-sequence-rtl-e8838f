// ser_ring_counter: a self-timed N-bit ring counter built on SER.
//
// N processing elements form a ring: element i shares one resource (one
// edge) with element i-1 and one with element i+1, and the last shares one
// with the first. Every edge is initially oriented from the larger to the
// smaller index, which is acyclic and makes element 0 the only sink. Under
// SER the sink operates, turns both its edges towards its neighbours, and
// thereby makes element 1 the next sink, and so on around the ring: exactly
// one element operates at a time and the single 1 walks round the ring.
//
// Interface: `q[i]` is high while element i is a sink, so q is one-hot and
// starts at 1 after reset. `step` is high in the last cycle of each
// operation, when q moves on at the next clock edge. `run` low (Stop) holds the counter; reset loads
// the initial orientation.
//
// Timing: q advances one position every T_OP clock cycles, a period of N
// steps.
//
// Following the source: the ring graph, its initial orientation and the
// reading of sinks as 1s. This design's own choices: clocked operation
// delay T_OP, and N >= 3 (two nodes would need two parallel edges).
module ser_ring_counter
  import smer_pkg::*;
#(
  parameter int unsigned N    = 6,  // bits (processing elements)
  parameter int unsigned T_OP = 1   // operation time in clock cycles
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  output logic [N-1:0] q,       // one-hot ring position
  output logic         step     // q moves on at the next clock edge
);

  typedef rev_t  [N-1:0] rev_list_t;
  typedef edge_t [N-1:0] edge_list_t;

  // Edge i joins element i and element (i+1) mod N and points at the
  // smaller index of the two.
  function automatic edge_list_t ring_edges();
    edge_list_t e;
    for (int i = 0; i < N; i++) begin
      e[i].a    = node_idx_t'(i);
      e[i].b    = node_idx_t'((i + 1) % N);
      e[i].mult = rev_t'(1);
      e[i].to_a = (i < N - 1) ? rev_t'(1) : rev_t'(0);
    end
    return e;
  endfunction

  localparam rev_list_t  REV  = {N{rev_t'(1)}};
  localparam edge_list_t EDGE = ring_edges();

  logic [N-1:0] eoo;

  assign step = |eoo;

  smer_graph #(
    .NODES(N), .EDGES(N), .REV(REV), .EDGE(EDGE), .T_OP(T_OP)
  ) u_graph (
    .clk, .rst_n, .run,
    .sink(q),
    .eoo (eoo)
  );

  // Mutual exclusion between neighbours makes the position one-hot.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) run |-> $onehot(q))
    else $error("ser_ring_counter: ring position is not one-hot");

endmodule
