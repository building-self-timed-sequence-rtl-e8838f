// smer_graph: a SER/SMER multigraph built from Node and Edge Controllers.
//
// Every node of the graph gets a node_controller; every link (bundle of
// parallel edges) gets an edge controller. A link of one edge between two
// nodes of reversibility 1 is a plain SER edge and uses the toggle
// flip-flop ser_edge_controller; any other link uses the counting
// smer_edge_controller. Each node controller sees, for every link, whether
// that link points enough edges at it (links that do not touch the node
// read as ready), and its end-of-operation signal drives the link ends it
// owns. `sink[n]` is high while node n operates; a sequence generator reads
// its output bits from the sinks of chosen nodes.
//
// Parameters: NODES and EDGES size the graph, REV[n] is the reversibility
// of node n, EDGE[k] describes link k (end nodes, multiplicity, initial
// orientation), T_OP is the operation time of every node in clock cycles.
// The defaults are the two-bit modulo-4 counter graph.
//
// Timing: one step of the dynamics takes T_OP clock cycles when every node
// has the same operation time; the graph starts from the orientation loaded
// by reset and advances while `run` is high.
//
// Following the source: the node/edge controller decomposition and the
// SER and SMER rules. This design's own choice: SMER links are built as
// counters rather than expanded into SER sub-graphs.
module smer_graph
  import smer_pkg::*;
#(
  parameter int unsigned             NODES = FIG4_NODES,
  parameter int unsigned             EDGES = FIG4_EDGES,
  parameter rev_t  [NODES-1:0]       REV   = FIG4_REV,
  parameter edge_t [EDGES-1:0]       EDGE  = FIG4_EDGE,
  parameter int unsigned             T_OP  = 1
) (
  input  logic             clk,
  input  logic             rst_n,   // preset the initial orientation
  input  logic             run,     // 1 = Run, 0 = Stop
  output logic [NODES-1:0] sink,    // node is operating
  output logic [NODES-1:0] eoo      // node ends its operation this cycle
);

  logic [EDGES-1:0]            ready_a, ready_b;
  logic [NODES-1:0][EDGES-1:0] ready;

  for (genvar k = 0; k < EDGES; k++) begin : g_edge
    localparam int unsigned A    = int'(EDGE[k].a);
    localparam int unsigned B    = int'(EDGE[k].b);
    localparam int unsigned MULT = int'(EDGE[k].mult);
    localparam int unsigned TO_A = int'(EDGE[k].to_a);
    localparam int unsigned RA   = int'(REV[A]);
    localparam int unsigned RB   = int'(REV[B]);

    if (MULT == 1 && RA == 1 && RB == 1) begin : g_ser
      ser_edge_controller #(.INIT_TO_A(TO_A != 0)) u_edge (
        .clk, .rst_n,
        .done_a(eoo[A]), .done_b(eoo[B]),
        .to_a(ready_a[k]), .to_b(ready_b[k])
      );
    end else begin : g_smer
      smer_edge_controller #(
        .MULT(MULT), .R_A(RA), .R_B(RB), .INIT_TO_A(TO_A)
      ) u_edge (
        .clk, .rst_n,
        .done_a(eoo[A]), .done_b(eoo[B]),
        .ready_a(ready_a[k]), .ready_b(ready_b[k])
      );
    end
  end

  for (genvar n = 0; n < NODES; n++) begin : g_node
    for (genvar k = 0; k < EDGES; k++) begin : g_link
      if (int'(EDGE[k].a) == n)      begin : g_a assign ready[n][k] = ready_a[k]; end
      else if (int'(EDGE[k].b) == n) begin : g_b assign ready[n][k] = ready_b[k]; end
      else                           begin : g_x assign ready[n][k] = 1'b1;       end
    end

    node_controller #(.DEG(EDGES), .T_OP(T_OP)) u_node (
      .clk, .rst_n, .run,
      .edge_ready(ready[n]),
      .sink(sink[n]),
      .eoo(eoo[n])
    );
  end

endmodule
