// ser_edge_controller: the Edge Controller of one SER edge.
//
// The edge between nodes a and b is a toggle flip-flop with preset. Its
// output tells which way the edge points: `to_a` high means the edge is
// oriented towards node a, `to_b` (its complement) towards node b. When the
// node that holds the edge ends its operation (`done_a` or `done_b`), the
// flip-flop toggles: the edge is taken away from that node and handed to the
// neighbour in the same step. Reset presets the orientation to INIT_TO_A,
// which is how the initial acyclic orientation is loaded while the system
// is stopped.
//
// Timing: the orientation changes on the clock edge after the end-of-
// operation cycle. Only the node the edge points at can be a sink, so at
// most one of done_a and done_b is high at a time; an assertion checks it.
//
// Following the source: toggle flip-flop with preset as the orientation
// store. This design's own choices: a clocked flip-flop toggled by the
// end-of-operation signal, and an asynchronous active-low preset.
module ser_edge_controller #(
  parameter bit INIT_TO_A = 1'b1  // initial orientation: 1 = towards a
) (
  input  logic clk,
  input  logic rst_n,   // preset to the initial orientation
  input  logic done_a,  // node a ends its operation
  input  logic done_b,  // node b ends its operation
  output logic to_a,    // edge oriented towards a
  output logic to_b     // edge oriented towards b
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                q <= INIT_TO_A;
    else if (done_a || done_b) q <= ~q;  // T input = done_a | done_b
  end

  assign to_a = q;
  assign to_b = ~q;

  // Only the current holder of the edge can release it.
  property p_release_by_holder;
    @(posedge clk) disable iff (!rst_n) !(done_a && !q) && !(done_b && q);
  endproperty
  a_release_by_holder: assert property (p_release_by_holder)
    else $error("ser_edge_controller: edge released by a node that does not hold it");

endmodule
