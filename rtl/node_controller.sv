// node_controller: the Node Controller of a SER/SMER node.
//
// The controller looks at the edges incident to its node. `edge_ready[k]`
// is high when link k has enough edges oriented towards this node (one edge
// under SER, r edges under SMER); inputs for links that do not touch the
// node are tied high by the caller. When every link is ready and Run is
// asserted the node is a sink: `sink` rises and the node's local operation
// starts. The operation is represented by a down-counter of T_OP clock
// cycles; in its last cycle `eoo` (end of operation) is raised and the edge
// controllers reverse the node's edges on the following clock edge, after
// which the node is no longer a sink.
//
// Timing: `sink` is combinational from the edge state and `run`. With
// T_OP = 1 a sink operates and releases its edges in one cycle, which is the
// synchronous special case of the dynamics in which every node takes the
// same time to operate. While `run` is low (Stop) no node operates and an
// operation in progress is abandoned without reversing any edge.
//
// Following the source: sink detection, Stop/Run gating and the
// end-of-operation signal. This design's own choices: the operation is a
// clocked delay of T_OP cycles, and reset is asynchronous and active low.
module node_controller #(
  parameter int unsigned DEG  = 2,  // number of links seen by the node
  parameter int unsigned T_OP = 1   // operation time in clock cycles (>= 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,         // 1 = Run, 0 = Stop
  input  logic [DEG-1:0] edge_ready,  // link k points enough edges here
  output logic           sink,        // node is a sink and operating
  output logic           eoo          // end of operation, last busy cycle
);

  localparam int unsigned TW = (T_OP > 1) ? $clog2(T_OP) : 1;

  logic [TW-1:0] elapsed;  // cycles of the current operation already spent

  assign sink = run && (&edge_ready);
  assign eoo  = sink && (elapsed == TW'(T_OP - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      elapsed <= '0;
    end else if (!sink || eoo) begin
      elapsed <= '0;
    end else begin
      elapsed <= elapsed + 1'b1;
    end
  end

endmodule
