// smer_edge_controller: the controller of one SMER link, a bundle of MULT
// parallel edges between nodes a and b.
//
// The link state is the number of edges oriented towards a, `cnt`; the
// other MULT - cnt edges point at b. Node a may operate only when at least
// R_A edges point at it (`ready_a`), node b only when at least R_B point at
// it (`ready_b`). When a ends its operation it reverses R_A edges towards b
// (cnt -= R_A); when b ends its operation it reverses R_B edges towards a
// (cnt += R_B). With R_A + R_B > MULT the two ends can never be ready at the
// same time, which is the mutual exclusion the SMER rules rely on; an
// assertion checks that the ends never release in the same cycle and that
// a releasing end held enough edges. With MULT = R_A = R_B = 1 this is the
// SER edge, a toggle flip-flop.
//
// Timing: the count changes on the clock edge after the end-of-operation
// cycle; reset loads INIT_TO_A.
//
// Following the source: the SMER reversal rule, multiplicity and initial
// orientation. This design's own choice: a link is stored as one binary
// up/down counter instead of being unfolded into an equivalent SER graph.
module smer_edge_controller #(
  parameter int unsigned MULT      = 2,  // parallel edges e_ab
  parameter int unsigned R_A       = 1,  // reversibility of node a
  parameter int unsigned R_B       = 2,  // reversibility of node b
  parameter int unsigned INIT_TO_A = 0   // edges towards a after reset
) (
  input  logic clk,
  input  logic rst_n,
  input  logic done_a,   // node a ends its operation
  input  logic done_b,   // node b ends its operation
  output logic ready_a,  // at least R_A edges point at a
  output logic ready_b   // at least R_B edges point at b
);

  localparam int unsigned W = $clog2(MULT + 1);

  logic [W-1:0] cnt;  // edges oriented towards a

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      cnt <= W'(INIT_TO_A);
    else if (done_a) cnt <= cnt - W'(R_A);
    else if (done_b) cnt <= cnt + W'(R_B);
  end

  assign ready_a = (32'(cnt) >= R_A);
  assign ready_b = (MULT - 32'(cnt) >= R_B);

  a_one_end: assert property (@(posedge clk) disable iff (!rst_n) !(done_a && done_b))
    else $error("smer_edge_controller: both ends released in the same cycle");
  a_a_holds: assert property (@(posedge clk) disable iff (!rst_n) done_a |-> ready_a)
    else $error("smer_edge_controller: node a released edges it did not hold");
  a_b_holds: assert property (@(posedge clk) disable iff (!rst_n) done_b |-> ready_b)
    else $error("smer_edge_controller: node b released edges it did not hold");

endmodule
