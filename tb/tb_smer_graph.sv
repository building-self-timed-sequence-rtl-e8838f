// tb_smer_graph: self-checking testbench for smer_graph.
//
// Instance g4 uses the default graph, the two-bit modulo-4 counter with
// nodes A, B (main) and A*, B* (mirrors). Worked by hand from the SMER
// rules, the sets of operating nodes repeat with period 4:
//   {A*}, {A, B*}, {B, A*}, {A, B}
// so the sink vector {B*, A*, B, A} runs 0100, 1001, 0110, 0011.
// Instance g2 is a two-node SMER graph with r_a = 2, r_b = 3 and four edges,
// all pointing at a after reset. Its edge count towards a runs
// 4, 2, 0, 3, 1, 4, ... so the operating node runs a, a, b, a, b and
// repeats: a operates three times for every two of b (the ratio of the
// reversibilities), twice in a row each period. Both instances are checked
// with an operation time of one cycle; g4 is also run with three cycles.
module tb_smer_graph;
  import smer_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  int checks = 0, failures = 0, consecutive = 0;

  always #5 clk = ~clk;

  logic [3:0] sink4, eoo4, sink4s, eoo4s;
  logic [1:0] sink2, eoo2;

  smer_graph g4 (.clk, .rst_n, .run, .sink(sink4), .eoo(eoo4));

  smer_graph #(.T_OP(3)) g4s (.clk, .rst_n, .run, .sink(sink4s), .eoo(eoo4s));

  localparam rev_t  [1:0] REV2  = {16'd3, 16'd2};
  localparam edge_t [0:0] EDGE2 = '{'{a: 8'd0, b: 8'd1, mult: 16'd4, to_a: 16'd4}};
  smer_graph #(.NODES(2), .EDGES(1), .REV(REV2), .EDGE(EDGE2)) g2 (
    .clk, .rst_n, .run, .sink(sink2), .eoo(eoo2));

  localparam logic [3:0] SEQ4 [4] = '{4'b0100, 4'b1001, 4'b0110, 4'b0011};
  localparam logic [1:0] SEQ2 [5] = '{2'b01, 2'b01, 2'b10, 2'b01, 2'b10};

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: sink4=%b sink4s=%b sink2=%b", what, $time, sink4, sink4s, sink2);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] prev2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    check(sink4 == 4'b0000 && sink2 == 2'b00, "nothing operates while stopped");
    @(posedge clk) #1 run = 1'b1;
    prev2 = '0;
    for (int s = 0; s < 60; s++) begin
      @(negedge clk);
      check(sink4 == SEQ4[s % 4], "g4 sink set");
      check(eoo4 == sink4, "g4 end of operation");
      check(sink2 == SEQ2[s % 5], "g2 sink set");
      check(sink4s == SEQ4[(s / 3) % 4], "g4s sink set");
      check(eoo4s == (((s % 3) == 2) ? sink4s : 4'b0000), "g4s end of operation");
      if (sink2 == prev2 && sink2 != 2'b00) consecutive++;
      prev2 = sink2;
    end
    // Stop holds the orientation; Run resumes where it stopped.
    @(posedge clk) #1 run = 1'b0;
    repeat (5) begin
      @(negedge clk);
      check(sink4 == 4'b0000 && sink2 == 2'b00, "Stop holds");
    end
    @(posedge clk) #1 run = 1'b1;
    @(negedge clk);
    check(sink4 == SEQ4[60 % 4], "g4 resumes");
    check(sink2 == SEQ2[60 % 5], "g2 resumes");
    check(consecutive >= 10, "a node operated twice in a row");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
