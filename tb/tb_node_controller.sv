// tb_node_controller: self-checking testbench for node_controller.
//
// Drives random edge-ready patterns and Stop/Run for a node with three
// links and a three-cycle operation. A reference model in the testbench
// tracks how long the node has been a sink and predicts `sink` (all links
// ready and Run) and `eoo` (the third consecutive sink cycle), and checks
// both every cycle. To let operations complete, the ready pattern is held
// while the node operates unless the test deliberately drops Run.
module tb_node_controller;
  localparam int unsigned DEG  = 3;
  localparam int unsigned T_OP = 3;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [DEG-1:0] edge_ready = '0;
  logic sink, eoo;
  int checks = 0, failures = 0, n_eoo = 0, n_abort = 0;
  int unsigned ref_elapsed = 0;

  node_controller #(.DEG(DEG), .T_OP(T_OP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: sink=%b eoo=%b ref_elapsed=%0d", what, $time, sink, eoo, ref_elapsed);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // Choose new inputs before the rising edge (on the falling edge).
      @(negedge clk);
      if (ref_elapsed == 0 || $urandom_range(0, 19) == 0) begin
        edge_ready = DEG'($urandom);
        if ($urandom_range(0, 2) == 0) edge_ready = '1;
        run = ($urandom_range(0, 7) != 0);
        if (ref_elapsed != 0) n_abort++;
      end
      #1;
      begin
        automatic bit exp_sink = run && (&edge_ready);
        automatic bit exp_eoo  = exp_sink && (ref_elapsed == T_OP - 1);
        check(sink == exp_sink, "sink");
        check(eoo == exp_eoo, "eoo");
        if (exp_eoo) n_eoo++;
        @(posedge clk);
        if (!exp_sink || exp_eoo) ref_elapsed = 0;
        else ref_elapsed++;
      end
    end
    check(n_eoo > 50, "operations completed");
    check(n_abort > 5, "operations abandoned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
