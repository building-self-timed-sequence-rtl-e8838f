// tb_ser_edge_controller: self-checking testbench for ser_edge_controller.
//
// Two instances are preset in opposite orientations. Each cycle the node
// that currently holds an edge may end its operation at random; the
// testbench keeps its own copy of the orientation, flips it when the holder
// releases, and checks both outputs every cycle and after a mid-run reset.
module tb_ser_edge_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] done_a = '0, done_b = '0, to_a, to_b;
  logic [1:0] ref_q;
  int checks = 0, failures = 0, flips = 0;

  ser_edge_controller #(.INIT_TO_A(1'b1)) u0 (.clk, .rst_n, .done_a(done_a[0]), .done_b(done_b[0]), .to_a(to_a[0]), .to_b(to_b[0]));
  ser_edge_controller #(.INIT_TO_A(1'b0)) u1 (.clk, .rst_n, .done_a(done_a[1]), .done_b(done_b[1]), .to_a(to_a[1]), .to_b(to_b[1]));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: to_a=%b to_b=%b ref=%b", what, $time, to_a, to_b, ref_q);
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
    ref_q = 2'b01;
    repeat (2) @(posedge clk);
    #1 check(to_a == 2'b01 && to_b == 2'b10, "preset");
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      if (cyc == 500) begin
        rst_n = 1'b0;
        ref_q = 2'b01;
        #1 check(to_a == 2'b01, "preset mid-run");
        @(negedge clk) rst_n = 1'b1;
      end
      for (int i = 0; i < 2; i++) begin
        automatic bit fire = ($urandom_range(0, 2) == 0);
        done_a[i] = fire && ref_q[i];
        done_b[i] = fire && !ref_q[i];
      end
      @(posedge clk);
      for (int i = 0; i < 2; i++)
        if (done_a[i] || done_b[i]) begin
          ref_q[i] = ~ref_q[i];
          flips++;
        end
      #1;
      check(to_a == ref_q, "to_a");
      check(to_b == ~ref_q, "to_b");
    end
    check(flips > 200, "edges reversed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
