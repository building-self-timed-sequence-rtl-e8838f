// tb_smer_edge_controller: self-checking testbench for smer_edge_controller.
//
// Tests two links: r_a = 2, r_b = 3 with four edges (the lower SMER bound,
// max(r_a, r_b)) and r_a = 1, r_b = 4 with four edges. The testbench keeps
// the number of edges pointing at node a, lets a ready end release at
// random, and checks ready_a and ready_b against its own count every cycle.
// It also checks that the two ends are never ready together.
module tb_smer_edge_controller;
  localparam int unsigned M0 = 4, RA0 = 2, RB0 = 3, T0 = 1;
  localparam int unsigned M1 = 4, RA1 = 1, RB1 = 4, T1 = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] done_a = '0, done_b = '0, ready_a, ready_b;
  int ref_cnt [2];
  int checks = 0, failures = 0, rel_a = 0, rel_b = 0;

  smer_edge_controller #(.MULT(M0), .R_A(RA0), .R_B(RB0), .INIT_TO_A(T0)) u0 (
    .clk, .rst_n, .done_a(done_a[0]), .done_b(done_b[0]), .ready_a(ready_a[0]), .ready_b(ready_b[0]));
  smer_edge_controller #(.MULT(M1), .R_A(RA1), .R_B(RB1), .INIT_TO_A(T1)) u1 (
    .clk, .rst_n, .done_a(done_a[1]), .done_b(done_b[1]), .ready_a(ready_a[1]), .ready_b(ready_b[1]));

  always #5 clk = ~clk;

  function automatic int unsigned mult(int i); return i == 0 ? M0 : M1; endfunction
  function automatic int unsigned ra(int i);   return i == 0 ? RA0 : RA1; endfunction
  function automatic int unsigned rb(int i);   return i == 0 ? RB0 : RB1; endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: ready_a=%b ready_b=%b cnt=%0d/%0d", what, $time, ready_a, ready_b, ref_cnt[0], ref_cnt[1]);
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
    ref_cnt[0] = T0;
    ref_cnt[1] = T1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        automatic bit ea = (ref_cnt[i] >= int'(ra(i)));
        automatic bit eb = (int'(mult(i)) - ref_cnt[i] >= int'(rb(i)));
        check(ready_a[i] == ea, "ready_a");
        check(ready_b[i] == eb, "ready_b");
        check(!(ready_a[i] && ready_b[i]), "mutual exclusion");
        done_a[i] = ea && ($urandom_range(0, 1) == 0);
        done_b[i] = eb && ($urandom_range(0, 1) == 0);
      end
      @(posedge clk);
      for (int i = 0; i < 2; i++) begin
        if (done_a[i]) begin ref_cnt[i] -= ra(i); rel_a++; end
        if (done_b[i]) begin ref_cnt[i] += rb(i); rel_b++; end
      end
    end
    check(rel_a > 100 && rel_b > 100, "both ends released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
