// tb_stsg_top: end-to-end testbench for stsg_top at its default sizes
// (six-bit ring, four-bit binary, three-bit Gray counter, one-cycle
// operations).
//
// The three generators are run together through Run intervals, Stop
// intervals and a reset in the middle of counting. tb_counter_check
// predicts every output of every generator each cycle. The testbench also
// counts how often each mechanism of the design occurred and fails if one
// never did: wrap-around of each generator, Stop holding all three, reset
// reloading the initial orientation mid-count, a main node operating many
// times in a row (the top bit of the binary counter staying a sink for 2^3
// consecutive steps, then its mirror returning all eight edges at once) and
// Gray steps that change exactly one bit.
module tb_stsg_top;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [5:0] ring_q;
  logic [3:0] mod_count;
  logic [2:0] gray_code;
  logic       ring_step, mod_step, gray_step;

  int c_checks [3], c_fail [3], c_wraps [3], c_holds [3];
  int checks = 0, failures = 0;
  int n_midreset = 0, n_long_run = 0, n_gray_onebit = 0, run_len = 0;
  logic [2:0] prev_gray = '0;

  stsg_top dut (.*);

  always #5 clk = ~clk;

  tb_counter_check #(.KIND(0), .N(6), .T_OP(1)) chk_ring (
    .clk, .rst_n, .run, .value(ring_q), .step(ring_step),
    .checks(c_checks[0]), .failures(c_fail[0]), .wraps(c_wraps[0]), .holds(c_holds[0]));
  tb_counter_check #(.KIND(1), .N(4), .T_OP(1)) chk_mod (
    .clk, .rst_n, .run, .value(mod_count), .step(mod_step),
    .checks(c_checks[1]), .failures(c_fail[1]), .wraps(c_wraps[1]), .holds(c_holds[1]));
  tb_counter_check #(.KIND(2), .N(3), .T_OP(1)) chk_gray (
    .clk, .rst_n, .run, .value(gray_code), .step(gray_step),
    .checks(c_checks[2]), .failures(c_fail[2]), .wraps(c_wraps[2]), .holds(c_holds[2]));

  // Mechanism counters, sampled with the checkers.
  always @(negedge clk) begin
    if (rst_n && run) begin
      if (mod_count[3]) run_len++;
      else begin
        if (run_len == 8) n_long_run++;
        run_len = 0;
      end
      if ($countones(gray_code ^ prev_gray) == 1) n_gray_onebit++;
      prev_gray = gray_code;
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  task automatic finish();
    for (int i = 0; i < 3; i++) begin
      checks += c_checks[i];
      failures += c_fail[i];
    end
    need(c_wraps[0], "ring counter wraps");
    need(c_wraps[1], "binary counter wraps");
    need(c_wraps[2], "Gray counter wraps");
    need(c_holds[0] * c_holds[1] * c_holds[2], "cycles held by Stop");
    need(n_midreset, "resets in the middle of a count");
    need(n_long_run, "top binary bit held for eight operations");
    need(n_gray_onebit, "Gray steps changing one bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    finish();
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk) #1 run = 1'b1;
    repeat (37) @(posedge clk);          // mid-count: 37 = no wrap point
    #1 rst_n = 1'b0;
    n_midreset++;
    prev_gray = '0;
    run_len = 0;
    @(posedge clk) #1 rst_n = 1'b1;
    repeat (40) @(posedge clk);
    #1 run = 1'b0;                       // Stop
    repeat (7) @(posedge clk);
    #1 run = 1'b1;                       // Run again
    repeat (2000) begin
      @(posedge clk) #1;
      if ($urandom_range(0, 49) == 0) run = 1'b0;
      else if (!run) run = 1'b1;
    end
    @(negedge clk);
    finish();
  end
endmodule
