// tb_smer_mod_counter: self-checking testbench for smer_mod_counter.
//
// Modulo-2^N counters of 2, 3, 4 and 5 bits, with operation times of 1 to 3 cycles.
// Each configuration is compared every cycle with tb_counter_check, which
// predicts the value and the step strobe independently of the graph. The
// run includes Stop intervals and a second reset, and every configuration
// must complete several full periods and be held by Stop at least once.
module tb_smer_mod_counter;
  localparam int NCFG = 6;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  int c_checks [NCFG], c_fail [NCFG], c_wraps [NCFG], c_holds [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [2-1:0] v0;
  logic          s0;
  smer_mod_counter #(.N(2), .T_OP(1)) dut0 (.clk, .rst_n, .run, .count(v0), .step(s0));
  tb_counter_check #(.KIND(1), .N(2), .T_OP(1)) chk0 (
    .clk, .rst_n, .run, .value(v0), .step(s0),
    .checks(c_checks[0]), .failures(c_fail[0]), .wraps(c_wraps[0]), .holds(c_holds[0]));

  logic [3-1:0] v1;
  logic          s1;
  smer_mod_counter #(.N(3), .T_OP(1)) dut1 (.clk, .rst_n, .run, .count(v1), .step(s1));
  tb_counter_check #(.KIND(1), .N(3), .T_OP(1)) chk1 (
    .clk, .rst_n, .run, .value(v1), .step(s1),
    .checks(c_checks[1]), .failures(c_fail[1]), .wraps(c_wraps[1]), .holds(c_holds[1]));

  logic [4-1:0] v2;
  logic          s2;
  smer_mod_counter #(.N(4), .T_OP(1)) dut2 (.clk, .rst_n, .run, .count(v2), .step(s2));
  tb_counter_check #(.KIND(1), .N(4), .T_OP(1)) chk2 (
    .clk, .rst_n, .run, .value(v2), .step(s2),
    .checks(c_checks[2]), .failures(c_fail[2]), .wraps(c_wraps[2]), .holds(c_holds[2]));

  logic [4-1:0] v3;
  logic          s3;
  smer_mod_counter #(.N(4), .T_OP(3)) dut3 (.clk, .rst_n, .run, .count(v3), .step(s3));
  tb_counter_check #(.KIND(1), .N(4), .T_OP(3)) chk3 (
    .clk, .rst_n, .run, .value(v3), .step(s3),
    .checks(c_checks[3]), .failures(c_fail[3]), .wraps(c_wraps[3]), .holds(c_holds[3]));

  logic [5-1:0] v4;
  logic          s4;
  smer_mod_counter #(.N(5), .T_OP(2)) dut4 (.clk, .rst_n, .run, .count(v4), .step(s4));
  tb_counter_check #(.KIND(1), .N(5), .T_OP(2)) chk4 (
    .clk, .rst_n, .run, .value(v4), .step(s4),
    .checks(c_checks[4]), .failures(c_fail[4]), .wraps(c_wraps[4]), .holds(c_holds[4]));

  logic [2-1:0] v5;
  logic          s5;
  smer_mod_counter #(.N(2), .T_OP(2)) dut5 (.clk, .rst_n, .run, .count(v5), .step(s5));
  tb_counter_check #(.KIND(1), .N(2), .T_OP(2)) chk5 (
    .clk, .rst_n, .run, .value(v5), .step(s5),
    .checks(c_checks[5]), .failures(c_fail[5]), .wraps(c_wraps[5]), .holds(c_holds[5]));

  task automatic finish();
    for (int i = 0; i < NCFG; i++) begin
      checks += c_checks[i] + 2;
      failures += c_fail[i];
      if (c_wraps[i] < 3) begin
        failures++;
        $display("FAIL configuration %0d completed only %0d periods", i, c_wraps[i]);
      end
      if (c_holds[i] == 0) begin
        failures++;
        $display("FAIL configuration %0d never held by Stop", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    finish();
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int phase = 0; phase < 2; phase++) begin
      @(posedge clk) #1 run = 1'b1;
      repeat (5000) begin
        @(posedge clk) #1;
        if ($urandom_range(0, 99) == 0) run = 1'b0;
        else if (!run && $urandom_range(0, 3) == 0) run = 1'b1;
      end
      run = 1'b0;
      @(posedge clk) #1 rst_n = 1'b0;
      @(posedge clk) #1 rst_n = 1'b1;
    end
    @(negedge clk);
    finish();
  end
endmodule
