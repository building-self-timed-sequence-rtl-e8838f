// tb_counter_check: reference checker shared by the counter testbenches.
//
// Watches one sequence generator. It keeps its own step number and
// operation phase: while Run is high the phase advances every clock and the
// step number advances every T_OP clocks; while Run is low (Stop) the phase
// restarts and the value must read 0, since no node may operate. KIND
// selects the expected value of step s: 0 = ring (one-hot 1 << s mod N),
// 1 = binary (s mod 2^N), 2 = Gray ((s ^ s >> 1) mod 2^N). Every cycle it
// compares `value` and `step` with the prediction and counts checks,
// failures, completed periods and cycles held by Stop.
module tb_counter_check #(
  parameter int unsigned KIND = 1,
  parameter int unsigned N    = 4,
  parameter int unsigned T_OP = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic [N-1:0] value,
  input  logic         step,
  output int           checks,
  output int           failures,
  output int           wraps,
  output int           holds
);
  int unsigned s = 0, phase = 0;

  function automatic logic [N-1:0] expect_value(int unsigned k);
    case (KIND)
      0:       return N'(1) << (k % N);
      1:       return N'(k);
      default: return N'((k % (1 << N)) ^ ((k % (1 << N)) >> 1));
    endcase
  endfunction

  function automatic int unsigned period();
    return (KIND == 0) ? N : (1 << N);
  endfunction

  initial begin
    checks = 0; failures = 0; wraps = 0; holds = 0;
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      s = 0;
      phase = 0;
    end else begin
      automatic logic [N-1:0] ev = run ? expect_value(s) : '0;
      automatic logic         es = run && (phase == T_OP - 1);
      checks += 2;
      if (value !== ev) begin
        failures++;
        $display("FAIL kind %0d N=%0d T_OP=%0d step %0d: value %b expected %b", KIND, N, T_OP, s, value, ev);
      end
      if (step !== es) begin
        failures++;
        $display("FAIL kind %0d N=%0d T_OP=%0d step %0d: step strobe %b expected %b", KIND, N, T_OP, s, step, es);
      end
      if (!run) begin
        phase = 0;
        holds++;
      end else if (phase == T_OP - 1) begin
        phase = 0;
        s++;
        if (s % period() == 0) wraps++;
      end else begin
        phase++;
      end
    end
  end
endmodule
