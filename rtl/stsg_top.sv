// stsg_top: the three SER/SMER sequence generators side by side.
//
// One SER ring counter and two SMER counters (modulo-2^N binary and Gray)
// share a clock, an asynchronous active-low reset that loads every initial
// edge orientation, and one Stop/Run control. Each generator brings out its
// value and a `step` strobe that is high in the last cycle of each
// operation, i.e. when the value changes at the next clock edge.
//
// Timing: every node operates for T_OP clock cycles, so each generator
// produces one new value per T_OP cycles while `run` is high and holds its
// value while `run` is low.
//
// Following the source: the three counters and their sizes (six-bit ring,
// three-bit Gray); the four-bit binary counter is the largest the source
// draws. This design's own choices: the shared controls and T_OP.
module stsg_top #(
  parameter int unsigned RING_N = 6,  // ring counter bits
  parameter int unsigned MOD_N  = 4,  // modulo-2^N counter bits
  parameter int unsigned GRAY_N = 3,  // Gray counter bits
  parameter int unsigned T_OP   = 1   // node operation time, clock cycles
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  output logic [RING_N-1:0] ring_q,
  output logic              ring_step,
  output logic [MOD_N-1:0]  mod_count,
  output logic              mod_step,
  output logic [GRAY_N-1:0] gray_code,
  output logic              gray_step
);

  ser_ring_counter #(.N(RING_N), .T_OP(T_OP)) u_ring (
    .clk, .rst_n, .run, .q(ring_q), .step(ring_step)
  );

  smer_mod_counter #(.N(MOD_N), .T_OP(T_OP)) u_mod (
    .clk, .rst_n, .run, .count(mod_count), .step(mod_step)
  );

  smer_gray_counter #(.N(GRAY_N), .T_OP(T_OP)) u_gray (
    .clk, .rst_n, .run, .gray(gray_code), .step(gray_step)
  );

endmodule
