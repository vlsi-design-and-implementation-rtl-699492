// msic_tpg: modified multiple-single-input-change (MSIC) test pattern
// generator.
//
// An M-bit seed LFSR (slow clock CLK1) and an L-stage reconfigurable
// Johnson counter (clock CLK2) are combined by an array of M*L XOR gates
// (the array and its indexing follow the original generator):
//   X[(j-1)*L + i] = J_i ^ S_j      (i = 1..L, j = 1..M; X_1 = vec[0])
// The M seed bits themselves form the top of the vector:
//   vec = {S_m..S_1, X_mL..X_1}            (M*(L+1) bits)
// Each Johnson step flips one bit of J, so consecutive vectors differ in
// exactly one bit of every L-bit group (one single-input change per seed
// bit): low switching activity in the circuit under test, while the seed
// spreads the vectors over the input space. The direct seed bits (drawn in
// the original block diagram as seed lines into the circuit under test) keep a
// seed S and its complement ~S apart: without them the two would give the
// same 2L vectors (the complement of a Johnson state is again a Johnson
// state), and a test sequence should not repeat patterns. msic_ctrl sequences CLK1, CLK2,
// RJ_Mode and Init for the test-per-clock or the test-per-scan scheme.
//
// Outputs: vec is valid combinationally from the registers; vec_valid marks
// the clocks at which it is a test vector (every clock per-clock, capture
// clocks per-scan); shift/capture drive scan chains in the per-scan scheme.
module msic_tpg
  import crypto_bist_pkg::*;
#(
  parameter int unsigned M = 12,
  parameter int unsigned L = 11
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  tpg_scheme_e    scan_scheme,
  output logic [M*(L+1)-1:0] vec,
  output logic           vec_valid,
  output logic           shift,
  output logic           capture
);

  logic         clk1_en, clk2_en, rj_mode, init;
  logic [M-1:0] seed;
  logic [L-1:0] j;

  msic_ctrl #(.L(L)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (run),
    .scan_scheme(scan_scheme),
    .clk1_en    (clk1_en),
    .clk2_en    (clk2_en),
    .rj_mode    (rj_mode),
    .init       (init),
    .shift      (shift),
    .capture    (capture),
    .vec_valid  (vec_valid)
  );

  seed_lfsr #(.M(M)) u_seed (
    .clk    (clk),
    .rst_n  (rst_n),
    .clk1_en(clk1_en),
    .seed   (seed)
  );

  rj_counter #(.L(L)) u_rj (
    .clk    (clk),
    .rst_n  (rst_n),
    .clk2_en(clk2_en),
    .rj_mode(rj_mode),
    .init   (init),
    .j      (j)
  );

  always_comb begin
    for (int s = 0; s < M; s++)
      vec[s*L +: L] = j ^ {L{seed[s]}};
    vec[M*L +: M] = seed;
  end

endmodule
