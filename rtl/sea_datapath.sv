// sea_datapath: encryption/decryption datapath of an iterative SEA core.
//
// Holds the two block halves L and R in registers and applies one
// sea_round per clock while `step` is high. `load` takes the input block
// as P = L0 & R0 (L0 in the upper half). The output is the swapped
// concatenation C = R & L, which after the last round is the cipher text
// (or, when decrypting, the plain text).
//
// Self-test access: with test_en high the round logic is fed from
// test_l/test_r/test_k instead of the registers (which then hold), and its
// raw output {L', R'} is visible on round_out every clock, so a pattern
// generator and signature register can test the round logic one pattern
// per clock.
//
// Timing: registers update on the rising clock edge; load has priority over
// step; rst_n is a synchronous active-low clear.
module sea_datapath #(
  parameter int unsigned NB = 6,
  parameter int unsigned B  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              step,
  input  logic              dec,
  input  logic [2*NB*B-1:0] data_in,
  input  logic [NB*B-1:0]   rkey,
  input  logic              test_en,
  input  logic [NB*B-1:0]   test_l,
  input  logic [NB*B-1:0]   test_r,
  input  logic [NB*B-1:0]   test_k,
  output logic [2*NB*B-1:0] round_out,
  output logic [2*NB*B-1:0] data_out
);

  localparam int unsigned W = NB * B;

  logic [W-1:0] l_q, r_q;
  logic [W-1:0] l_in, r_in, k_in, l_nx, r_nx;

  assign l_in = test_en ? test_l : l_q;
  assign r_in = test_en ? test_r : r_q;
  assign k_in = test_en ? test_k : rkey;

  sea_round #(.NB(NB), .B(B)) u_round (
    .dec  (dec),
    .l_in (l_in),
    .r_in (r_in),
    .k_in (k_in),
    .l_out(l_nx),
    .r_out(r_nx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      l_q <= '0;
      r_q <= '0;
    end else if (load) begin
      l_q <= data_in[2*W-1:W];
      r_q <= data_in[W-1:0];
    end else if (step && !test_en) begin
      l_q <= l_nx;
      r_q <= r_nx;
    end
  end

  assign round_out = {l_nx, r_nx};
  assign data_out  = {r_q, l_q};

endmodule
