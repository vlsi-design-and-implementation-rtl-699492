// seed_lfsr: seed generator of the MSIC test pattern generator, an M-stage
// conventional (Fibonacci) LFSR that steps once per CLK1 tick.
//
// CLK1 is the generator's slow clock; here it is a one-cycle enable,
// clk1_en, on the common system clock. The feedback is the XOR of the bits
// selected by TAPS and enters at bit 0 while the register shifts left. The
// default taps x^12 + x^6 + x^4 + x + 1 give a maximal-length sequence of
// 4095 seeds; SEED (non-zero) is the state after reset (synchronous, active
// low). The seed bits S_1..S_m are seed[0]..seed[M-1]. An m-stage LFSR on a
// slow clock is what the original generator uses; the polynomial, the seed
// value and the single clock with an enable are this design's choices.
module seed_lfsr #(
  parameter int unsigned M    = 12,
  parameter logic [M-1:0] TAPS = 12'h829,
  parameter logic [M-1:0] SEED = 12'h001
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clk1_en,
  output logic [M-1:0] seed
);

  always_ff @(posedge clk) begin
    if (!rst_n)       seed <= SEED;
    else if (clk1_en) seed <= {seed[M-2:0], ^(seed & TAPS)};
  end

endmodule
