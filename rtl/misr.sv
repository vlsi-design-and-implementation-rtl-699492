// misr: multiple-input signature register that compacts test responses.
//
// Internal-XOR (Galois) form: on each clock with `en`,
//   sig <= ({sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : 0)) ^ d
// POLY holds the low W coefficients of the characteristic polynomial; the
// default is x^96 + x^94 + x^49 + x^47 + 1, a maximal-length polynomial, for
// which the chance that a faulty response stream aliases to the fault-free
// signature is about 2^-96. `clear` (synchronous) and rst_n (synchronous,
// active low) set the signature to zero; clear has priority over en.
// The original design only names a MISR; its form, width and polynomial are
// this design's choices.
module misr #(
  parameter int unsigned W = 96,
  parameter logic [W-1:0] POLY = W'((96'd1 << 94) | (96'd1 << 49) | (96'd1 << 47) | 96'd1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) sig <= '0;
    else if (en)         sig <= ({sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0)) ^ d;
  end

endmodule
