// sea_round: one SEA Feistel round, combinational, for either direction.
//
//   encryption (dec=0):  L' = R,  R' = Rw(L) ^ f
//   decryption (dec=1):  L' = R,  R' = Rw^-1(L ^ f)
//   with f = r(S(R + K)) from sea_f
//
// Rw is the word rotation (word i moves to word i+1, the last word wraps to
// word 0, i.e. a left rotation of the half vector by B bits) and Rw^-1 its
// inverse. The left path is laid out as "Rw, XOR, Rw^-1" with Rw used only
// when encrypting and Rw^-1 only when decrypting, so one circuit serves both
// directions; the decryption round is the exact inverse of the encryption
// round when the round keys are applied in reverse order.
//
// The round structure, with its two shaded rotation boxes, follows the
// original round diagram.
//
// Ports: l_in/r_in/k_in are NB*B-bit halves; l_out/r_out the next halves.
module sea_round #(
  parameter int unsigned NB = 6,
  parameter int unsigned B  = 8
) (
  input  logic            dec,
  input  logic [NB*B-1:0] l_in,
  input  logic [NB*B-1:0] r_in,
  input  logic [NB*B-1:0] k_in,
  output logic [NB*B-1:0] l_out,
  output logic [NB*B-1:0] r_out
);

  localparam int unsigned W = NB * B;

  logic [W-1:0] f, rot_l, mixed;

  sea_f #(.NB(NB), .B(B)) u_f (.x(r_in), .k(k_in), .y(f));

  // word rotation in front of the XOR (encryption only)
  assign rot_l = dec ? l_in : {l_in[W-B-1:0], l_in[W-1:W-B]};
  assign mixed = rot_l ^ f;
  // inverse word rotation after the XOR (decryption only)
  assign r_out = dec ? {mixed[B-1:0], mixed[W-1:B]} : mixed;
  assign l_out = r_in;

endmodule
