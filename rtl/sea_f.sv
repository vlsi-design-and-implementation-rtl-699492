// sea_f: the shared nonlinear part of the SEA round and key round,
//   y = r(S(x + k))
// on one half-block of NB words of B bits (word i in bits [B*i +: B]).
//
//  * '+' is word-wise addition modulo 2^B.
//  * S is the 3-bit S-box {0,5,6,7,4,3,1,2}, applied bit-sliced to each
//    triple of words (x3i, x3i+1, x3i+2), computed in place as
//      x0 ^= x2 & x1;  x1 ^= x2 & x0;  x2 ^= x0 | x1
//  * r rotates word 3i right by one bit and word 3i+2 left by one bit,
//    leaving word 3i+1 unchanged.
// These operations are the ones of the SEA_n,b cipher (XOR, S-box, word and
// bit rotation, modular addition); their exact bit-level definitions follow
// the published SEA specification.
//
// Purely combinational. NB must be a multiple of 3.
module sea_f #(
  parameter int unsigned NB = 6,
  parameter int unsigned B  = 8
) (
  input  logic [NB*B-1:0] x,
  input  logic [NB*B-1:0] k,
  output logic [NB*B-1:0] y
);

  logic [NB*B-1:0] sum, sub;

  // word-wise addition mod 2^B
  always_comb begin
    for (int i = 0; i < NB; i++)
      sum[B*i +: B] = x[B*i +: B] + k[B*i +: B];
  end

  // bit-sliced S-box on word triples
  always_comb begin
    logic [B-1:0] x0, x1, x2;
    for (int t = 0; t < NB/3; t++) begin
      x0 = sum[B*(3*t)   +: B];
      x1 = sum[B*(3*t+1) +: B];
      x2 = sum[B*(3*t+2) +: B];
      x0 = x0 ^ (x2 & x1);
      x1 = x1 ^ (x2 & x0);
      x2 = x2 ^ (x0 | x1);
      sub[B*(3*t)   +: B] = x0;
      sub[B*(3*t+1) +: B] = x1;
      sub[B*(3*t+2) +: B] = x2;
    end
  end

  // bit rotation r
  always_comb begin
    logic [B-1:0] w0, w2;
    for (int t = 0; t < NB/3; t++) begin
      w0 = sub[B*(3*t)   +: B];
      w2 = sub[B*(3*t+2) +: B];
      y[B*(3*t)   +: B] = {w0[0], w0[B-1:1]};    // rotate right by 1
      y[B*(3*t+1) +: B] = sub[B*(3*t+1) +: B];
      y[B*(3*t+2) +: B] = {w2[B-2:0], w2[B-1]};  // rotate left by 1
    end
  end

endmodule
