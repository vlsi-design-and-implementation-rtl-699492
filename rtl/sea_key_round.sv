// sea_key_round: one round FK of the SEA key schedule, combinational.
//
//   KL' = KR
//   KR' = KL ^ Rw(r(S(KR + C)))
//
// with r(S(. + .)) from sea_f and Rw the word rotation (word i to word i+1,
// left rotation of the half vector by B bits). C is the round constant; it
// is a full half-vector input so that a self-test can exercise every adder
// bit, while normal operation drives only word 0 (see sea_key_schedule).
module sea_key_round #(
  parameter int unsigned NB = 6,
  parameter int unsigned B  = 8
) (
  input  logic [NB*B-1:0] kl_in,
  input  logic [NB*B-1:0] kr_in,
  input  logic [NB*B-1:0] c_in,
  output logic [NB*B-1:0] kl_out,
  output logic [NB*B-1:0] kr_out
);

  localparam int unsigned W = NB * B;

  logic [W-1:0] f;

  sea_f #(.NB(NB), .B(B)) u_f (.x(kr_in), .k(c_in), .y(f));

  assign kl_out = kr_in;
  assign kr_out = kl_in ^ {f[W-B-1:0], f[W-1:W-B]};

endmodule
