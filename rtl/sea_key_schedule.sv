// sea_key_schedule: key schedule of an iterative SEA core.
//
// The key is split as K = KL0 & KR0 (KL0 in the upper half). While `step`
// is high it performs one FK round per clock, where round_idx = i (1..NR)
// is the data round being computed in the same clock:
//   i <= H      : (KL,KR) <- FK(KL,KR,C(i)), and after i = H the halves
//                 are exchanged ("switch")                      H = floor(NR/2)
//   H < i < NR  : (KL,KR) <- FK(KL,KR,C(NR-i))
//   i = NR      : the halves are exchanged once more
// Because FK is a Feistel round, running it back with the constants in
// reverse order after the switch retraces the schedule: the registers end
// where they started (the master key, ready for the next block), and the
// round keys form a palindrome, so decryption uses the very same schedule.
// The round key for round i is KR for i <= ceil(NR/2) and KL afterwards.
// NR must be odd for the two loops to meet.
//
// The schedule and its switch follow the original pseudocode. C(i), which
// it does not define, has the value i in word 0 and zeros elsewhere, as in
// the SEA specification.
//
// Self-test access: with test_en high the FK logic is fed from
// test_kl/test_kr/test_c and its output appears on round_out; the registers
// hold. rst_n is a synchronous active-low clear; load has priority.
module sea_key_schedule #(
  parameter int unsigned NB = 6,
  parameter int unsigned B  = 8,
  parameter int unsigned NR = 93,
  localparam int unsigned RW = $clog2(NR + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              step,
  input  logic [RW-1:0]     round_idx,
  input  logic [2*NB*B-1:0] key_in,
  input  logic              test_en,
  input  logic [NB*B-1:0]   test_kl,
  input  logic [NB*B-1:0]   test_kr,
  input  logic [NB*B-1:0]   test_c,
  output logic [NB*B-1:0]   rkey,
  output logic [2*NB*B-1:0] round_out
);

  localparam int unsigned W = NB * B;
  localparam int unsigned H = NR / 2;

  logic [W-1:0] kl_q, kr_q;
  logic [W-1:0] kl_in, kr_in, c_in, kl_nx, kr_nx, c_round;
  logic [RW-1:0] c_idx;

  // round constant index: i on the way up, NR-i on the way back
  always_comb begin
    if (round_idx <= RW'(H)) c_idx = round_idx;
    else                     c_idx = RW'(NR) - round_idx;
    c_round = '0;
    c_round[B-1:0] = B'(c_idx);
  end

  assign kl_in = test_en ? test_kl : kl_q;
  assign kr_in = test_en ? test_kr : kr_q;
  assign c_in  = test_en ? test_c  : c_round;

  sea_key_round #(.NB(NB), .B(B)) u_fk (
    .kl_in (kl_in),
    .kr_in (kr_in),
    .c_in  (c_in),
    .kl_out(kl_nx),
    .kr_out(kr_nx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kl_q <= '0;
      kr_q <= '0;
    end else if (load) begin
      kl_q <= key_in[2*W-1:W];
      kr_q <= key_in[W-1:0];
    end else if (step && !test_en) begin
      if (round_idx == RW'(H)) begin          // FK then switch
        kl_q <= kr_nx;
        kr_q <= kl_nx;
      end else if (round_idx == RW'(NR)) begin  // final switch
        kl_q <= kr_q;
        kr_q <= kl_q;
      end else begin
        kl_q <= kl_nx;
        kr_q <= kr_nx;
      end
    end
  end

  assign rkey      = (round_idx <= RW'(H + 1)) ? kr_q : kl_q;
  assign round_out = {kl_nx, kr_nx};

endmodule
