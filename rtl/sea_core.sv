// sea_core: iterative SEA_n,b block cipher (n = N bits, b = B-bit words)
// with self-test access to its round logic.
//
// One round per clock: a pulse on `start` while idle loads data_in and
// key_in and latches `decrypt`; the next NR clocks compute rounds 1..NR in
// sea_datapath and sea_key_schedule, and `done` pulses for one clock with
// data_out valid (NR clocks after the edge that took `start`). data_out
// keeps its value until the next start. Encryption and decryption take the
// same time and use the same key schedule.
//
// Self-test: while test_en is high the core ignores start and does not
// advance; test_vec = {K/C, R/KR, L/KL} (three N/2-bit fields) drives both
// round functions directly, with test_dec choosing the round direction, and
// test_resp is the XOR of the data round output and the key round output,
// one response per clock.
//
// rst_n is synchronous and active low. The round-per-clock loop, the
// start/busy/done handshake and the test access are this design's choices;
// the rounds and key schedule follow SEA.
module sea_core #(
  parameter int unsigned N  = 96,
  parameter int unsigned B  = 8,
  parameter int unsigned NR = 93,
  localparam int unsigned NB = N / (2 * B),
  localparam int unsigned RW = $clog2(NR + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           decrypt,
  input  logic [N-1:0]   data_in,
  input  logic [N-1:0]   key_in,
  output logic [N-1:0]   data_out,
  output logic           busy,
  output logic           done,
  input  logic           test_en,
  input  logic           test_dec,
  input  logic [3*N/2-1:0] test_vec,
  output logic [N-1:0]   test_resp
);

  localparam int unsigned W = N / 2;

  logic          load, step, dec_q;
  logic [RW-1:0] round_q;
  logic [W-1:0]  rkey;
  logic [N-1:0]  dp_resp, ks_resp;

  assign load = start && !busy && !test_en;
  assign step = busy && !test_en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      dec_q   <= 1'b0;
      round_q <= RW'(1);
    end else begin
      done <= 1'b0;
      if (load) begin
        busy    <= 1'b1;
        dec_q   <= decrypt;
        round_q <= RW'(1);
      end else if (step) begin
        if (round_q == RW'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        round_q <= round_q + RW'(1);
      end
    end
  end

  sea_datapath #(.NB(NB), .B(B)) u_dp (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .step     (step),
    .dec      (test_en ? test_dec : dec_q),
    .data_in  (data_in),
    .rkey     (rkey),
    .test_en  (test_en),
    .test_l   (test_vec[W-1:0]),
    .test_r   (test_vec[2*W-1:W]),
    .test_k   (test_vec[3*W-1:2*W]),
    .round_out(dp_resp),
    .data_out (data_out)
  );

  sea_key_schedule #(.NB(NB), .B(B), .NR(NR)) u_ks (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (load),
    .step     (step),
    .round_idx(round_q),
    .key_in   (key_in),
    .test_en  (test_en),
    .test_kl  (test_vec[W-1:0]),
    .test_kr  (test_vec[2*W-1:W]),
    .test_c   (test_vec[3*W-1:2*W]),
    .rkey     (rkey),
    .round_out(ks_resp)
  );

  assign test_resp = dp_resp ^ ks_resp;

  // NR must be odd for the key schedule's switch to line up
  initial assert (NR % 2 == 1) else $error("sea_core: NR must be odd");

endmodule
