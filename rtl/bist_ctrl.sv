// bist_ctrl: built-in self-test controller of the crypto core.
//
// A pulse on test_start runs one self-test:
//   CLEAR  the pattern generator is held at its start state and the MISR
//          is cleared (one clock)
//   ENC    PATTERNS test vectors are applied to the core's round logic with
//          the encryption round selected; each response is compacted
//   DEC    PATTERNS further vectors with the decryption round selected
//   CHECK  the signature is compared with the fault-free one (sig_ok)
//   DONE   test_done stays high and test_pass holds the verdict until the
//          next test_start
// A vector counts when the generator flags it with vec_valid, so the same
// controller works for the test-per-clock and the test-per-scan schemes.
// While no test runs, test_en is low and the core works normally.
// rst_n is synchronous and active low. The controller's place between mode
// selection and the cipher follows the original block diagram; the
// two-pass sequence, the pattern count and the signature check are this
// design's choices.
module bist_ctrl #(
  parameter int unsigned PATTERNS = 1408
) (
  input  logic clk,
  input  logic rst_n,
  input  logic test_start,
  input  logic vec_valid,
  input  logic sig_ok,
  output logic tpg_rst_n,
  output logic tpg_run,
  output logic test_en,
  output logic test_dec,
  output logic misr_clear,
  output logic misr_en,
  output logic test_busy,
  output logic test_done,
  output logic test_pass
);

  localparam int unsigned CW = $clog2(PATTERNS + 1);

  typedef enum logic [2:0] {B_IDLE, B_CLEAR, B_ENC, B_DEC, B_CHECK, B_DONE} state_e;

  state_e        state_q;
  logic [CW-1:0] cnt_q;
  logic          last;

  assign last = vec_valid && (cnt_q == CW'(PATTERNS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q   <= B_IDLE;
      cnt_q     <= '0;
      test_pass <= 1'b0;
    end else begin
      unique case (state_q)
        B_IDLE, B_DONE: if (test_start) begin
          state_q   <= B_CLEAR;
          test_pass <= 1'b0;
        end
        B_CLEAR: begin
          state_q <= B_ENC;
          cnt_q   <= '0;
        end
        B_ENC, B_DEC: begin
          if (vec_valid) cnt_q <= last ? '0 : cnt_q + CW'(1);
          if (last) state_q <= (state_q == B_ENC) ? B_DEC : B_CHECK;
        end
        B_CHECK: begin
          test_pass <= sig_ok;
          state_q   <= B_DONE;
        end
        default: state_q <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    tpg_rst_n  = !(state_q == B_CLEAR);
    misr_clear = (state_q == B_CLEAR);
    tpg_run    = (state_q == B_ENC) || (state_q == B_DEC);
    test_en    = tpg_run;
    test_dec   = (state_q == B_DEC);
    misr_en    = tpg_run && vec_valid;
    test_busy  = (state_q != B_IDLE) && (state_q != B_DONE);
    test_done  = (state_q == B_DONE);
  end

endmodule
