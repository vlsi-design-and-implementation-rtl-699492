// crypto_bist_top: SEA block cipher with a built-in self-test that reuses
// the cipher's own round logic as the circuit under test.
//
// Blocks: sea_core (iterative SEA_N,B, one round per clock, encryption and
// decryption), msic_tpg (multiple-single-input-change pattern generator),
// misr (signature register) and bist_ctrl (self-test sequencing).
//
// Mode selection (`mode`, sampled with `start`):
//   MODE_NORMAL    start loads data_in/key_in and the core encrypts
//                  (decrypt = 0) or decrypts (decrypt = 1); `done` pulses
//                  after NR clocks with data_out valid.
//   MODE_SELFTEST  start runs the self-test: the generator's M*(L+1)-bit
//                  vectors (M*(L+1) = 3N/2) drive the data round and the key
//                  round directly, the XOR of both round outputs goes into
//                  the MISR, first with the encryption round and then with
//                  the decryption round, PATTERNS vectors each. test_done
//                  then rises and test_pass tells whether the signature
//                  matched the fault-free one for the selected scheme
//                  (GOLDEN_CLOCK or GOLDEN_SCAN).
// `scan_scheme` selects how the generator applies vectors: test-per-clock
// (one per clock, the configuration this design is built for) or
// test-per-scan (L shift clocks and a capture per vector). Scan chains are
// not part of this design; tpg_vec, tpg_shift and tpg_capture bring the
// generator's scan-side signals out for them. The golden signatures are
// those of the fault-free design at the default parameters.
//
// All resets are synchronous and active low. A start in the other mode
// while one operation runs is ignored.
module crypto_bist_top
  import crypto_bist_pkg::*;
#(
  parameter int unsigned N        = SEA_N,
  parameter int unsigned B        = SEA_B,
  parameter int unsigned NR       = SEA_NR,
  parameter int unsigned M        = TPG_M,
  parameter int unsigned L        = TPG_L,
  parameter int unsigned PATTERNS = 1408,
  parameter logic [N-1:0] GOLDEN_CLOCK = 96'h67bdf22704c26bf3bee1b3f8,
  parameter logic [N-1:0] GOLDEN_SCAN  = 96'h185687893c0c847a6808a93e
) (
  input  logic           clk,
  input  logic           rst_n,
  input  bist_mode_e     mode,
  input  tpg_scheme_e    scan_scheme,
  input  logic           start,
  input  logic           decrypt,
  input  logic [N-1:0]   data_in,
  input  logic [N-1:0]   key_in,
  output logic [N-1:0]   data_out,
  output logic           busy,
  output logic           done,
  output logic           test_busy,
  output logic           test_done,
  output logic           test_pass,
  output logic [N-1:0]   signature,
  output logic [M*(L+1)-1:0] tpg_vec,
  output logic           tpg_shift,
  output logic           tpg_capture
);

  logic          core_start, test_start;
  logic          tpg_rst_n, tpg_run, vec_valid;
  logic          test_en, test_dec, misr_clear, misr_en, sig_ok;
  logic [N-1:0]  test_resp;

  assign core_start = start && (mode == MODE_NORMAL)   && !test_busy;
  assign test_start = start && (mode == MODE_SELFTEST) && !busy;

  sea_core #(.N(N), .B(B), .NR(NR)) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (core_start),
    .decrypt  (decrypt),
    .data_in  (data_in),
    .key_in   (key_in),
    .data_out (data_out),
    .busy     (busy),
    .done     (done),
    .test_en  (test_en),
    .test_dec (test_dec),
    .test_vec (tpg_vec),
    .test_resp(test_resp)
  );

  msic_tpg #(.M(M), .L(L)) u_tpg (
    .clk        (clk),
    .rst_n      (rst_n && tpg_rst_n),
    .run        (tpg_run),
    .scan_scheme(scan_scheme),
    .vec        (tpg_vec),
    .vec_valid  (vec_valid),
    .shift      (tpg_shift),
    .capture    (tpg_capture)
  );

  misr #(.W(N)) u_misr (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(misr_clear),
    .en   (misr_en),
    .d    (test_resp),
    .sig  (signature)
  );

  assign sig_ok = (signature == ((scan_scheme == SCHEME_PER_SCAN) ? GOLDEN_SCAN : GOLDEN_CLOCK));

  bist_ctrl #(.PATTERNS(PATTERNS)) u_bist (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_start(test_start),
    .vec_valid (vec_valid),
    .sig_ok    (sig_ok),
    .tpg_rst_n (tpg_rst_n),
    .tpg_run   (tpg_run),
    .test_en   (test_en),
    .test_dec  (test_dec),
    .misr_clear(misr_clear),
    .misr_en   (misr_en),
    .test_busy (test_busy),
    .test_done (test_done),
    .test_pass (test_pass)
  );

  initial assert (M * (L + 1) == 3 * N / 2)
    else $error("crypto_bist_top: M*(L+1) must equal 3N/2");

endmodule
