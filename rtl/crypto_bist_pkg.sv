// crypto_bist_pkg: types and default sizes shared by the SEA crypto core and
// its built-in self-test (BIST) logic.
//
// The defaults describe SEA_96,8 (96-bit block and key, 8-bit words, 93
// rounds) and a multiple-single-input-change (MSIC) pattern generator with a
// 12-bit seed and an 11-stage Johnson counter, whose 12*11 XOR outputs plus
// the 12 seed bits (144 bits) exactly cover the three 48-bit inputs of one
// SEA round. These numbers are this design's choice: the cipher is
// scalable and the generator is sized to the round it feeds.
package crypto_bist_pkg;

  // SEA_96,8
  localparam int unsigned SEA_N  = 96;  // block and key size
  localparam int unsigned SEA_B  = 8;   // word size
  localparam int unsigned SEA_NR = 93;  // rounds (odd, see sea_key_schedule)

  // MSIC generator: M seed bits x L Johnson stages, M*(L+1) output bits
  localparam int unsigned TPG_M = 12;
  localparam int unsigned TPG_L = 11;

  // How the generator applies its vectors.
  typedef enum logic {
    SCHEME_PER_CLOCK = 1'b0,  // a new vector every clock into combinational logic
    SCHEME_PER_SCAN  = 1'b1   // l shift clocks then one capture per vector
  } tpg_scheme_e;

  // Top-level mode selection.
  typedef enum logic {
    MODE_NORMAL   = 1'b0,
    MODE_SELFTEST = 1'b1
  } bist_mode_e;

endpackage
