// msic_ctrl: clock and control circuit of the MSIC test pattern generator.
// It issues the CLK1 ticks for the seed LFSR and the CLK2 ticks, RJ_Mode
// and Init for the reconfigurable Johnson counter (all as one-cycle enables
// on the system clock) while `run` is high.
//
// Test-per-clock (scan_scheme = SCHEME_PER_CLOCK): every clock is a test
// vector (vec_valid) and a Johnson step; after 2L vectors the seed also
// steps, so each seed is combined with all 2L Johnson states.
//
// Test-per-scan (scan_scheme = SCHEME_PER_SCAN), for each seed:
//   SEED  one CLK1 tick (new seed)
//   JOHN  one CLK2 tick with RJ_Mode = 0 (next Johnson vector)
//   SHIFT L CLK2 ticks with RJ_Mode = Init = 1 (circular shift, `shift`
//         high: the L codewords are shifted into the scan chains)
//   CAPT  one capture clock (`capture` and vec_valid high)
//   JOHN..CAPT repeat until 2L Johnson vectors are done, then SEED again.
//
// Both sequences follow the original test procedures step by step; a single
// clock with enables in place of two clocks is this design's choice.
// Init is held at 1 in both schemes: neither procedure uses the counter's
// clear setting. Dropping `run` freezes the sequence; rst_n (synchronous, active low)
// restarts it. The scheme input should only change while stopped.
module msic_ctrl
  import crypto_bist_pkg::*;
#(
  parameter int unsigned L = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  tpg_scheme_e scan_scheme,
  output logic        clk1_en,
  output logic        clk2_en,
  output logic        rj_mode,
  output logic        init,
  output logic        shift,
  output logic        capture,
  output logic        vec_valid
);

  localparam int unsigned CW = $clog2(2 * L);

  typedef enum logic [1:0] {S_SEED, S_JOHN, S_SHIFT, S_CAPT} state_e;

  state_e        state_q;
  logic [CW-1:0] vec_cnt_q;    // Johnson vectors done with this seed
  logic [CW-1:0] shift_cnt_q;  // shift clocks done in this vector

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_SEED;
      vec_cnt_q   <= '0;
      shift_cnt_q <= '0;
    end else if (run) begin
      if (scan_scheme == SCHEME_PER_CLOCK) begin
        vec_cnt_q <= (vec_cnt_q == CW'(2 * L - 1)) ? '0 : vec_cnt_q + CW'(1);
      end else begin
        unique case (state_q)
          S_SEED:  state_q <= S_JOHN;
          S_JOHN: begin
            state_q     <= S_SHIFT;
            shift_cnt_q <= '0;
          end
          S_SHIFT: begin
            shift_cnt_q <= shift_cnt_q + CW'(1);
            if (shift_cnt_q == CW'(L - 1)) state_q <= S_CAPT;
          end
          S_CAPT: begin
            if (vec_cnt_q == CW'(2 * L - 1)) begin
              vec_cnt_q <= '0;
              state_q   <= S_SEED;
            end else begin
              vec_cnt_q <= vec_cnt_q + CW'(1);
              state_q   <= S_JOHN;
            end
          end
          default: state_q <= S_SEED;
        endcase
      end
    end
  end

  always_comb begin
    clk1_en   = 1'b0;
    clk2_en   = 1'b0;
    rj_mode   = 1'b0;
    init      = 1'b1;
    shift     = 1'b0;
    capture   = 1'b0;
    vec_valid = 1'b0;
    if (run) begin
      if (scan_scheme == SCHEME_PER_CLOCK) begin
        clk2_en   = 1'b1;
        vec_valid = 1'b1;
        clk1_en   = (vec_cnt_q == CW'(2 * L - 1));
      end else begin
        unique case (state_q)
          S_SEED:  clk1_en = 1'b1;
          S_JOHN:  clk2_en = 1'b1;
          S_SHIFT: begin
            clk2_en = 1'b1;
            rj_mode = 1'b1;
            shift   = 1'b1;
          end
          S_CAPT: begin
            capture   = 1'b1;
            vec_valid = 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
