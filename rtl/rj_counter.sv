// rj_counter: reconfigurable L-stage Johnson counter of the MSIC test
// pattern generator. It steps once per CLK2 tick (clk2_en):
//   rj_mode = 0           Johnson counter: j <= {j[L-2:0], ~j[L-1]},
//                         2L distinct states, one bit changes per step
//   rj_mode = 1, init = 1 circular shift register: j <= {j[L-2:0], j[L-1]},
//                         the current Johnson vector rotates through L
//                         codewords and is back after L steps
//   rj_mode = 1, init = 0 clear to all zeros (this design's choice)
// J_1..J_L are j[0]..j[L-1]. Reset (synchronous, active low) clears it.
module rj_counter #(
  parameter int unsigned L = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clk2_en,
  input  logic         rj_mode,
  input  logic         init,
  output logic [L-1:0] j
);

  always_ff @(posedge clk) begin
    if (!rst_n)            j <= '0;
    else if (clk2_en) begin
      if (!rj_mode)        j <= {j[L-2:0], ~j[L-1]};
      else if (init)       j <= {j[L-2:0], j[L-1]};
      else                 j <= '0;
    end
  end

endmodule
