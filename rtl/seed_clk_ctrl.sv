// seed_clk_ctrl: the NOR gate that clocks the seed generator. Its output
// `seed_clk` is the NOR of the low M count bits C[M-1:0]; it is high for one
// TCK period out of every 2^M, i.e. it is a TCK/2^M clock, and a new seed is
// due each time it rises.
//
// The method gates the seed generator's clock with this signal. Here the
// design keeps a single clock instead: `seed_adv` is a clock enable that is
// high in the TCK cycle whose closing edge makes C[M-1:0] all zeros, which
// is exactly the edge at which the NOR output rises. Registers that step on
// `seed_adv` therefore change on the same TCK edge a gated clock would have
// produced. Combinational. Inputs: `c_lo` = C[M-1:0], `c_next_lo` = the
// same bits after the coming edge, `cnt_en` = the counter steps this cycle.
module seed_clk_ctrl #(
  parameter int unsigned M = sic_pkg::DEFAULT_M
) (
  input  logic [M-1:0] c_lo,
  input  logic [M-1:0] c_next_lo,
  input  logic         cnt_en,
  output logic         seed_clk,
  output logic         seed_adv
);

  always_comb begin
    seed_clk = ~|c_lo;
    seed_adv = cnt_en & ~|c_next_lo;
  end

endmodule
