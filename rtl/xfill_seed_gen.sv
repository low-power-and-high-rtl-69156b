// xfill_seed_gen: the X-filling seed generator. It stores pre-selected seed
// cubes, each an N-bit value plus an N-bit care mask (1 = the bit is
// specified, 0 = don't care), and presents the current cube with its
// don't-care bits filled as the seed XF. The fill rule is chosen by
// `fill_mode`: zero fill, one fill, or fill from an external bit source (the
// bit-swapping LFSR in the full generator). Specified bits always keep their
// value.
//
// Timing: cubes are written through the `we`/`waddr`/`wcare`/`wval` port on
// a TCK edge, normally before the test. The cube index starts at 0 after
// reset and moves to the next cube on every TCK edge with `adv` high,
// wrapping to 0 after `num_seeds` cubes (0 is treated as 1). XF is
// combinational from the index, the stored cube, `fill_mode` and `fill_src`.
//
// From the method: pre-selected seeds whose don't-care bits are filled, and
// the zero/one fill rules. Own choices: the register-array store and its
// depth (SEED_DEPTH, default 16), the order in which cubes are used, the
// LFSR fill rule and the write port.
module xfill_seed_gen
  import sic_pkg::*;
#(
  parameter int unsigned N          = DEFAULT_N,
  parameter int unsigned SEED_DEPTH = DEFAULT_SEED_DEPTH,
  localparam int unsigned AW        = (SEED_DEPTH > 1) ? $clog2(SEED_DEPTH) : 1
) (
  input  logic          tck,
  input  logic          rst_n,
  input  logic          adv,
  input  logic [AW:0]   num_seeds,
  input  fill_mode_e    fill_mode,
  input  logic [N-1:0]  fill_src,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [N-1:0]  wcare,
  input  logic [N-1:0]  wval,
  output logic [AW-1:0] idx,
  output logic [N-1:0]  xf
);

  logic [N-1:0] care_mem [SEED_DEPTH];
  logic [N-1:0] val_mem  [SEED_DEPTH];
  logic [N-1:0] fill;
  logic [AW:0]  idx_inc;

  always_ff @(posedge tck) begin
    if (we) begin
      care_mem[waddr] <= wcare;
      val_mem[waddr]  <= wval & wcare;
    end
  end

  always_comb idx_inc = {1'b0, idx} + 1'b1;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) idx <= '0;
    else if (adv) idx <= (idx_inc >= num_seeds) ? '0 : idx_inc[AW-1:0];
  end

  always_comb begin
    unique case (fill_mode)
      FILL_ZERO: fill = '0;
      FILL_ONE:  fill = '1;
      FILL_LFSR: fill = fill_src;
      default:   fill = '0;
    endcase
    xf = val_mem[idx] | (fill & ~care_mem[idx]);
  end

endmodule
