// sic_reseed_tpg: low-power SIC reseeding test pattern generator for scan
// BIST. Every test clock it produces an N-bit pattern SG = XF ^ GC:
//   * GC is the Gray code of a free-running N-bit counter (the single input
//     change generator, SICG), so it changes in one bit per clock;
//   * XF is a pre-selected seed cube whose don't-care bits are X-filled
//     (zero fill, one fill or bits of a bit-swapping LFSR);
//   * the NOR of the low M count bits forms the seed clock TCK/2^M, and on
//     each of its rising edges the next cube (and the next LFSR state) is
//     taken.
// Within one seed the 2^M patterns therefore form a single input change
// sequence, i.e. only one scan input toggles from one pattern to the next,
// while reseeding with cubes chosen for the circuit under test brings the
// fault coverage that a pure low-transition sequence lacks.
//
// Interface and timing: one clock, `tck`, and an asynchronous active-low
// reset. While `run` is high the counter steps on every TCK edge; the seed
// steps on the edge at which C[M-1:0] returns to zero. After reset C = 0,
// cube 0 is in use, and the first pattern is cube 0 filled, XOR 0. Seed
// cubes are written through `cube_we`/`cube_waddr`/`cube_wcare`/`cube_wval`
// and the LFSR state through `lfsr_load`/`lfsr_load_val`, both normally
// before `run` is raised. `sg`, `gc`, `xf`, `c`, `lfsr_state`, `seed_clk`
// and `seed_idx` are combinational from registers. Only the low M bits of
// the counter look-ahead `c_next` are used here (a lint tool reports the
// rest as unused); the SICG brings out all N for other users.
//
// The structure (counter, Gray encoder, NOR seed clock, seed generator, XOR
// array) is the method's. The clock enable in place of a gated seed clock,
// the seed store and its write port, the LFSR fill mode, `run` and the
// widths (N = 50, M = 4, 16 cubes) are this design's own choices.
module sic_reseed_tpg
  import sic_pkg::*;
#(
  parameter int unsigned N          = DEFAULT_N,
  parameter int unsigned M          = DEFAULT_M,
  parameter int unsigned SEED_DEPTH = DEFAULT_SEED_DEPTH,
  localparam int unsigned AW        = (SEED_DEPTH > 1) ? $clog2(SEED_DEPTH) : 1
) (
  input  logic          tck,
  input  logic          rst_n,
  input  logic          run,
  input  fill_mode_e    fill_mode,
  input  logic [AW:0]   num_seeds,
  input  logic          cube_we,
  input  logic [AW-1:0] cube_waddr,
  input  logic [N-1:0]  cube_wcare,
  input  logic [N-1:0]  cube_wval,
  input  logic          lfsr_load,
  input  logic [N-1:0]  lfsr_load_val,
  output logic [N-1:0]  sg,
  output logic [N-1:0]  gc,
  output logic [N-1:0]  xf,
  output logic [N-1:0]  c,
  output logic [N-1:0]  lfsr_state,
  output logic          seed_clk,
  output logic [AW-1:0] seed_idx
);

  logic [N-1:0] c_next;
  logic [N-1:0] bf;
  logic         seed_adv;

  if (M < 1 || M > N) begin : g_bad_m
    $error("sic_reseed_tpg: M must satisfy 1 <= M <= N");
  end

  sicg #(.N(N)) u_sicg (
    .tck   (tck),
    .rst_n (rst_n),
    .en    (run),
    .c     (c),
    .c_next(c_next),
    .gc    (gc)
  );

  seed_clk_ctrl #(.M(M)) u_nor (
    .c_lo     (c[M-1:0]),
    .c_next_lo(c_next[M-1:0]),
    .cnt_en  (run),
    .seed_clk(seed_clk),
    .seed_adv(seed_adv)
  );

  bf_lfsr #(.N(N)) u_bf (
    .tck     (tck),
    .rst_n   (rst_n),
    .adv     (seed_adv),
    .load    (lfsr_load),
    .load_val(lfsr_load_val),
    .state   (lfsr_state),
    .bf      (bf)
  );

  xfill_seed_gen #(.N(N), .SEED_DEPTH(SEED_DEPTH)) u_xfill (
    .tck      (tck),
    .rst_n    (rst_n),
    .adv      (seed_adv),
    .num_seeds(num_seeds),
    .fill_mode(fill_mode),
    .fill_src (bf),
    .we       (cube_we),
    .waddr    (cube_waddr),
    .wcare    (cube_wcare),
    .wval     (cube_wval),
    .idx      (seed_idx),
    .xf       (xf)
  );

  xor_array #(.N(N)) u_xor (
    .xf(xf),
    .gc(gc),
    .sg(sg)
  );

  // Within one seed, consecutive patterns differ in exactly one bit, as
  // long as nothing rewrites the seed store, the LFSR or the fill rule.
  // The check is disabled during reset by sampling rst_n on the clock; lint
  // tools therefore report rst_n as used both asynchronously (the flops) and
  // synchronously (this assertion only), which is intended.
  a_single_input_change: assert property (
    @(posedge tck) disable iff (!rst_n)
      ($past(run) && !$past(seed_adv) && !$past(cube_we) && !$past(lfsr_load)
       && $stable(fill_mode))
      |-> ($countones(sg ^ $past(sg)) == 1)
  );

endmodule
