// tb_switching_activity: compares the switching activity of three pattern
// sources of the default width (N = 50) over the same number of patterns:
//   * a conventional LFSR stepping once per pattern (the state of bf_lfsr),
//   * the bit-swapping LFSR output of the same register,
//   * the SIC reseeding generator (LFSR fill, 16 random cubes, M = 4).
// Activity is counted as bit transitions between consecutive patterns, and
// the transition density is TD = transitions / (patterns x N). The test
// requires the ordering LFSR > bit-swapping LFSR > SIC generator, the SIC
// generator switching far less than the conventional LFSR
// (about 1 bit per pattern inside a seed, against about N/2) and its TD to
// stay below 1/M of the LFSR's, and prints all three figures.
module tb_switching_activity;
  import sic_pkg::*;
  localparam int unsigned N = DEFAULT_N;
  localparam int unsigned M = DEFAULT_M;
  localparam int unsigned AW = $clog2(DEFAULT_SEED_DEPTH);
  localparam int PATTERNS = 4096;

  logic tck = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic cube_we = 1'b0, lfsr_load = 1'b0;
  logic [AW-1:0] cube_waddr = '0;
  logic [N-1:0] cube_wcare = '0, cube_wval = '0, lfsr_load_val = '0;
  logic [N-1:0] sg, gc, xf, c, ref_state, ref_bf;
  logic seed_clk;
  logic [AW-1:0] seed_idx;

  sic_reseed_tpg dut (
    .tck, .rst_n, .run, .fill_mode(FILL_LFSR), .num_seeds((AW+1)'(DEFAULT_SEED_DEPTH)),
    .cube_we, .cube_waddr, .cube_wcare, .cube_wval, .lfsr_load, .lfsr_load_val,
    .sg, .gc, .xf, .c, .lfsr_state(), .seed_clk, .seed_idx);

  // Conventional LFSR and its bit-swapped output, one step per pattern.
  bf_lfsr ref_lfsr (
    .tck, .rst_n, .adv(run), .load(lfsr_load), .load_val(lfsr_load_val),
    .state(ref_state), .bf(ref_bf));

  always #5 tck = ~tck;

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_lfsr, t_bf, t_sic;
    logic [N-1:0] p_lfsr, p_bf, p_sic;
    real td_lfsr, td_bf, td_sic;
    t_lfsr = 0; t_bf = 0; t_sic = 0;
    repeat (2) @(negedge tck);
    rst_n = 1'b1;
    for (int k = 0; k < DEFAULT_SEED_DEPTH; k++) begin
      cube_we = 1'b1; cube_waddr = AW'(k);
      cube_wcare = N'({$urandom, $urandom}); cube_wval = N'({$urandom, $urandom});
      @(negedge tck);
    end
    cube_we = 1'b0;
    lfsr_load_val = N'({$urandom, $urandom}) | N'(1);
    lfsr_load = 1'b1;
    @(negedge tck);
    lfsr_load = 1'b0;
    p_lfsr = ref_state; p_bf = ref_bf; p_sic = sg;
    run = 1'b1;
    for (int p = 1; p < PATTERNS; p++) begin
      @(negedge tck);
      t_lfsr += $countones(ref_state ^ p_lfsr);
      t_bf   += $countones(ref_bf ^ p_bf);
      t_sic  += $countones(sg ^ p_sic);
      p_lfsr = ref_state; p_bf = ref_bf; p_sic = sg;
    end
    run = 1'b0;
    td_lfsr = real'(t_lfsr) / (real'(PATTERNS) * N);
    td_bf   = real'(t_bf)   / (real'(PATTERNS) * N);
    td_sic  = real'(t_sic)  / (real'(PATTERNS) * N);
    $display("transitions over %0d patterns: LFSR %0d, bit-swapping LFSR %0d, SIC reseeding %0d",
             PATTERNS, t_lfsr, t_bf, t_sic);
    $display("transition density: LFSR %0.4f, bit-swapping LFSR %0.4f, SIC reseeding %0.4f",
             td_lfsr, td_bf, td_sic);
    checks++;
    if (!(t_sic < t_lfsr)) begin
      failures++;
      $display("FAIL: SIC generator does not switch less than the LFSR");
    end
    checks++;
    if (!(t_bf < t_lfsr)) begin
      failures++;
      $display("FAIL: bit-swapping LFSR does not switch less than the LFSR");
    end
    checks++;
    if (!(td_sic * M < td_lfsr)) begin
      failures++;
      $display("FAIL: SIC transition density not below 1/M of the LFSR's");
    end
    checks++;
    if (c != N'(PATTERNS - 1)) begin
      failures++;
      $display("FAIL: pattern count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
