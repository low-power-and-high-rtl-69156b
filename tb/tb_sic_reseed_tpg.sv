// tb_sic_reseed_tpg: end-to-end self-checking test of the SIC reseeding
// test pattern generator with every parameter at its default (N = 50,
// M = 4, 16 seed cubes). A reference model kept in this file (binary
// counter, Gray code, 50-bit LFSR with x^50+x^49+x^24+x^23+1, neighbour
// swap, X-fill) predicts C, GC, XF, SG, the seed index and the seed clock
// on every test clock, and the outputs are compared with it.
//
// The run writes 16 random test cubes, loads the LFSR, then generates
// patterns through all three fill rules, two settings of the number of
// cubes and pauses of `run`. It counts how often each mechanism happened:
// reseeding, the wrap of the cube index, the LFSR swap taken and not taken,
// each fill rule, pauses, and pattern steps that changed exactly one bit
// inside one seed. Any mechanism that never happened counts as a failure.
// It also reports the transitions per pattern, which for a single input
// change generator is 1 within a seed.
module tb_sic_reseed_tpg;
  import sic_pkg::*;
  localparam int unsigned N = DEFAULT_N;
  localparam int unsigned M = DEFAULT_M;
  localparam int unsigned D = DEFAULT_SEED_DEPTH;
  localparam int unsigned AW = $clog2(D);

  logic tck = 1'b0, rst_n = 1'b0, run = 1'b0;
  fill_mode_e fill_mode = FILL_LFSR;
  logic [AW:0] num_seeds = (AW+1)'(D);
  logic cube_we = 1'b0, lfsr_load = 1'b0;
  logic [AW-1:0] cube_waddr = '0;
  logic [N-1:0] cube_wcare = '0, cube_wval = '0, lfsr_load_val = '0;
  logic [N-1:0] sg, gc, xf, c, lfsr_state;
  logic seed_clk;
  logic [AW-1:0] seed_idx;

  sic_reseed_tpg dut (
    .tck, .rst_n, .run, .fill_mode, .num_seeds, .cube_we, .cube_waddr,
    .cube_wcare, .cube_wval, .lfsr_load, .lfsr_load_val, .sg, .gc, .xf, .c,
    .lfsr_state, .seed_clk, .seed_idx);

  always #5 tck = ~tck;

  int checks = 0, failures = 0;
  // Rising edges of the NOR output: with a gated seed clock these would be
  // the seed generator's clock edges, so there must be one per reseed.
  int n_seed_clk_edges = 0;
  always @(posedge seed_clk) if (rst_n) n_seed_clk_edges++;
  int n_reseed = 0, n_wrap = 0, n_swap = 0, n_noswap = 0, n_hold = 0;
  int n_sic = 0, n_fill[3] = '{0, 0, 0};
  longint transitions = 0, steps_in_seed = 0;

  // Reference state.
  logic [N-1:0] m_c, m_lfsr;
  int m_idx;
  logic [N-1:0] care [D], val [D];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s c=%h sg=%h xf=%h idx=%0d", $time, what, c, sg, xf, seed_idx);
    end
  endtask

  function automatic logic [N-1:0] m_gray(input logic [N-1:0] v);
    logic [N-1:0] g;
    for (int i = 0; i < N; i++) g[i] = (i == N - 1) ? v[i] : v[i] ^ v[i+1];
    return g;
  endfunction

  function automatic logic [N-1:0] m_swap(input logic [N-1:0] s);
    logic [N-1:0] r;
    r = s;
    if (!s[N-1])
      for (int j = 0; j + 1 < N - 1; j += 2) begin
        r[j] = s[j+1];
        r[j+1] = s[j];
      end
    return r;
  endfunction

  function automatic logic [N-1:0] m_xf();
    logic [N-1:0] f, r;
    case (fill_mode)
      FILL_ZERO: f = '0;
      FILL_ONE:  f = '1;
      default:   f = m_swap(m_lfsr);
    endcase
    for (int b = 0; b < N; b++) r[b] = care[m_idx][b] ? val[m_idx][b] : f[b];
    return r;
  endfunction

  task automatic compare();
    logic [N-1:0] exf;
    exf = m_xf();
    check(c == m_c, "counter");
    check(gc == m_gray(m_c), "gray code");
    check(seed_idx == AW'(m_idx), "seed index");
    check(seed_clk == (m_c[M-1:0] == 0), "seed clock");
    check(xf == exf, "X-filled seed");
    check(sg == (exf ^ m_gray(m_c)), "pattern SG");
    check(lfsr_state == m_lfsr, "LFSR state");
  endtask

  // One test clock with `run` set as given; the model steps alongside.
  task automatic tick(input logic r);
    logic [N-1:0] prev_sg;
    logic reseed;
    logic [N-1:0] c1;
    prev_sg = sg;
    run = r;
    c1 = m_c + 1'b1;
    reseed = r && (c1[M-1:0] == 0);
    @(posedge tck);
    if (r) begin
      m_c = c1;
      if (reseed) begin
        n_reseed++;
        if (fill_mode == FILL_LFSR) begin
          if (m_lfsr[N-1]) n_noswap++; else n_swap++;
        end
        m_lfsr = {m_lfsr[N-2:0], m_lfsr[49] ^ m_lfsr[48] ^ m_lfsr[23] ^ m_lfsr[22]};
        m_idx = m_idx + 1;
        if (m_idx >= int'(num_seeds)) begin
          m_idx = 0;
          n_wrap++;
        end
      end
    end else n_hold++;
    @(negedge tck);
    compare();
    if (r) begin
      n_fill[int'(fill_mode)]++;
      if (!reseed) begin
        transitions += $countones(sg ^ prev_sg);
        steps_in_seed++;
        if ($countones(sg ^ prev_sg) == 1) n_sic++;
        else check(1'b0, "single input change inside a seed");
      end
    end else check(sg == prev_sg, "pattern held while run is low");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge tck);
    rst_n = 1'b1;
    m_c = '0; m_lfsr = N'(1); m_idx = 0;
    // Pre-selected cubes: random care masks and values; cube 0 fully
    // specified, cube 1 fully unspecified.
    for (int k = 0; k < D; k++) begin
      care[k] = N'({$urandom, $urandom});
      val[k] = N'({$urandom, $urandom}) & care[k];
    end
    care[0] = '1;
    care[1] = '0; val[1] = '0;
    for (int k = 0; k < D; k++) begin
      cube_we = 1'b1; cube_waddr = AW'(k); cube_wcare = care[k]; cube_wval = val[k];
      @(negedge tck);
    end
    cube_we = 1'b0;
    lfsr_load_val = N'({$urandom, $urandom}) | N'(1);
    lfsr_load = 1'b1;
    @(negedge tck);
    lfsr_load = 1'b0;
    m_lfsr = lfsr_load_val;
    compare();
    check(c == 0 && seed_idx == 0, "start state");

    // Two full rounds of the 16 cubes with LFSR fill (2 x 16 x 16 patterns).
    fill_mode = FILL_LFSR;
    repeat (2 * D * (1 << M)) tick(1'b1);
    // Pause, then zero fill and one fill, switching mid-seed as well.
    repeat (5) tick(1'b0);
    fill_mode = FILL_ZERO;
    #1 compare();
    repeat (3 * (1 << M) + 5) tick(1'b1);
    fill_mode = FILL_ONE;
    #1 compare();
    repeat (3 * (1 << M)) tick(1'b1);
    // Fewer cubes in use, random pauses.
    num_seeds = (AW+1)'(5);
    fill_mode = FILL_LFSR;
    #1 compare();
    repeat (12 * (1 << M)) tick(1'($urandom_range(0, 7) != 0));

    check(n_reseed > 0, "reseeding happened");
    check(n_seed_clk_edges == n_reseed, "one seed clock edge per reseed");
    check(n_wrap > 0, "cube index wrapped");
    check(n_swap > 0, "LFSR swap taken");
    check(n_noswap > 0, "LFSR swap not taken");
    check(n_hold > 0, "run paused");
    check(n_sic > 0, "single input change steps");
    for (int i = 0; i < 3; i++) check(n_fill[i] > 0, "every fill rule used");
    $display("seed clock edges=%0d", n_seed_clk_edges);
    $display("reseeds=%0d wraps=%0d swap=%0d noswap=%0d holds=%0d sic_steps=%0d fill0=%0d fill1=%0d fillL=%0d",
             n_reseed, n_wrap, n_swap, n_noswap, n_hold, n_sic, n_fill[0], n_fill[1], n_fill[2]);
    $display("transitions per pattern inside a seed: %0d / %0d", transitions, steps_in_seed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
