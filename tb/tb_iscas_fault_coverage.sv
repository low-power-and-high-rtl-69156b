// tb_iscas_fault_coverage: workload test of the generator at its default
// parameters on two small ISCAS benchmark circuits, with single stuck-at
// fault simulation written in this file.
//   * c17 (ISCAS'85): six 2-input NANDs, inputs N1 N2 N3 N6 N7 driven by
//     SG[4:0], outputs N22 N23. 17 fault sites (11 nets and 6 fanout
//     branches), 34 faults.
//   * s27 (ISCAS'89) in full-scan form: primary inputs G0..G3 and the scan
//     cells G5 G6 G7 driven by SG[6:0]; observed are the output G17 and the
//     next-state nets G10 G11 G13 captured by the scan cells. 26 fault sites
//     (17 nets and 9 fanout branches), 52 faults.
// For every pattern the fault-free response is compared with the response
// of each undetected fault; a fault is detected at the first pattern that
// differs. The generator runs with LFSR fill for one round of 16 cubes
// (256 patterns). The first 8 cubes are chosen for these circuits: inside a
// seed the low M pattern bits run through all their values, and the cubes
// set the bits above so that the first 128 patterns apply every value of the
// seven inputs. Both circuits have no redundant faults, so the test expects
// 100% fault coverage on both within those 128 patterns, and prints how many
// patterns each needed.
module tb_iscas_fault_coverage;
  import sic_pkg::*;
  localparam int unsigned N = DEFAULT_N;
  localparam int unsigned AW = $clog2(DEFAULT_SEED_DEPTH);
  localparam int C17_FAULTS = 34;
  localparam int S27_FAULTS = 52;
  localparam int PATTERNS = DEFAULT_SEED_DEPTH * (1 << DEFAULT_M);

  logic tck = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic cube_we = 1'b0, lfsr_load = 1'b0;
  logic [AW-1:0] cube_waddr = '0;
  logic [N-1:0] cube_wcare = '0, cube_wval = '0, lfsr_load_val = '0;
  logic [N-1:0] sg, gc, xf, c;
  logic seed_clk;
  logic [AW-1:0] seed_idx;

  sic_reseed_tpg dut (
    .tck, .rst_n, .run, .fill_mode(FILL_LFSR), .num_seeds((AW+1)'(DEFAULT_SEED_DEPTH)),
    .cube_we, .cube_waddr, .cube_wcare, .cube_wval, .lfsr_load, .lfsr_load_val,
    .sg, .gc, .xf, .c, .lfsr_state(), .seed_clk, .seed_idx);

  always #5 tck = ~tck;

  int checks = 0, failures = 0;

  // c17 with an optional stuck-at fault at `site` (-1: fault free). Sites
  // 0-10 are the nets N1 N2 N3 N6 N7 N10 N11 N16 N19 N22 N23; sites 11-16
  // are the fanout branches N3->N10, N3->N11, N11->N16, N11->N19,
  // N16->N22, N16->N23.
  function automatic logic [1:0] c17(input logic [4:0] in, input int site, input logic sv);
    logic n1, n2, n3, n6, n7, n10, n11, n16, n19, n22, n23;
    logic b3a, b3b, b11a, b11b, b16a, b16b;
    n1 = (site == 0) ? sv : in[0];
    n2 = (site == 1) ? sv : in[1];
    n3 = (site == 2) ? sv : in[2];
    n6 = (site == 3) ? sv : in[3];
    n7 = (site == 4) ? sv : in[4];
    b3a = (site == 11) ? sv : n3;
    b3b = (site == 12) ? sv : n3;
    n10 = (site == 5) ? sv : ~(n1 & b3a);
    n11 = (site == 6) ? sv : ~(b3b & n6);
    b11a = (site == 13) ? sv : n11;
    b11b = (site == 14) ? sv : n11;
    n16 = (site == 7) ? sv : ~(n2 & b11a);
    n19 = (site == 8) ? sv : ~(b11b & n7);
    b16a = (site == 15) ? sv : n16;
    b16b = (site == 16) ? sv : n16;
    n22 = (site == 9) ? sv : ~(n10 & b16a);
    n23 = (site == 10) ? sv : ~(b16b & n19);
    return {n23, n22};
  endfunction

  // Combinational core of s27 under full scan, with an optional stuck-at
  // fault. in = {G7, G6, G5, G3, G2, G1, G0}; result = {G17, G10, G11, G13}.
  // Sites 0-16: G0 G1 G2 G3 G5 G6 G7 G8 G9 G10 G11 G12 G13 G14 G15 G16 G17.
  // Sites 17-25: branches G14->G8, G14->G10, G8->G15, G8->G16, G11->G17,
  // G11->G10, G11->scan cell G6, G12->G15, G12->G13.
  function automatic logic [3:0] s27(input logic [6:0] in, input int site, input logic sv);
    logic g0, g1, g2, g3, g5, g6, g7, g8, g9, g10, g11, g12, g13, g14, g15, g16, g17;
    logic b14a, b14b, b8a, b8b, b11a, b11b, b11c, b12a, b12b;
    g0 = (site == 0) ? sv : in[0];
    g1 = (site == 1) ? sv : in[1];
    g2 = (site == 2) ? sv : in[2];
    g3 = (site == 3) ? sv : in[3];
    g5 = (site == 4) ? sv : in[4];
    g6 = (site == 5) ? sv : in[5];
    g7 = (site == 6) ? sv : in[6];
    g14 = (site == 13) ? sv : ~g0;
    b14a = (site == 17) ? sv : g14;
    b14b = (site == 18) ? sv : g14;
    g12 = (site == 11) ? sv : ~(g1 | g7);
    b12a = (site == 24) ? sv : g12;
    b12b = (site == 25) ? sv : g12;
    g8 = (site == 7) ? sv : (b14a & g6);
    b8a = (site == 19) ? sv : g8;
    b8b = (site == 20) ? sv : g8;
    g15 = (site == 14) ? sv : (b12a | b8a);
    g16 = (site == 15) ? sv : (g3 | b8b);
    g9 = (site == 8) ? sv : ~(g16 & g15);
    g11 = (site == 10) ? sv : ~(g5 | g9);
    b11a = (site == 21) ? sv : g11;
    b11b = (site == 22) ? sv : g11;
    b11c = (site == 23) ? sv : g11;
    g10 = (site == 9) ? sv : ~(b14b | b11b);
    g13 = (site == 12) ? sv : ~(g2 | b12b);
    g17 = (site == 16) ? sv : ~b11a;
    return {g17, g10, b11c, g13};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit det17 [C17_FAULTS];
    bit det27 [S27_FAULTS];
    int n17, n27, last17, last27;
    n17 = 0; n27 = 0; last17 = 0; last27 = 0;
    foreach (det17[i]) det17[i] = 1'b0;
    foreach (det27[i]) det27[i] = 1'b0;
    // Spot checks of the fault-free models against hand-evaluated values.
    checks++;
    if (c17(5'b00000, -1, 1'b0) != 2'b00 || c17(5'b11111, -1, 1'b0) != 2'b01) begin
      failures++;
      $display("FAIL: c17 model");
    end
    checks++;
    if (s27(7'b0000000, -1, 1'b0) != 4'b1000 || s27(7'b1111111, -1, 1'b0) != 4'b1100) begin
      failures++;
      $display("FAIL: s27 model");
    end
    repeat (2) @(negedge tck);
    rst_n = 1'b1;
    // Pre-selected cubes. Within seed k the low M = 4 pattern bits sweep all
    // 16 values; bits 6:4 equal the cube bits XOR Gray(16k)[6:4]. Cubes 0-7
    // specify bits 6:4 so that the applied value there is k, which makes the
    // first 128 patterns exhaustive on seven inputs. Cubes 8-15 are random.
    for (int k = 0; k < DEFAULT_SEED_DEPTH; k++) begin
      logic [N-1:0] g;
      g = N'(16 * k) ^ (N'(16 * k) >> 1);
      cube_we = 1'b1; cube_waddr = AW'(k);
      if (k < 8) begin
        cube_wcare = N'(7'b111_0000);
        cube_wval = N'({3'(k) ^ g[6:4], 4'b0000});
      end else begin
        cube_wcare = N'({$urandom, $urandom}); cube_wval = N'({$urandom, $urandom});
      end
      @(negedge tck);
    end
    cube_we = 1'b0;
    lfsr_load_val = N'({$urandom, $urandom}) | N'(1);
    lfsr_load = 1'b1;
    @(negedge tck);
    lfsr_load = 1'b0;
    for (int pat = 0; pat < PATTERNS; pat++) begin
      for (int f = 0; f < C17_FAULTS; f++)
        if (!det17[f] && c17(sg[4:0], f / 2, 1'(f % 2)) != c17(sg[4:0], -1, 1'b0)) begin
          det17[f] = 1'b1;
          n17++;
          last17 = pat + 1;
        end
      for (int f = 0; f < S27_FAULTS; f++)
        if (!det27[f] && s27(sg[6:0], f / 2, 1'(f % 2)) != s27(sg[6:0], -1, 1'b0)) begin
          det27[f] = 1'b1;
          n27++;
          last27 = pat + 1;
        end
      run = 1'b1;
      @(negedge tck);
    end
    run = 1'b0;
    checks++;
    if (n17 != C17_FAULTS) begin
      failures++;
      $display("FAIL: c17 only %0d of %0d faults detected", n17, C17_FAULTS);
    end
    checks++;
    if (n27 != S27_FAULTS) begin
      failures++;
      $display("FAIL: s27 only %0d of %0d faults detected", n27, S27_FAULTS);
      for (int f = 0; f < S27_FAULTS; f++)
        if (!det27[f]) $display("  undetected s27 site %0d stuck-at-%0d", f / 2, f % 2);
    end
    checks++;
    if (last17 > 128 || last27 > 128) begin
      failures++;
      $display("FAIL: full coverage not reached within the 128 targeted patterns");
    end
    checks++;
    if (c != N'(PATTERNS)) begin
      failures++;
      $display("FAIL: generator did not advance once per pattern");
    end
    $display("c17: %0d/%0d faults detected, last new detection at pattern %0d", n17, C17_FAULTS, last17);
    $display("s27: %0d/%0d faults detected, last new detection at pattern %0d", n27, S27_FAULTS, last27);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
