// tb_xfill_seed_gen: self-checking test of the X-filling seed store at
// N = 16 with 4 cubes. Writes random cubes, then for every cube and every
// fill rule checks XF against value-on-care-bits plus the fill on the
// don't-care bits, checks that the index advances only with adv, and that
// it wraps after num_seeds cubes (4, then 3, then 0 meaning 1).
module tb_xfill_seed_gen;
  import sic_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned D = 4;
  logic tck = 1'b0, rst_n = 1'b0, adv = 1'b0, we = 1'b0;
  logic [2:0] num_seeds = 3'd4;
  fill_mode_e fill_mode = FILL_ZERO;
  logic [N-1:0] fill_src = '0, wcare = '0, wval = '0, xf;
  logic [1:0] waddr = '0, idx;
  logic [N-1:0] care [D], val [D];
  int checks = 0, failures = 0;

  xfill_seed_gen #(.N(N), .SEED_DEPTH(D)) dut (
    .tck, .rst_n, .adv, .num_seeds, .fill_mode, .fill_src, .we, .waddr,
    .wcare, .wval, .idx, .xf);

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s idx=%0d xf=%h", what, idx, xf);
    end
  endtask

  function automatic logic [N-1:0] expect_xf(input int k, input fill_mode_e m, input logic [N-1:0] src);
    logic [N-1:0] r;
    for (int b = 0; b < N; b++)
      if (care[k][b]) r[b] = val[k][b];
      else r[b] = (m == FILL_ZERO) ? 1'b0 : (m == FILL_ONE) ? 1'b1 : src[b];
    return r;
  endfunction

  task automatic check_all_fills(input int k);
    fill_mode = FILL_ZERO; #1; check(xf == expect_xf(k, FILL_ZERO, fill_src), "zero fill");
    fill_mode = FILL_ONE;  #1; check(xf == expect_xf(k, FILL_ONE, fill_src), "one fill");
    fill_mode = FILL_LFSR;
    repeat (4) begin
      fill_src = N'($urandom);
      #1; check(xf == expect_xf(k, FILL_LFSR, fill_src), $sformatf("lfsr fill exp=%h src=%h mode=%0d", expect_xf(k, FILL_LFSR, fill_src), fill_src, fill_mode));
    end
  endtask

  task automatic advance();
    @(negedge tck);
    adv = 1'b1;
    @(negedge tck);
    adv = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < D; k++) begin
      care[k] = N'($urandom);
      val[k] = N'($urandom);
    end
    care[0] = 16'hF0F0;  // half specified
    care[1] = 16'h0000;  // fully unspecified
    repeat (2) @(negedge tck);
    rst_n = 1'b1;
    for (int k = 0; k < D; k++) begin
      we = 1'b1; waddr = 2'(k); wcare = care[k]; wval = val[k];
      @(negedge tck);
    end
    we = 1'b0;
    check(idx == 0, "index 0 after reset");
    // Two passes over the four cubes.
    for (int p = 0; p < 2 * D; p++) begin
      check(idx == 2'(p % D), "index sequence");
      check_all_fills(p % D);
      repeat (3) @(negedge tck);
      check(idx == 2'(p % D), "index holds without adv");
      advance();
    end
    // Fewer cubes in use.
    num_seeds = 3'd3;
    for (int p = 0; p < 7; p++) begin
      check(idx == 2'(p % 3), "wrap after three cubes");
      check_all_fills(p % 3);
      advance();
    end
    // num_seeds of 0 behaves like 1: the index returns to 0 and stays.
    num_seeds = 3'd0;
    advance();
    advance();
    check(idx == 0, "num_seeds 0 holds cube 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
