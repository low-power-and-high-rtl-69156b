// tb_bf_lfsr: self-checking test of the bit-swapping LFSR at three widths.
//   * N = 8 and N = 16: the state must follow a model LFSR built from the
//     polynomials x^8+x^6+x^5+x^4+1 and x^16+x^15+x^13+x^4+1 and must return
//     to its start after exactly 2^N - 1 steps (maximal length), never
//     earlier.
//   * N = 50 (default): the state follows x^50+x^49+x^24+x^23+1 for 3000
//     steps.
// At every step the swapped output BF is compared with a model of the swap:
// when the last bit is 0, bits (0,1), (2,3), ... of the lower N-1 bits are
// exchanged, otherwise BF equals the state. Load and hold (adv low) are
// checked too, and both values of the select bit must occur.
module tb_bf_lfsr;
  logic tck = 1'b0, rst_n = 1'b0, adv = 1'b0, load = 1'b0;
  int checks = 0, failures = 0;
  int swaps_seen = 0, passes_seen = 0;

  logic [7:0]  st8,  bf8,  ld8  = '0;
  logic [15:0] st16, bf16, ld16 = '0;
  logic [49:0] st50, bf50, ld50 = '0;

  bf_lfsr #(.N(8))  dut8  (.tck, .rst_n, .adv, .load, .load_val(ld8),  .state(st8),  .bf(bf8));
  bf_lfsr #(.N(16)) dut16 (.tck, .rst_n, .adv, .load, .load_val(ld16), .state(st16), .bf(bf16));
  bf_lfsr           dut50 (.tck, .rst_n, .adv, .load, .load_val(ld50), .state(st50), .bf(bf50));

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Next state of an n-bit Fibonacci LFSR (shift towards MSB) from a list of
  // tap stages numbered 1..n.
  function automatic logic [63:0] step(input logic [63:0] s, input int n,
                                       input int t0, input int t1, input int t2, input int t3);
    logic fb;
    fb = s[t0-1] ^ s[t1-1];
    if (t2 > 0) fb ^= s[t2-1];
    if (t3 > 0) fb ^= s[t3-1];
    s = (s << 1) | 64'(fb);
    s &= (64'd1 << n) - 1;
    return s;
  endfunction

  function automatic logic [63:0] swap_model(input logic [63:0] s, input int n);
    logic [63:0] r;
    r = s;
    if (s[n-1] == 1'b0)
      for (int j = 0; j < n - 1; j++) begin
        if (j % 2 == 0 && j + 1 < n - 1) r[j] = s[j+1];
        else if (j % 2 == 1)             r[j] = s[j-1];
      end
    return r;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] m8, m16, m50;
    int steps;
    repeat (2) @(negedge tck);
    check(st8 == 1 && st16 == 1 && st50 == 1, "reset state is 1");
    rst_n = 1'b1;
    m8 = 1; m16 = 1; m50 = 1;
    // Hold when adv is low.
    repeat (3) @(negedge tck);
    check(st8 == 1 && st50 == 1, "hold without adv");
    // Load.
    ld8 = 8'hA5; ld16 = 16'h1234; ld50 = 50'h2_0000_0000_0001;
    load = 1'b1;
    @(negedge tck);
    load = 1'b0;
    check(st8 == 8'hA5 && st16 == 16'h1234 && st50 == 50'h2_0000_0000_0001, "load");
    m8 = 64'hA5; m16 = 64'h1234; m50 = 64'h2_0000_0000_0001;
    adv = 1'b1;
    steps = 0;
    // Run until the 16-bit LFSR returns to its start.
    do begin
      @(posedge tck);
      m8  = step(m8, 8, 8, 6, 5, 4);
      m16 = step(m16, 16, 16, 15, 13, 4);
      if (steps < 3000) m50 = step(m50, 50, 50, 49, 24, 23);
      steps++;
      @(negedge tck);
      if (st8 != m8[7:0]) check(1'b0, "8-bit state");
      if (st16 != m16[15:0]) check(1'b0, "16-bit state");
      if (steps <= 3000 && st50 != m50[49:0]) check(1'b0, "50-bit state");
      if (steps == 255) check(st8 == 8'hA5, "8-bit period is 255");
      else if (steps < 255 && st8 == 8'hA5) check(1'b0, "8-bit period too short");
      if (steps < 65535 && st16 == 16'h1234) check(1'b0, "16-bit period too short");
      if (64'(bf8) != swap_model(64'(st8), 8)) check(1'b0, "8-bit swap");
      if (64'(bf16) != swap_model(64'(st16), 16)) check(1'b0, "16-bit swap");
      if (64'(bf50) != swap_model(64'(st50), 50)) check(1'b0, "50-bit swap");
      checks += 6;
      if (st50[49]) passes_seen++; else swaps_seen++;
    end while (st16 != 16'h1234 && steps < 70000);
    check(steps == 65535, "16-bit period is 65535");
    check(swaps_seen > 0 && passes_seen > 0, "both swap and pass-through occurred");
    $display("steps=%0d swaps=%0d passes=%0d", steps, swaps_seen, passes_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
