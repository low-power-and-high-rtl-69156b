// tb_seed_clk_ctrl: exhaustive self-checking test of the NOR seed-clock
// control at M = 4. For every combination of the low count bits, their
// next value and the count enable, checks seed_clk (all low bits zero) and
// seed_adv (the coming edge makes them all zero while counting).
module tb_seed_clk_ctrl;
  localparam int unsigned M = 4;
  logic [M-1:0] c_lo, c_next_lo;
  logic cnt_en, seed_clk, seed_adv;
  int checks = 0, failures = 0;

  seed_clk_ctrl #(.M(M)) dut (.c_lo, .c_next_lo, .cnt_en, .seed_clk, .seed_adv);

  initial begin
    for (int a = 0; a < (1 << M); a++)
      for (int b = 0; b < (1 << M); b++)
        for (int e = 0; e < 2; e++) begin
          c_lo = M'(a); c_next_lo = M'(b); cnt_en = 1'(e);
          #1;
          checks++;
          if (seed_clk != (a == 0)) begin
            failures++;
            $display("FAIL: seed_clk a=%0d", a);
          end
          checks++;
          if (seed_adv != (e == 1 && b == 0)) begin
            failures++;
            $display("FAIL: seed_adv b=%0d e=%0d", b, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
