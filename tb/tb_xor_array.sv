// tb_xor_array: self-checking test of the output XOR array at its default
// width, bit by bit against SG[i] = XF[i] ^ GC[i] for random operands.
module tb_xor_array;
  localparam int unsigned N = sic_pkg::DEFAULT_N;
  logic [N-1:0] xf, gc, sg;
  int checks = 0, failures = 0;

  xor_array dut (.xf, .gc, .sg);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      xf = N'({$urandom, $urandom});
      gc = (i == 0) ? '0 : N'({$urandom, $urandom});
      #1;
      for (int b = 0; b < N; b++) begin
        checks++;
        if (sg[b] != (xf[b] != gc[b])) begin
          failures++;
          $display("FAIL: bit %0d xf=%b gc=%b sg=%b", b, xf[b], gc[b], sg[b]);
        end
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
