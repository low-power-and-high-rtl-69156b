// tb_gray_encoder: self-checking test of the Gray encoder at its default
// width. Compares GC with the reference c ^ (c >> 1) for random and corner
// values, and checks that encodings of consecutive values differ in exactly
// one bit.
module tb_gray_encoder;
  localparam int unsigned N = sic_pkg::DEFAULT_N;
  logic [N-1:0] c, gc, gc_prev;
  int checks = 0, failures = 0;

  gray_encoder dut (.c, .gc);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0: c = '0;
        1: c = '1;
        2: c = {1'b1, {(N-1){1'b0}}};
        default: c = N'({$urandom, $urandom});
      endcase
      #1;
      checks++;
      if (gc !== (c ^ (c >> 1))) begin
        failures++;
        $display("FAIL: c=%h gc=%h", c, gc);
      end
      // Successor of c must differ in one Gray bit.
      gc_prev = gc;
      c = c + 1'b1;
      #1;
      checks++;
      if ($countones(gc ^ gc_prev) != 1) begin
        failures++;
        $display("FAIL: not single change at c=%h", c);
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
