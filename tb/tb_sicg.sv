// tb_sicg: self-checking test of the single input change generator at
// N = 10. Runs the counter through more than one full period (2^N clocks)
// and checks the count against a model, GC against the Gray code of the
// count, and that every clock changes exactly one GC bit (including the
// wrap from all ones to zero).
module tb_sicg;
  localparam int unsigned N = 10;
  logic tck = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [N-1:0] c, c_next, gc, gc_prev;
  int checks = 0, failures = 0;
  logic [N-1:0] model = '0;

  sicg #(.N(N)) dut (.tck, .rst_n, .en, .c, .c_next, .gc);

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (c=%h gc=%h)", what, c, gc);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge tck);
    check(c == 0 && gc == 0, "reset to zero");
    rst_n = 1'b1;
    en = 1'b1;
    for (int i = 0; i < (1 << N) + 100; i++) begin
      gc_prev = gc;
      @(posedge tck);
      model = model + 1'b1;
      @(negedge tck);
      check(c == model, "count");
      check(gc == (model ^ (model >> 1)), "gray code of count");
      check($countones(gc ^ gc_prev) == 1, "single input change");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
