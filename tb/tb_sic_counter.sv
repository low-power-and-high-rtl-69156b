// tb_sic_counter: self-checking test of the N-bit SICG counter at N = 8.
// Checks the all-zero start after reset, counting on enabled TCK edges,
// holding when disabled, the c_next look-ahead, and the wrap after 2^N
// counts, against a software model of the count.
module tb_sic_counter;
  localparam int unsigned N = 8;
  logic tck = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [N-1:0] c, c_next;
  int checks = 0, failures = 0;
  int unsigned model = 0;
  int wraps = 0;

  sic_counter #(.N(N)) dut (.tck, .rst_n, .en, .c, .c_next);

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (c=%0d model=%0d)", what, c, model);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge tck);
    check(c == 0, "reset value is zero");
    rst_n = 1'b1;
    for (int i = 0; i < 700; i++) begin
      en = (i < 600) ? 1'b1 : 1'($urandom_range(0, 1));
      #1;
      check(c_next == N'(en ? model + 1 : model), "c_next look-ahead");
      @(posedge tck);
      if (en) begin
        model = (model + 1) % (1 << N);
        if (model == 0) wraps++;
      end
      @(negedge tck);
      check(c == N'(model), "count follows model");
    end
    check(wraps >= 2, "counter wrapped after 2^N counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
