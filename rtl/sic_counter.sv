// sic_counter: the n-bit binary up counter of the single input change
// generator (SICG). It starts from all zeros after reset and, while `en` is
// high, adds one on every rising edge of the test clock TCK, wrapping after
// 2^N counts, so it walks through every N-bit value periodically.
//
// Interface: `c` is the registered count C[N-1:0]; `c_next` is the value C
// will take at the next TCK edge (C+1 when enabled, C otherwise). The
// control logic of the seed clock looks at `c_next` to act on the same edge
// at which the low count bits return to zero.
//
// From the method: the all-zero start and the free-running binary count.
// Own choices: the count enable and the asynchronous active-low reset.
module sic_counter #(
  parameter int unsigned N = sic_pkg::DEFAULT_N
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] c,
  output logic [N-1:0] c_next
);

  always_comb c_next = en ? c + N'(1) : c;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) c <= '0;
    else        c <= c_next;
  end

endmodule
