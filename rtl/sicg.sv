// sicg: single input change generator. An N-bit counter clocked by TCK feeds
// a Gray encoder; while the counter runs, the Gray output GC changes in
// exactly one bit per TCK. The binary count C is brought out too, because
// its low m bits time the reseeding.
//
// Interface: `en` lets the counter advance on the next TCK edge; `c`, `gc`
// follow the edge (GC is a combinational function of the registered count);
// `c_next` is the count after the coming edge.
//
// The grouping of counter and Gray encoder into one unit follows the
// method's architecture; enable and reset style are this design's choice.
module sicg #(
  parameter int unsigned N = sic_pkg::DEFAULT_N
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] c,
  output logic [N-1:0] c_next,
  output logic [N-1:0] gc
);

  sic_counter #(.N(N)) u_counter (
    .tck   (tck),
    .rst_n (rst_n),
    .en    (en),
    .c     (c),
    .c_next(c_next)
  );

  gray_encoder #(.N(N)) u_gray (
    .c (c),
    .gc(gc)
  );

endmodule
