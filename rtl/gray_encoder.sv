// gray_encoder: converts the binary count C[N-1:0] into the reflected Gray
// code GC[N-1:0], so that two successive counter values give codes that
// differ in exactly one bit (single input change).
//
// Each output bit is the XOR of a count bit and its upper neighbour,
// GC[i] = C[i] ^ C[i+1], and the top bit is copied, GC[N-1] = C[N-1]; these
// are the equations of the method. Purely combinational, no clock. The top
// output bit is therefore a plain copy of the top input bit.
module gray_encoder #(
  parameter int unsigned N = sic_pkg::DEFAULT_N
) (
  input  logic [N-1:0] c,
  output logic [N-1:0] gc
);

  always_comb begin
    for (int i = 0; i < N - 1; i++) gc[i] = c[i] ^ c[i+1];
    gc[N-1] = c[N-1];
  end

endmodule
