// xor_array: the exclusive-OR array at the output of the generator. Each
// pattern bit is the seed bit XOR the Gray-code bit, SG[i] = XF[i] ^ GC[i].
// While the seed is constant, XORing it with a single input change sequence
// gives another single input change sequence, so consecutive patterns still
// differ in one bit. Combinational; this is the method's equation.
module xor_array #(
  parameter int unsigned N = sic_pkg::DEFAULT_N
) (
  input  logic [N-1:0] xf,
  input  logic [N-1:0] gc,
  output logic [N-1:0] sg
);

  always_comb sg = xf ^ gc;

endmodule
