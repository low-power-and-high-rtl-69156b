// bf_lfsr: bit-swapping ("bit-flipping") LFSR, the seed-side generator of
// the method. A maximal-length Fibonacci LFSR of N stages steps once per
// `adv`; its output BF is the state with neighbouring bits exchanged under
// the control of the last stage: when state[N-1] is 0 every pair
// (0,1), (2,3), ... of the lower N-1 bits is swapped, when it is 1 the state
// passes unchanged. BF[N-1] is always the last stage itself. Swapping keeps
// the pseudo-random statistics of the LFSR while raising the correlation of
// adjacent bits, which lowers the number of transitions in the patterns.
//
// Interface and timing: on a TCK edge `load` writes `load_val` into the
// state, else `adv` shifts the state one place towards the MSB with the XOR
// of the tapped stages entering bit 0. `state` and `bf` follow the edge.
// After reset the state is 1 (an LFSR must not hold all zeros).
//
// From the method: the swap of neighbouring bits selected by the last bit.
// Own choices: the Fibonacci form, the feedback polynomial (TAPS, default
// x^50+x^49+x^24+x^23+1 for N = 50), the pairing of the bits, the reset
// state and the load port. When N-1 is odd the highest of the lower bits
// (N-2) has no partner and is not swapped.
module bf_lfsr #(
  parameter int unsigned N = sic_pkg::DEFAULT_N,
  parameter logic [N-1:0] TAPS = N'(sic_pkg::lfsr_taps(N))
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         adv,
  input  logic         load,
  input  logic [N-1:0] load_val,
  output logic [N-1:0] state,
  output logic [N-1:0] bf
);

  if (N < 2) begin : g_bad_n
    $error("bf_lfsr: N must be at least 2");
  end

  logic feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n)    state <= N'(1);
    else if (load) state <= load_val;
    else if (adv)  state <= {state[N-2:0], feedback};
  end

  always_comb begin
    bf = state;
    if (!state[N-1]) begin
      for (int i = 0; i + 1 < N - 1; i += 2) begin
        bf[i]   = state[i+1];
        bf[i+1] = state[i];
      end
    end
  end

endmodule
