// sic_pkg: types and constants shared by the SIC reseeding test pattern
// generator. It holds the encoding of the X-fill rule applied to the
// don't-care bits of a seed cube, and a small table of feedback tap masks
// for maximal-length LFSRs of the widths this design is used at.
//
// The zero-fill and one-fill rules are the ones the method names; the third
// rule, filling from the bit-swapping LFSR, is this design's own way of
// combining that LFSR with the X-filling seed store. The tap table is common
// knowledge (one primitive trinomial or pentanomial per width), not part of
// the method.
package sic_pkg;

  // How the unspecified (X) bits of a seed cube are filled.
  typedef enum logic [1:0] {
    FILL_ZERO = 2'd0,  // X bits become 0
    FILL_ONE  = 2'd1,  // X bits become 1
    FILL_LFSR = 2'd2   // X bits are taken from the bit-swapping LFSR
  } fill_mode_e;

  // Default width of the generator: enough for the widest benchmark circuit
  // it is meant to drive (50 primary inputs).
  localparam int unsigned DEFAULT_N = 50;
  // Default m: a new seed every 2^m test clocks.
  localparam int unsigned DEFAULT_M = 4;
  // Default number of seed cubes held.
  localparam int unsigned DEFAULT_SEED_DEPTH = 16;

  localparam int unsigned MAX_LFSR_N = 64;

  // Feedback tap mask of a Fibonacci LFSR of width n (bit k set = stage k+1
  // is tapped). Each entry gives a maximal-length (2^n - 1) sequence.
  function automatic logic [MAX_LFSR_N-1:0] lfsr_taps(int unsigned n);
    logic [MAX_LFSR_N-1:0] t;
    t = '0;
    case (n)
      3:  begin t[2] = 1'b1; t[1] = 1'b1; end
      4:  begin t[3] = 1'b1; t[2] = 1'b1; end
      5:  begin t[4] = 1'b1; t[2] = 1'b1; end
      6:  begin t[5] = 1'b1; t[4] = 1'b1; end
      7:  begin t[6] = 1'b1; t[5] = 1'b1; end
      8:  begin t[7] = 1'b1; t[5] = 1'b1; t[4] = 1'b1; t[3] = 1'b1; end
      9:  begin t[8] = 1'b1; t[4] = 1'b1; end
      10: begin t[9] = 1'b1; t[6] = 1'b1; end
      11: begin t[10] = 1'b1; t[8] = 1'b1; end
      16: begin t[15] = 1'b1; t[14] = 1'b1; t[12] = 1'b1; t[3] = 1'b1; end
      36: begin t[35] = 1'b1; t[24] = 1'b1; end
      41: begin t[40] = 1'b1; t[37] = 1'b1; end
      50: begin t[49] = 1'b1; t[48] = 1'b1; t[23] = 1'b1; t[22] = 1'b1; end
      64: begin t[63] = 1'b1; t[62] = 1'b1; t[60] = 1'b1; t[59] = 1'b1; end
      default: begin
        // Widths without an entry: x^n + x^(n-1) + 1 style feedback. It
        // never locks up from a non-zero state but need not be maximal.
        t[n-1] = 1'b1; t[n-2] = 1'b1;
      end
    endcase
    return t;
  endfunction

endpackage
