// Shared definitions for the boundary shift code (BSC) link.
//
// A boundary shift code sends an n-bit data word as a (2n+1)-bit codeword:
// every data bit is sent twice on neighbouring wires and one even-parity bit
// is added. On odd bus cycles the whole word is rotated right by one wire.
// This package holds the cycle phase type shared by the encoder, the decoder
// and the error detector, and the codeword width rule.
package bsc_pkg;

  // Phase of the bus cycle. The code uses the plain (pre-shifted) codebook
  // in even cycles and the rotated codebook in odd cycles.
  typedef enum logic {
    PH_EVEN = 1'b0,
    PH_ODD  = 1'b1
  } phase_e;

  // Number of bus wires used by an n-bit data word: [2n+1, n, 3] code.
  function automatic int unsigned code_width(input int unsigned n);
    return 2 * n + 1;
  endfunction

endpackage
