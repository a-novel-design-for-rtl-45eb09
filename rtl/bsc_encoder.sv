// Boundary shift code encoder, [2N+1, N, 3] single-error-correcting and
// self-shielding (no two neighbouring wires ever switch in opposite
// directions between consecutive bus cycles).
//
// How it works. The pre-shifted codeword p duplicates every data bit onto two
// neighbouring wires and adds an even-parity bit at wire 0:
//     p[2i+1] = p[2i+2] = data[i],   p[0] = ^data.
// Its bit boundaries (neighbours that differ) can only lie at even
// positions. In odd cycles p is rotated right by one wire (p[0] moves to the
// top wire), which moves every boundary to an odd position, so words of
// consecutive cycles never share a boundary and no transition is invalid.
// The odd wires 1, 3, ..., 2N-1 carry data[0..N-1] in both phases (the code
// is systematic); only the N+1 even wires change with the phase, so the
// circuit is an XOR tree for the parity plus N+1 two-input multiplexers
// steered by a toggling phase flip-flop.
//
// Interface: data (N bits) in, code (2N+1 bits) out, phase out (the cycle
// phase used for the current word).
// Timing: code is combinational in data; one word per clock cycle. The first
// cycle after reset is even.
//
// The bit mapping, the parity, the rotation direction and the use of N+1
// multiplexers follow the published [9,4,3] code; the width parameter
// generalises it to any N as the code construction allows. Reset and the
// phase port are this design's own.
module bsc_encoder
  import bsc_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned W = 2 * N + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] data,
  output logic [W-1:0] code,
  output phase_e       phase
);

  logic parity;

  bsc_phase_toggle u_phase (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase)
  );

  always_comb begin
    parity = ^data;
    // Wire 0: parity in even cycles, first copy of data[0] in odd cycles.
    code[0] = (phase == PH_ODD) ? data[0] : parity;
    for (int i = 0; i < int'(N); i++) begin
      // Odd wires carry the data bits unchanged in both phases.
      code[2*i+1] = data[i];
      // Even wires: second copy of data[i] (even) or first copy of
      // data[i+1] / the parity bit on the top wire (odd).
      if (i == int'(N) - 1)
        code[2*i+2] = (phase == PH_ODD) ? parity : data[i];
      else
        code[2*i+2] = (phase == PH_ODD) ? data[i+1] : data[i];
    end
  end

endmodule
