// Boundary shift code decoder, [2N+1, N, 3]: undoes the odd-cycle rotation
// and corrects any single wire error per word by majority vote.
//
// How it works. First the rotation is undone where it matters: odd wires are
// the same in both phases, and each even wire is taken from its own position
// (even cycle) or from the wire below it (odd cycle; wire 0 then takes the
// top wire). The result c is a pre-shifted codeword, at most with the two
// copies of a data bit swapped, which the vote does not care about. Each data
// bit then has three votes: its two copies c[2i+1], c[2i+2] and a third
// copy, the XOR of the parity bit with one copy of every other data bit.
// With the syndrome s = c[0] ^ c[2] ^ c[4] ^ ... ^ c[2N] the third copy is
// s ^ c[2i+2], so the majority reduces to one multiplexer per bit:
//     data_out[i] = s ? c[2i+1] : c[2i+2].
// That is N+1 rotation multiplexers, an N-gate XOR tree for s, N output
// multiplexers and the phase flip-flop with its inverter: 3N+3 gates.
//
// Interface: code_in (2N+1 bits) from the bus; data_out (N bits) the
// corrected word; syndrome is 1 when the parity check failed (an odd number
// of wire errors on the even wires and parity, corrected if there was one);
// phase is the cycle phase assumed for code_in.
// Timing: combinational from code_in to data_out. The phase flip-flop must
// be reset together with the encoder's. Two or more errors in one word may
// decode wrongly, as the code only guarantees a distance of three.
//
// The unshift-then-vote structure and the third copy follow the published
// decoder; expressing the vote as a syndrome-steered multiplexer matches the
// published gate count; reset and the syndrome port are this design's own.
module bsc_decoder
  import bsc_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned W = 2 * N + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] code_in,
  output logic [N-1:0] data_out,
  output logic         syndrome,
  output phase_e       phase
);

  logic [W-1:0] c;  // un-rotated codeword

  bsc_phase_toggle u_phase (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase)
  );

  always_comb begin
    c = code_in;
    c[0] = (phase == PH_ODD) ? code_in[W-1] : code_in[0];
    for (int i = 0; i < int'(N); i++)
      c[2*i+2] = (phase == PH_ODD) ? code_in[2*i] : code_in[2*i+2];

    syndrome = 1'b0;
    for (int i = 0; i <= int'(N); i++)
      syndrome ^= c[2*i];

    for (int i = 0; i < int'(N); i++)
      data_out[i] = syndrome ? c[2*i+1] : c[2*i+2];
  end

endmodule
