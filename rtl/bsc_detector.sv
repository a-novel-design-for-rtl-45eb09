// Boundary shift code detect-only receiver.
//
// A destination close to the source may not need error correction. Because
// the code is systematic, such a destination can take the data bits straight
// off the odd wires (data_raw), which are the same in both cycle phases, and
// optionally check the word instead of correcting it: err_detected is raised
// when the two copies of any data bit disagree or the parity bit does not
// match the data, which catches every pattern of one or two wire errors
// (the code has minimum distance three).
//
// Interface: code_in (2N+1 bits) from the bus; data_raw (N bits) the
// uncorrected data; err_detected the check result; phase the cycle phase
// assumed for code_in (own phase flip-flop, reset with the encoder's).
// Timing: combinational from code_in.
//
// Taking the data bits straight off the codeword, and choosing detection
// over correction, are options the code offers; how the check is built is
// this design's own choice.
module bsc_detector
  import bsc_pkg::*;
#(
  parameter int unsigned N = 4,
  localparam int unsigned W = 2 * N + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] code_in,
  output logic [N-1:0] data_raw,
  output logic         err_detected,
  output phase_e       phase
);

  logic [W-1:0] c;  // un-rotated codeword
  logic         parity;

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

    parity       = 1'b0;
    err_detected = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      data_raw[i]  = code_in[2*i+1];
      parity      ^= c[2*i+1];
      err_detected |= c[2*i+1] ^ c[2*i+2];
    end
    err_detected |= parity ^ c[0];
  end

endmodule
