// Crosstalk-avoiding, error-correcting bus link built on the boundary shift
// code.
//
// The DATA_W-bit data word is split into NUM_SUB = DATA_W / SUB_W sub-buses
// of SUB_W bits. Each sub-bus has its own encoder and sends a
// (2*SUB_W+1)-wire codeword; neighbouring sub-buses are separated by one
// shield wire held at 0. Smaller sub-buses keep the encoder and decoder
// logic shallow, and each sub-bus corrects one wire error of its own per
// word. With the default DATA_W = SUB_W = 4 the link is the single
// [9,4,3] code, 9 wires and no shield.
//
// Bus wire layout, LSB first: sub-bus 0 on wires 0..CW-1, a shield wire,
// sub-bus 1 on the next CW wires, and so on (CW = 2*SUB_W+1).
//
// Two destinations read the bus: a correcting decoder per sub-bus
// (data_out, syndrome) and a detect-only receiver per sub-bus that takes the
// data bits straight off the bus (data_raw, err_detected).
//
// Interface: data_in is sent each clock. bus shows the wires as driven by the
// encoders. bus_flip models the channel: each 1 inverts that wire between
// the encoders and the receivers (tie it to 0 for a clean link). All
// encoders and receivers keep their own phase flip-flops and are reset
// together by rst_n, which keeps them in step.
// Timing: data_in to bus to data_out is combinational; one word per clock.
//
// Sub-buses with shield wires follow the published scaling scheme; the
// default sizes are the published [9,4,3] example; the error-injection
// port, the wire order and the shield level are this design's own.
module bsc_link_top
  import bsc_pkg::*;
#(
  parameter int unsigned DATA_W = 4,
  parameter int unsigned SUB_W  = 4,
  localparam int unsigned NUM_SUB = DATA_W / SUB_W,
  localparam int unsigned CW      = 2 * SUB_W + 1,
  localparam int unsigned BUS_W   = NUM_SUB * CW + NUM_SUB - 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [DATA_W-1:0]  data_in,
  input  logic [BUS_W-1:0]   bus_flip,
  output logic [BUS_W-1:0]   bus,
  output logic [DATA_W-1:0]  data_out,
  output logic [NUM_SUB-1:0] syndrome,
  output logic [DATA_W-1:0]  data_raw,
  output logic [NUM_SUB-1:0] err_detected
);

  localparam int unsigned STRIDE = CW + 1;  // codeword plus shield wire

  logic [BUS_W-1:0] bus_rx;

  initial begin
    assert (DATA_W % SUB_W == 0 && SUB_W > 0)
      else $error("DATA_W must be a multiple of SUB_W");
  end

  assign bus_rx = bus ^ bus_flip;

  for (genvar j = 0; j < int'(NUM_SUB); j++) begin : g_sub
    logic [CW-1:0] code_tx;
    phase_e        ph_enc, ph_dec, ph_det;

    bsc_encoder #(.N(SUB_W)) u_enc (
      .clk  (clk),
      .rst_n(rst_n),
      .data (data_in[j*SUB_W +: SUB_W]),
      .code (code_tx),
      .phase(ph_enc)
    );

    assign bus[j*STRIDE +: CW] = code_tx;
    if (j < int'(NUM_SUB) - 1) begin : g_shield
      assign bus[j*STRIDE + CW] = 1'b0;
    end

    bsc_decoder #(.N(SUB_W)) u_dec (
      .clk     (clk),
      .rst_n   (rst_n),
      .code_in (bus_rx[j*STRIDE +: CW]),
      .data_out(data_out[j*SUB_W +: SUB_W]),
      .syndrome(syndrome[j]),
      .phase   (ph_dec)
    );

    bsc_detector #(.N(SUB_W)) u_det (
      .clk         (clk),
      .rst_n       (rst_n),
      .code_in     (bus_rx[j*STRIDE +: CW]),
      .data_raw    (data_raw[j*SUB_W +: SUB_W]),
      .err_detected(err_detected[j]),
      .phase       (ph_det)
    );

    // Both ends must use the same codebook in every cycle.
    a_phase_sync : assert property (
      @(posedge clk) disable iff (!rst_n) (ph_enc == ph_dec) && (ph_enc == ph_det))
      else $error("sub-bus %0d: encoder and receiver phases differ", j);
  end

  // Self-shielding rule: from one clock to the next, no two neighbouring
  // wires may switch in opposite directions (both change and end up unequal).
  // Checked from the second cycle after reset on.
  for (genvar k = 0; k + 1 < int'(BUS_W); k++) begin : g_xtalk
    a_no_invalid_transition : assert property (
      @(posedge clk) disable iff (!rst_n)
      $past(rst_n) |-> !((bus[k] != $past(bus[k])) &&
                         (bus[k+1] != $past(bus[k+1])) &&
                         (bus[k] != bus[k+1])))
      else $error("invalid transition on bus wires %0d/%0d", k, k + 1);
  end

endmodule
