// End-to-end test of the boundary shift code link.
//
// Two links run side by side on the same clock:
//  - u_dut with every parameter at its default (one 4-bit sub-bus, 9 wires);
//  - u_sub with a 16-bit word split into four 4-bit sub-buses with three
//    shield wires (39 wires).
// Each clock sends a random word and applies one of four channel conditions:
// clean, one wire error in every sub-bus, two wire errors in one sub-bus, or
// an error on a shield wire only. The test compares the bus with the
// reference encoder, checks the self-shielding rule between consecutive
// words, and checks both receivers in the same cycle (the link has no
// latency and carries one word per clock). It counts how often each
// mechanism occurred and fails if one never did: even and odd cycles,
// corrected single errors, errors corrected in several sub-buses at once,
// double errors detected, double errors beyond the correction capability,
// shield wire errors ignored, and data taken straight off the bus.
module tb_bsc_link_top;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;

  localparam int SUBS = 4;
  localparam int SW   = 4;
  localparam int CWS  = 2 * SW + 1;
  localparam int BW   = SUBS * CWS + SUBS - 1;
  localparam int NCYC = 600;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  logic [3:0]  d_a, out_a, raw_a;
  logic [8:0]  flip_a, bus_a;
  logic [0:0]  syn_a, det_a;

  logic [15:0]   d_b, out_b, raw_b;
  logic [BW-1:0] flip_b, bus_b;
  logic [3:0]    syn_b, det_b;

  int checks = 0, failures = 0;
  int n_even = 0, n_odd = 0, n_single = 0, n_multi_sub = 0, n_dbl_det = 0;
  int n_dbl_wrong = 0, n_shield = 0, n_raw = 0, n_syn = 0;

  always #5 clk = ~clk;

  bsc_link_top u_dut (
    .clk(clk), .rst_n(rst_n), .data_in(d_a), .bus_flip(flip_a), .bus(bus_a),
    .data_out(out_a), .syndrome(syn_a), .data_raw(raw_a), .err_detected(det_a)
  );

  bsc_link_top #(.DATA_W(16), .SUB_W(SW)) u_sub (
    .clk(clk), .rst_n(rst_n), .data_in(d_b), .bus_flip(flip_b), .bus(bus_b),
    .data_out(out_b), .syndrome(syn_b), .data_raw(raw_b), .err_detected(det_b)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int rnd_wire(input int base);
    return base + $urandom_range(CWS - 1, 0);
  endfunction

  initial begin
    word_t prev_a, prev_b;
    d_a = '0; d_b = '0; flip_a = '0; flip_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NCYC; t++) begin
      automatic bit odd  = (t % 2) == 1;
      automatic int mode = $urandom_range(3, 0);
      automatic int dsub = $urandom_range(SUBS - 1, 0);
      automatic int corrected_subs = 0;
      automatic logic [SUBS-1:0] sub_err = '0;
      automatic logic [SUBS-1:0] sub_dbl = '0;
      d_a = 4'($urandom);
      d_b = 16'($urandom);
      flip_a = '0;
      flip_b = '0;
      case (mode)
        1: begin  // one error in every sub-bus
          flip_a[rnd_wire(0)] = 1'b1;
          for (int j = 0; j < SUBS; j++) begin
            flip_b[rnd_wire(j * (CWS + 1))] = 1'b1;
            sub_err[j] = 1'b1;
          end
        end
        2: begin  // two distinct errors in one sub-bus
          automatic int w1 = $urandom_range(CWS - 1, 0);
          automatic int w2 = (w1 + 1 + $urandom_range(CWS - 2, 0)) % CWS;
          flip_a[w1] = 1'b1;
          flip_a[w2] = 1'b1;
          flip_b[dsub * (CWS + 1) + w1] = 1'b1;
          flip_b[dsub * (CWS + 1) + w2] = 1'b1;
          sub_err[dsub] = 1'b1;
          sub_dbl[dsub] = 1'b1;
        end
        3: begin  // shield wire only (none on the 9-wire link)
          flip_b[$urandom_range(SUBS - 2, 0) * (CWS + 1) + CWS] = 1'b1;
        end
        default: ;
      endcase
      #1;
      // Phase and bus contents against the reference encoder.
      if (odd) n_odd++; else n_even++;
      chk(word_t'(bus_a) === encode(data_t'(d_a), 4, odd),
          $sformatf("cycle %0d: default bus %b", t, bus_a));
      for (int j = 0; j < SUBS; j++) begin
        chk(word_t'(bus_b[j*(CWS+1) +: CWS]) === encode(data_t'(d_b[j*SW +: SW]), SW, odd),
            $sformatf("cycle %0d: sub-bus %0d codeword", t, j));
        if (j < SUBS - 1) chk(bus_b[j*(CWS+1) + CWS] === 1'b0, "shield wire level");
      end
      if (t > 0) begin
        chk(invalid_transitions(prev_a, word_t'(bus_a), 9) == 0,
            $sformatf("cycle %0d: invalid transition, default link", t));
        chk(invalid_transitions(prev_b, word_t'(bus_b), BW) == 0,
            $sformatf("cycle %0d: invalid transition, split link", t));
      end
      prev_a = word_t'(bus_a);
      prev_b = word_t'(bus_b);

      // Default link receivers.
      chk(raw_a === {bus_a[7] ^ flip_a[7], bus_a[5] ^ flip_a[5],
                     bus_a[3] ^ flip_a[3], bus_a[1] ^ flip_a[1]}, "default data_raw");
      if (mode == 2) begin
        chk(det_a[0] === 1'b1, $sformatf("cycle %0d: double error not detected", t));
        if (det_a[0]) n_dbl_det++;
        if (out_a !== d_a) n_dbl_wrong++;
      end else begin
        chk(out_a === d_a, $sformatf("cycle %0d: default data_out %b expected %b", t, out_a, d_a));
        chk(det_a[0] === (flip_a != '0), "default err_detected");
        if (mode == 1 && out_a === d_a) n_single++;
        if (mode == 0 && raw_a === d_a) n_raw++;
      end
      if (syn_a[0]) n_syn++;

      // Split link receivers, one sub-bus at a time.
      for (int j = 0; j < SUBS; j++) begin
        if (sub_dbl[j]) begin
          chk(det_b[j] === 1'b1, $sformatf("cycle %0d: sub-bus %0d double error not detected", t, j));
        end else begin
          chk(out_b[j*SW +: SW] === d_b[j*SW +: SW],
              $sformatf("cycle %0d: sub-bus %0d data_out", t, j));
          chk(det_b[j] === sub_err[j], $sformatf("cycle %0d: sub-bus %0d err_detected", t, j));
          if (sub_err[j] && out_b[j*SW +: SW] === d_b[j*SW +: SW]) corrected_subs++;
        end
      end
      if (corrected_subs >= 2) n_multi_sub++;
      if (mode == 3 && out_b === d_b && det_b == '0) n_shield++;
      @(negedge clk);
    end

    $display("mechanisms: even=%0d odd=%0d single_corrected=%0d multi_subbus=%0d",
             n_even, n_odd, n_single, n_multi_sub);
    $display("mechanisms: double_detected=%0d double_miscorrected=%0d shield_ignored=%0d raw_tap=%0d syndrome=%0d",
             n_dbl_det, n_dbl_wrong, n_shield, n_raw, n_syn);
    chk(n_even > 0, "no even cycle");
    chk(n_odd > 0, "no odd cycle");
    chk(n_single > 0, "no single error corrected");
    chk(n_multi_sub > 0, "no simultaneous sub-bus corrections");
    chk(n_dbl_det > 0, "no double error detected");
    chk(n_dbl_wrong > 0, "no double error beyond correction");
    chk(n_shield > 0, "no shield wire error");
    chk(n_raw > 0, "no raw tap");
    chk(n_syn > 0, "no syndrome");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
