// Full-size test of the link at its default parameters (one 4-bit sub-bus,
// 9 wires). It replays the worked example through the whole link: the words
// 1010, 0111, 1000, 0100 in cycles 0..3, first over a clean channel (bus must
// show 110011000, 100111111, 110000001, 100110000), then again with the
// example's wire errors (y7; y0; y8; y7 and y0, counted on the un-rotated
// word), where the first three are corrected and the last, a double error,
// comes out as 1100 and is flagged by the detect-only receiver. It ends
// with every 4-bit word under every single wire error in both phases.
module tb_bsc_link_full;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] din, dout, raw;
  logic [8:0] flip, bus;
  logic [0:0] syn, det;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsc_link_top dut (
    .clk(clk), .rst_n(rst_n), .data_in(din), .bus_flip(flip), .bus(bus),
    .data_out(dout), .syndrome(syn), .data_raw(raw), .err_detected(det)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Map an error on pre-shifted position p to the bus wire carrying it.
  function automatic int wire_of(input int p, input bit odd);
    return odd ? (p + 8) % 9 : p;
  endfunction

  logic [3:0] ex_in  [4] = '{4'b1010, 4'b0111, 4'b1000, 4'b0100};
  logic [8:0] ex_bus [4] = '{9'b110011000, 9'b100111111, 9'b110000001, 9'b100110000};
  logic [3:0] ex_dec [4] = '{4'b1010, 4'b0111, 4'b1000, 4'b1100};
  int         ex_e1  [4] = '{7, 0, 8, 7};
  int         ex_e2  [4] = '{-1, -1, -1, 0};

  initial begin
    int t = 0;
    din = '0;
    flip = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Clean pass of the example (cycles 0..3).
    for (int k = 0; k < 4; k++) begin
      din = ex_in[k];
      flip = '0;
      #1;
      chk(bus === ex_bus[k], $sformatf("clean cycle %0d: bus %b expected %b", t, bus, ex_bus[k]));
      chk(dout === ex_in[k] && raw === ex_in[k] && det[0] === 1'b0,
          $sformatf("clean cycle %0d: receivers", t));
      t++;
      @(negedge clk);
    end
    // Noisy pass (cycles 4..7, same phases).
    for (int k = 0; k < 4; k++) begin
      automatic bit odd = (t % 2) == 1;
      din = ex_in[k];
      flip = '0;
      flip[wire_of(ex_e1[k], odd)] = 1'b1;
      if (ex_e2[k] >= 0) flip[wire_of(ex_e2[k], odd)] = 1'b1;
      #1;
      chk(dout === ex_dec[k], $sformatf("noisy cycle %0d: data_out %b expected %b", t, dout, ex_dec[k]));
      chk(det[0] === 1'b1, $sformatf("noisy cycle %0d: error not detected", t));
      t++;
      @(negedge clk);
    end
    // Every word, every single error, both phases.
    for (int d = 0; d < 16; d++)
      for (int e = -1; e < 9; e++)
        for (int rep = 0; rep < 2; rep++) begin
          automatic bit odd = (t % 2) == 1;
          din = 4'(d);
          flip = '0;
          if (e >= 0) flip[e] = 1'b1;
          #1;
          chk(word_t'(bus) === encode(data_t'(d), 4, odd), $sformatf("cycle %0d: bus", t));
          chk(dout === 4'(d), $sformatf("cycle %0d: word %0d error wire %0d: data_out %b", t, d, e, dout));
          chk(det[0] === (e >= 0), $sformatf("cycle %0d: err_detected", t));
          t++;
          @(negedge clk);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
