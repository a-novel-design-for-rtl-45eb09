// Bus-size sweep of the boundary shift code link: one link per data width
// 4, 8, 16, 32 and 64, each as a single sub-bus. For every width the test
// checks the wire count 2n+1, then sends random words with no error and with
// each single wire error in turn (each in an even and an odd cycle), and
// checks the bus against the reference encoder, the self-shielding rule
// between consecutive words, and the corrected word in the same cycle.
module tb_bsc_bus_sizes;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;

  localparam int NS = 5;
  localparam int SIZES [NS] = '{4, 8, 16, 32, 64};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;
  bit   done [NS];

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  for (genvar s = 0; s < NS; s++) begin : g_size
    localparam int N = SIZES[s];
    localparam int W = 2 * N + 1;
    logic [N-1:0] din, dout, raw;
    logic [W-1:0] flip, bus;
    logic [0:0]   syn, det;

    bsc_link_top #(.DATA_W(N), .SUB_W(N)) u_link (
      .clk(clk), .rst_n(rst_n), .data_in(din), .bus_flip(flip), .bus(bus),
      .data_out(dout), .syndrome(syn), .data_raw(raw), .err_detected(det)
    );

    initial begin
      word_t prev;
      int t = 0;
      din = '0;
      flip = '0;
      done[s] = 1'b0;
      chk($bits(bus) == code_width(N), $sformatf("N=%0d wire count %0d", N, $bits(bus)));
      wait (rst_n);
      for (int e = -1; e < W; e++)
        for (int rep = 0; rep < 2; rep++) begin
          automatic bit odd = (t % 2) == 1;
          automatic data_t d = data_t'({$urandom, $urandom});
          din = d[N-1:0];
          flip = '0;
          if (e >= 0) flip[e] = 1'b1;
          #1;
          chk(word_t'(bus) === encode(data_t'(din), N, odd),
              $sformatf("N=%0d cycle %0d bus", N, t));
          if (t > 0)
            chk(invalid_transitions(prev, word_t'(bus), W) == 0,
                $sformatf("N=%0d cycle %0d invalid transition", N, t));
          chk(dout === din, $sformatf("N=%0d cycle %0d error wire %0d: data_out", N, t, e));
          chk(det[0] === (e >= 0), $sformatf("N=%0d err_detected", N));
          prev = word_t'(bus);
          t++;
          @(negedge clk);
        end
      done[s] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
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
