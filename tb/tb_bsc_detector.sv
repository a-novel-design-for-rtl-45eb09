// Self-checking test of the detect-only receiver (N = 4): for every data word
// in both phases, no error must give err_detected = 0 and data_raw equal to
// the word; every one of the 9 single and 36 double wire errors must raise
// err_detected, with data_raw showing the raw odd wires.
module tb_bsc_detector;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [8:0] code;
  logic [3:0] raw;
  logic       err;
  phase_e     ph;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsc_detector dut (.clk(clk), .rst_n(rst_n), .code_in(code), .data_raw(raw),
                    .err_detected(err), .phase(ph));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int t = 0;
    code = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 16; d++)
      for (int a = -1; a < 9; a++)
        for (int b = a; b < 9; b++) begin
          // b == a stands for "only wire a in error" (or no error for a = -1).
          automatic bit    odd = (t % 2) == 1;
          automatic word_t e = '0;
          word_t w;
          logic [3:0] exp_raw;
          if (a >= 0) e[a] = 1'b1;
          if (b > a) e[b] = 1'b1;
          if (a < 0 && b > a) continue;
          w = encode(data_t'(d), 4, odd) ^ e;
          code = 9'(w);
          for (int i = 0; i < 4; i++) exp_raw[i] = w[2*i+1];
          #1;
          chk(err === (e != '0), $sformatf("cycle %0d data %0d errors %0d/%0d: err=%b", t, d, a, b, err));
          chk(raw === exp_raw, $sformatf("data_raw cycle %0d", t));
          if (e == '0) chk(raw === 4'(d), "clean data_raw");
          t++;
          @(negedge clk);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
