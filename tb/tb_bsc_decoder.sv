// Self-checking test of the boundary shift decoder (N = 4).
//  - the four noisy words of the worked example: three with one wire error
//    are corrected, the fourth has two errors and decodes to 1100 instead of
//    0100, as the example states (its words are given un-rotated, so odd
//    cycles apply the rotation before driving the bus);
//  - every data word, in both phases, with no error and with each single
//    wire error: data_out must equal the sent word and syndrome must be the
//    parity of the errors on the wires the decoder checks (wires 0,2,..,8 in
//    even cycles; wires 8,0,2,4,6 in odd cycles);
//  - a second decoder at N = 16 with random words and random single errors.
module tb_bsc_decoder;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [8:0]  code4;
  logic [3:0]  dout4;
  logic        syn4;
  phase_e      ph4;
  logic [32:0] code16;
  logic [15:0] dout16;
  logic        syn16;
  phase_e      ph16;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsc_decoder dut4 (.clk(clk), .rst_n(rst_n), .code_in(code4), .data_out(dout4),
                    .syndrome(syn4), .phase(ph4));
  bsc_decoder #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .code_in(code16),
                               .data_out(dout16), .syndrome(syn16), .phase(ph16));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit exp_syndrome(input word_t err, input int n, input bit odd);
    bit s = 1'b0;
    if (!odd) begin
      for (int i = 0; i <= n; i++) s ^= err[2*i];
    end else begin
      s = err[2*n];
      for (int i = 0; i < n; i++) s ^= err[2*i];
    end
    return s;
  endfunction

  logic [8:0] ex_noisy [4] = '{9'b100011000, 9'b001111110, 9'b010000001, 9'b011100000};
  logic [3:0] ex_dec   [4] = '{4'b1010, 4'b0111, 4'b1000, 4'b1100};

  initial begin
    int t;
    code4 = '0; code16 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (t = 0; t < 4; t++) begin
      automatic bit odd = (t % 2) == 1;
      code4 = odd ? 9'(rotr(word_t'(ex_noisy[t]), 9)) : ex_noisy[t];
      #1;
      chk(dout4 === ex_dec[t], $sformatf("example cycle %0d: %b expected %b", t, dout4, ex_dec[t]));
      chk(ph4 == (odd ? PH_ODD : PH_EVEN), "phase");
      @(negedge clk);
    end
    // 16 data words x 10 error patterns (none, each of 9 wires), each pattern
    // in an even and an odd cycle.
    for (int d = 0; d < 16; d++)
      for (int e = -1; e < 9; e++)
        for (int rep = 0; rep < 2; rep++) begin
          automatic bit    odd = (t % 2) == 1;
          automatic word_t err = '0;
          automatic word_t err16 = '0;
          automatic data_t r16 = data_t'({$urandom, $urandom});
          if (e >= 0) err[e] = 1'b1;
          err16[$urandom_range(32, 0)] = 1'b1;
          code4  = 9'(encode(data_t'(d), 4, odd) ^ err);
          code16 = 33'(encode(r16, 16, odd) ^ err16);
          #1;
          chk(dout4 === 4'(d), $sformatf("N=4 cycle %0d data %0d err wire %0d: got %b", t, d, e, dout4));
          chk(syn4 === exp_syndrome(err, 4, odd), $sformatf("N=4 syndrome data %0d err wire %0d", d, e));
          chk(dout16 === r16[15:0], $sformatf("N=16 cycle %0d: got %h expected %h", t, dout16, r16[15:0]));
          chk(syn16 === exp_syndrome(err16, 16, odd), "N=16 syndrome");
          t++;
          @(negedge clk);
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
