// Self-checking test of the boundary shift encoder.
//  - the four-word example of the code (inputs 1010, 0111, 1000, 0100 in
//    cycles 0..3, even/odd/even/odd) against its printed outputs;
//  - random words against the reference model for N = 4 and N = 8;
//  - the code properties on the encoder's own output: no invalid transition
//    between consecutive words, data on the odd wires, and a minimum Hamming
//    distance of 3 between all codewords of one phase (N = 4, exhaustive).
// One new word is applied per clock and must appear in the same cycle.
module tb_bsc_encoder;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [3:0] d4;
  logic [8:0] c4;
  logic [7:0] d8;
  logic [16:0] c8;
  phase_e     ph4, ph8;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsc_encoder dut4 (.clk(clk), .rst_n(rst_n), .data(d4), .code(c4), .phase(ph4));
  bsc_encoder #(.N(8)) dut8 (.clk(clk), .rst_n(rst_n), .data(d8), .code(c8), .phase(ph8));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [3:0] ex_in  [4] = '{4'b1010, 4'b0111, 4'b1000, 4'b0100};
  logic [8:0] ex_out [4] = '{9'b110011000, 9'b100111111, 9'b110000001, 9'b100110000};
  logic [8:0] cw_even [16];
  logic [8:0] cw_odd  [16];

  initial begin
    word_t prev4, prev8;
    int t;
    d4 = '0; d8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Cycle 0 is the first cycle after reset release.
    for (t = 0; t < 4; t++) begin
      d4 = ex_in[t];
      #1;
      chk(c4 === ex_out[t], $sformatf("example cycle %0d: %b expected %b", t, c4, ex_out[t]));
      chk(ph4 == ((t % 2) ? PH_ODD : PH_EVEN), $sformatf("phase cycle %0d", t));
      if (t > 0) chk(invalid_transitions(prev4, word_t'(c4), 9) == 0, "example transition");
      prev4 = word_t'(c4);
      prev8 = word_t'(c8);
      @(negedge clk);
    end
    // Exhaustive per phase for N=4, random for N=8.
    for (; t < 4 + 64; t++) begin
      automatic bit odd = (t % 2) == 1;
      d4 = 4'((t - 4) / 2 % 16);
      d8 = 8'($urandom);
      #1;
      chk(word_t'(c4) === encode(data_t'(d4), 4, odd), $sformatf("N=4 cycle %0d data %b", t, d4));
      chk(word_t'(c8) === encode(data_t'(d8), 8, odd), $sformatf("N=8 cycle %0d data %b", t, d8));
      for (int i = 0; i < 4; i++) chk(c4[2*i+1] === d4[i], "N=4 systematic bit");
      chk(invalid_transitions(prev4, word_t'(c4), 9) == 0, $sformatf("N=4 invalid transition cycle %0d", t));
      chk(invalid_transitions(prev8, word_t'(c8), 17) == 0, $sformatf("N=8 invalid transition cycle %0d", t));
      if (odd) cw_odd[d4] = c4; else cw_even[d4] = c4;
      prev4 = word_t'(c4);
      prev8 = word_t'(c8);
      @(negedge clk);
    end
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++) begin
        chk(hamming(word_t'(cw_even[a]), word_t'(cw_even[b])) >= 3, "even distance");
        chk(hamming(word_t'(cw_odd[a]), word_t'(cw_odd[b])) >= 3, "odd distance");
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
