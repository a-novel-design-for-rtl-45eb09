// Self-checking test of the phase flip-flop: even during and right after
// reset, then alternating every clock; a second reset restarts at even.
module tb_bsc_phase_toggle;
  import bsc_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  phase_e phase;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  bsc_phase_toggle dut (.clk(clk), .rst_n(rst_n), .phase(phase));

  task automatic check(input phase_e exp, input string what);
    checks++;
    if (phase !== exp) begin
      failures++;
      $display("FAIL %s: phase=%0d expected %0d", what, phase, exp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(PH_EVEN, "in reset");
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      check((t % 2) ? PH_ODD : PH_EVEN, $sformatf("cycle %0d", t));
      @(negedge clk);
    end
    // Asynchronous reset in the middle of an odd cycle.
    @(negedge clk);
    if (phase == PH_EVEN) @(negedge clk);
    check(PH_ODD, "before second reset");
    #2 rst_n = 1'b0;
    #1 check(PH_EVEN, "async reset");
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      check((t % 2) ? PH_ODD : PH_EVEN, $sformatf("after reset %0d", t));
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
