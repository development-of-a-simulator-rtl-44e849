// tb_align_delay: checks that the alignment shift register delays its input by exactly N clocks
// (N = 5 and N = 0), for a new random value every clock, and clears on reset.
`timescale 1ns/1ps
module tb_align_delay;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [11:0] d = '0, q5, q0;
  logic [11:0] hist [$];
  int checks = 0, failures = 0;

  align_delay #(.W(12), .N(5)) dut5 (.clk, .rst_n, .d, .q(q5));
  align_delay #(.W(12), .N(0)) dut0 (.clk, .rst_n, .d, .q(q0));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (q5 !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    rst_n = 1'b1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      d = 12'($urandom);
      hist.push_front(d);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("FAIL N=0 path"); end
      if (k >= 5) begin
        checks++;
        if (q5 !== hist[5]) begin failures++; $display("FAIL delay at %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
