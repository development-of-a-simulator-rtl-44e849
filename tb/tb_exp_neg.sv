// tb_exp_neg: checks the fixed-point e^(-w) against the real exponential.
//
// Every input from 0 to 16 in steps of 1/256 plus random inputs with all 16 fraction bits, and
// inputs of 16 and above (which must give 0), are applied one per clock. Each result must be
// within one output step (1/65536) of round(65536 * e^(-w)) and arrive 3 clocks after its input.
`timescale 1ns/1ps
module tb_exp_neg;
  localparam int LAT = 3;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [20:0] w = '0;
  logic        out_valid;
  logic [16:0] e;
  int checks = 0, failures = 0, cyc = 0;
  int exp_q [$];
  int when_q [$];

  exp_neg dut (.clk, .rst_n, .in_valid, .w, .out_valid, .e);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      exp_q.push_back(w[20] ? 0 : int'($rtoi($exp(-real'(w) / 65536.0) * 65536.0 + 0.5)));
      when_q.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      automatic int x = exp_q.pop_front();
      automatic int t = when_q.pop_front();
      automatic int d = int'(e) - x;
      checks++;
      if (d > 1 || d < -1 || cyc - t != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL e %0d expected %0d after %0d clocks", e, x, cyc - t);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i <= 16 * 256; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      w = 21'(i * 256);
    end
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      w = (k % 50 == 0) ? 21'((1 << 20) + $urandom_range(1 << 20 - 1)) : 21'($urandom_range(1 << 20 - 1));
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
