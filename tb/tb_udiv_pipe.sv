// tb_udiv_pipe: checks the pipelined divider against integer division, one operation per clock.
//
// A 20-bit by 10-bit divider with a 12-bit quotient is fed random operands every clock,
// including zero divisors and quotients too large for 12 bits (both must give all ones). Each
// result must equal min(num / den, 4095) and arrive exactly QW + 1 = 13 clocks after its input.
`timescale 1ns/1ps
module tb_udiv_pipe;
  localparam int NW = 20, DW = 10, QW = 12, LAT = QW + 1;

  logic          clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [NW-1:0] num = '0;
  logic [DW-1:0] den = '0;
  logic          out_valid;
  logic [QW-1:0] q;
  int checks = 0, failures = 0, n_sat = 0, cyc = 0;
  int exp_q [$];
  int when_q [$];

  udiv_pipe #(.NW(NW), .DW(DW), .QW(QW)) dut (.clk, .rst_n, .in_valid, .num, .den, .out_valid, .q);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      automatic int e = (den == 0) ? 4095 : int'(num) / int'(den);
      if (e > 4095) begin e = 4095; n_sat++; end
      exp_q.push_back(e);
      when_q.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      automatic int e = exp_q.pop_front();
      automatic int w = when_q.pop_front();
      checks++;
      if (int'(q) != e || cyc - w != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL q %0d expected %0d after %0d clocks", q, e, cyc - w);
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
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(9) != 0);
      num = NW'($urandom);
      den = (k % 97 == 0) ? '0 : DW'($urandom_range(1 << DW - 1));
      if (k % 5 == 0) den = DW'($urandom_range(3) + 1);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_sat == 0) begin
      failures++; $display("FAIL %0d results missing, %0d saturations", exp_q.size(), n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
