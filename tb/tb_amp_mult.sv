// tb_amp_mult: checks the channel multiplier against exact integer arithmetic.
//
// The reference is floor((sample * factor + 8192) / 16384), computed with 64-bit integers and
// an explicit floor for negative products. Corner cases (full-scale samples, factor 0, 1.0 and
// the largest factor) come first, then random operands. The output is checked one clock after
// the operands, and out_valid must follow in_valid with the same delay.
`timescale 1ns/1ps
module tb_amp_mult;
  logic               clk = 1'b0, rst_n = 1'b0;
  logic               in_valid = 1'b0;
  logic signed [15:0] sample = '0;
  logic [15:0]        factor = '0;
  logic               out_valid;
  logic signed [17:0] y;
  int checks = 0, failures = 0;

  amp_mult dut (.clk, .rst_n, .in_valid, .sample, .factor, .out_valid, .y);

  always #5 clk = ~clk;

  function automatic longint ref_y(int s, int f);
    longint p = longint'(s) * longint'(f) + 8192;
    longint q = p / 16384;
    if (p < 0 && q * 16384 != p) q -= 1;
    return q;
  endfunction

  task automatic apply(int s, int f, bit v);
    sample <= 16'(s); factor <= 16'(f); in_valid <= v;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== v || (v && longint'(y) != ref_y(s, f))) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d valid %b expected %0d", s, f, y, out_valid, ref_y(s, f));
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cs[6] = '{-32768, -1, 0, 1, 32767, -12345};
    int cf[6] = '{0, 1, 16384, 8192, 65535, 30000};
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    foreach (cs[i]) foreach (cf[j]) apply(cs[i], cf[j], 1'b1);
    apply(100, 16384, 1'b0);
    // halves: 3 * 8192 / 16384 = 1.5 -> 2, -3 * 8192 / 16384 = -1.5 -> -1
    apply(3, 8192, 1'b1);
    apply(-3, 8192, 1'b1);
    for (int k = 0; k < 3000; k++)
      apply(int'($signed(16'($urandom))), int'($urandom_range(65535)), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
