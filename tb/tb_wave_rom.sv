// tb_wave_rom: checks the waveform memory's start-up contents, read latency and write port.
//
// The start-up contents are compared with the button-pickup pulse recomputed here from the
// Gaussian-derivative formula, written out independently of the package function. Then random
// words are written and read back, and the neighbours of each written word are checked to be
// untouched. Every read is checked one clock after its address is applied.
`timescale 1ns/1ps
module tb_wave_rom;
  localparam int DEPTH = 2000;
  localparam int CENTER = 1000, SIGMA = 50, PEAK = 30000;

  logic               clk = 1'b0;
  logic [10:0]        rd_addr, wr_addr;
  logic signed [15:0] rd_data, wr_data;
  logic               wr_en;
  int checks = 0, failures = 0;
  logic signed [15:0] shadow [DEPTH];

  wave_rom dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  function automatic int model(int n);
    real d, v;
    d = real'(n - CENTER);
    v = PEAK * (d / SIGMA) * $exp(0.5 - d * d / (2.0 * SIGMA * SIGMA));
    if (v >= 0) return int'($floor(v + 0.5));
    return -int'($floor(-v + 0.5));
  endfunction

  task automatic check_read(int a);
    rd_addr <= 11'(a);
    @(posedge clk);
    #1;
    checks++;
    if (rd_data !== shadow[a]) begin
      failures++;
      $display("FAIL addr %0d: got %0d expected %0d", a, rd_data, shadow[a]);
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
    int a, peak_pos, peak_neg;
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int i = 0; i < DEPTH; i++) shadow[i] = 16'(model(i));
    // shape sanity of the reference itself: bipolar, extremes one sigma either side of centre
    peak_pos = 0; peak_neg = 0;
    for (int i = 1; i < DEPTH; i++) begin
      if (shadow[i] > shadow[peak_pos]) peak_pos = i;
      if (shadow[i] < shadow[peak_neg]) peak_neg = i;
    end
    checks++;
    if (peak_pos != CENTER + SIGMA || peak_neg != CENTER - SIGMA || shadow[peak_pos] != PEAK) begin
      failures++;
      $display("FAIL reference pulse extremes at %0d/%0d", peak_pos, peak_neg);
    end
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) check_read(i);
    // latency: the value one cycle after the address, not the same cycle
    rd_addr <= 11'(CENTER + SIGMA);
    @(posedge clk);
    rd_addr <= 11'(CENTER - SIGMA);
    #1;
    checks++;
    if (rd_data !== 16'(PEAK)) begin failures++; $display("FAIL latency"); end
    @(posedge clk);
    #1;
    checks++;
    if (rd_data !== -16'(PEAK)) begin failures++; $display("FAIL latency 2"); end
    // writes
    for (int k = 0; k < 200; k++) begin
      a = $urandom_range(DEPTH - 1);
      wr_en <= 1; wr_addr <= 11'(a); wr_data <= 16'($urandom);
      @(posedge clk);
      shadow[a] = wr_data;
      wr_en <= 0;
      check_read(a);
      if (a > 0) check_read(a - 1);
      if (a < DEPTH - 1) check_read(a + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
