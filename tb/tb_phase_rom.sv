// tb_phase_rom: checks the offset table's start-up contents (all zero), its one-clock read
// latency, the packing of the four channel offsets, and that writes land at the right entry and
// nowhere else. A shadow array kept here is the reference.
`timescale 1ns/1ps
module tb_phase_rom;
  import sim_pkg::*;
  localparam int DEPTH = 512;

  logic               clk = 1'b0;
  logic [8:0]         rd_addr, wr_addr;
  off_vec_t           rd_data, wr_data;
  logic               wr_en;
  int checks = 0, failures = 0;
  logic [47:0]        shadow [DEPTH];

  phase_rom #(.DEPTH(DEPTH)) dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  task automatic check_read(int a);
    rd_addr <= 9'(a);
    @(posedge clk);
    #1;
    checks++;
    if (48'(rd_data) !== shadow[a]) begin
      failures++;
      $display("FAIL entry %0d: got %h expected %h", a, rd_data, shadow[a]);
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
    int a;
    wr_en = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int i = 0; i < DEPTH; i++) shadow[i] = '0;
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) check_read(i);
    // fill with distinct signed values, then read everything back
    for (int i = 0; i < DEPTH; i++) begin
      wr_en <= 1; wr_addr <= 9'(i);
      wr_data <= '{12'(i * 7 - 1500), 12'(1500 - i), 12'(i), 12'(-i)};
      shadow[i] = {12'(i * 7 - 1500), 12'(1500 - i), 12'(i), 12'(-i)};
      @(posedge clk);
    end
    wr_en <= 0;
    for (int i = 0; i < DEPTH; i++) check_read(i);
    // channel packing: channel A in the lowest 12 bits, values signed
    check_read(4);
    checks++;
    if (rd_data[0] !== 12'(-4) || rd_data[1] !== 12'(4) || $signed(rd_data[0]) >= 0) begin
      failures++; $display("FAIL channel packing %h", rd_data);
    end
    // random rewrites with neighbour checks
    for (int k = 0; k < 200; k++) begin
      a = $urandom_range(DEPTH - 1);
      wr_en <= 1; wr_addr <= 9'(a); wr_data <= off_vec_t'({$urandom, $urandom});
      @(posedge clk);
      shadow[a] = 48'(wr_data);
      wr_en <= 0;
      check_read(a);
      check_read((a + 1) % DEPTH);
      check_read((a + DEPTH - 1) % DEPTH);
    end
    // latency: address changes every cycle, data follows one cycle later
    rd_addr <= 9'd3;
    @(posedge clk);
    rd_addr <= 9'd4;
    #1;
    checks++;
    if (48'(rd_data) !== shadow[3]) begin failures++; $display("FAIL latency"); end
    @(posedge clk);
    #1;
    checks++;
    if (48'(rd_data) !== shadow[4]) begin failures++; $display("FAIL latency 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
