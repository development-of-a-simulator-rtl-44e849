// tb_amp_rom: checks the factor table's start-up contents (every factor 1.0, code 16384), its
// one-clock read latency and the packing of the four channels, and that writes land at the
// right entry and nowhere else. A shadow array kept here is the reference.
`timescale 1ns/1ps
module tb_amp_rom;
  import sim_pkg::*;
  localparam int DEPTH = 512;

  logic       clk = 1'b0;
  logic [8:0] rd_addr, wr_addr;
  amp_vec_t   rd_data, wr_data;
  logic       wr_en;
  int checks = 0, failures = 0;
  logic [63:0] shadow [DEPTH];

  amp_rom #(.DEPTH(DEPTH)) dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  task automatic check_read(int a);
    rd_addr <= 9'(a);
    @(posedge clk);
    #1;
    checks++;
    if (64'(rd_data) !== shadow[a]) begin
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
    logic [63:0] w;
    wr_en = 0; wr_addr = 0; wr_data = '0; rd_addr = 0;
    for (int i = 0; i < DEPTH; i++) shadow[i] = {4{16'h4000}};
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) check_read(i);
    // channel packing: A in the lowest 16 bits
    wr_en <= 1; wr_addr <= 9'd10;
    wr_data <= '{16'hD000, 16'hC000, 16'hB000, 16'hA000};
    shadow[10] = 64'hD000_C000_B000_A000;
    @(posedge clk);
    wr_en <= 0;
    rd_addr <= 9'd10;
    @(posedge clk);
    #1;
    checks++;
    if (rd_data[0] !== 16'hA000 || rd_data[3] !== 16'hD000) begin
      failures++; $display("FAIL channel order %h", rd_data);
    end
    for (int k = 0; k < 300; k++) begin
      a = $urandom_range(DEPTH - 1);
      w = {$urandom, $urandom};
      wr_en <= 1; wr_addr <= 9'(a); wr_data <= amp_vec_t'(w);
      @(posedge clk);
      shadow[a] = w;
      wr_en <= 0;
      check_read(a);
      check_read((a + 1) % DEPTH);
      check_read((a + DEPTH - 1) % DEPTH);
    end
    for (int i = 0; i < DEPTH; i++) check_read(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
