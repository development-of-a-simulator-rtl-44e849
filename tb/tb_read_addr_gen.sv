// tb_read_addr_gen: checks the read address sequence of a bunch slot.
//
// For each offset the expected sequence is built here: start = offset modulo 2000, then
// LEN consecutive addresses wrapping at 2000, first on the first address, last on the final
// one, and the end address start + LEN modulo 2000. The start/end pairs 0/1900, 50/1950 and
// 100/0 are checked explicitly. Also checked: the slot length in cycles, a new start in the last
// cycle continuing without a gap, and the idle state after a slot.
`timescale 1ns/1ps
module tb_read_addr_gen;
  localparam int DEPTH = 2000;
  localparam int LEN = 1900;

  logic               clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [11:0] offset = '0;
  logic [10:0]        addr, start_addr, end_addr;
  logic               valid, first, last;
  int checks = 0, failures = 0;

  read_addr_gen dut (.clk, .rst_n, .start, .offset, .addr, .valid, .first, .last,
                     .start_addr, .end_addr);

  always #5 clk = ~clk;

  function automatic int fold(int off);
    int s = off % DEPTH;
    if (s < 0) s += DEPTH;
    return s;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Issue a start (start pulse in the current cycle), then follow the slot. If chain is set, a
  // new start with next_off is issued in the last cycle of this slot.
  task automatic run_slot(int off, int exp_end, bit chain, int next_off);
    int s = fold(off);
    offset <= 12'(off);
    start  <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1;
    chk(start_addr == 11'(s), $sformatf("start address for offset %0d", off));
    if (exp_end >= 0) chk(end_addr == 11'(exp_end), $sformatf("end address %0d", end_addr));
    chk(end_addr == 11'((s + LEN) % DEPTH), "end address formula");
    for (int j = 0; j < LEN; j++) begin
      chk(valid && addr == 11'((s + j) % DEPTH), $sformatf("addr %0d of slot at %0d", j, off));
      chk(first == (j == 0), "first flag");
      chk(last == (j == LEN - 1), "last flag");
      if (j == LEN - 1 && chain) begin
        offset <= 12'(next_off);
        start  <= 1'b1;
      end
      @(posedge clk);
      #1;
    end
    start <= 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    chk(!valid && !last, "idle after reset");
    @(negedge clk);
    run_slot(0, 1900, 0, 0);
    chk(!valid, "idle after slot");
    @(negedge clk);
    run_slot(50, 1950, 0, 0);
    @(negedge clk);
    run_slot(100, 0, 0, 0);
    @(negedge clk);
    // delays: negative offsets start before the end of the period
    run_slot(-30, -1, 0, 0);
    @(negedge clk);
    run_slot(1999, -1, 0, 0);
    @(negedge clk);
    run_slot(-2000, -1, 0, 0);
    @(negedge clk);
    // back-to-back slots: a start in the last cycle continues without a gap
    offset <= 12'(7);
    start  <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1;
    for (int j = 0; j < LEN; j++) begin
      chk(addr == 11'(7 + j), "chained slot 1");
      // one assignment per cycle: start is high only in the last cycle of the slot
      start  <= (j == LEN - 1);
      offset <= -12'sd5;
      @(posedge clk);
      #1;
    end
    start <= 1'b0;
    chk(valid && first && addr == 11'(DEPTH - 5), "chained slot 2 starts without gap");
    for (int j = 0; j < LEN; j++) begin
      chk(valid && addr == 11'((DEPTH - 5 + j) % DEPTH), "chained slot 2");
      @(posedge clk);
      #1;
    end
    chk(!valid, "idle after chained slots");
    // random offsets
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      run_slot($urandom_range(3998) - 1999, -1, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
