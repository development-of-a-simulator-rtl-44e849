// tb_burst_ctrl: checks trigger handling and bunch/turn sequencing of the burst controller.
//
// The controller runs with 4 bunches per turn, 3 turns and 5-sample slots. The testbench models
// the table (one-cycle read latency, distinct offsets and factors per entry) and the end of slot
// signal of the address generator, and keeps its own reference of which slot should start when:
// on a trigger edge while idle, and at the end of a slot while the turn has bunches left or
// continuous mode is on. Each slot start is checked for the right cycle, offset, factors,
// turn/bunch number and turn_start flag. Scenarios: single triggers across a turn wrap, a
// trigger held high, triggers while busy (ignored), and continuous mode switched on and off.
`timescale 1ns/1ps
module tb_burst_ctrl;
  import sim_pkg::*;
  localparam int NB = 4, NT = 3, LEN = 5, N = NB * NT;

  logic       clk = 1'b0, rst_n = 1'b0, trig_in = 1'b0, continuous = 1'b0;
  logic [3:0] tbl_addr;
  off_vec_t   tbl_offset;
  amp_vec_t   tbl_fac, fac;
  logic       slot_start, slot_last, turn_start, busy;
  off_vec_t   slot_offset;
  logic [1:0] turn;
  logic [1:0] bunch;

  int checks = 0, failures = 0;
  int starts = 0, ignored = 0, wraps = 0, chained_turns = 0;

  off_vec_t           off_tab [N];
  amp_vec_t           fac_tab [N];

  // address generator stand-in: slot_last in the LEN-th cycle after slot_start
  int  cnt = 0;
  bit  act = 0;
  assign slot_last = act && cnt == 0;

  burst_ctrl #(.NB(NB), .NT(NT)) dut (
    .clk, .rst_n, .trig_in, .continuous, .tbl_addr, .tbl_offset, .tbl_fac,
    .slot_start, .slot_offset, .slot_last, .fac, .turn_start, .busy, .turn, .bunch
  );

  always #5 clk = ~clk;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference state
  bit ref_busy = 0, trig_q = 0, pend = 0;
  int ref_b = 0, ref_t = 0, pend_idx = 0;

  always @(posedge clk) begin
    tbl_offset <= off_tab[tbl_addr];
    tbl_fac    <= fac_tab[tbl_addr];
    if (rst_n) begin
      automatic bit edge_ = trig_in && !trig_q;
      automatic bit exp_start = (!ref_busy && edge_) ||
                                (act && cnt == 0 && (ref_b != 0 || continuous));
      automatic int idx = ref_t * NB + ref_b;
      if (pend) begin
        chk(fac == fac_tab[pend_idx], "factors held for the slot");
        chk(int'(turn) == pend_idx / NB && int'(bunch) == pend_idx % NB, "turn/bunch of slot");
        chk(busy, "busy during slot");
      end
      pend = 0;
      if (edge_ && ref_busy) ignored++;
      chk(slot_start == exp_start, $sformatf("slot_start %b expected %b", slot_start, exp_start));
      if (exp_start) begin
        starts++;
        chk(slot_offset == off_tab[idx], "offset of slot");
        chk(turn_start == (ref_b == 0), "turn_start flag");
        if (ref_b == 0 && ref_busy) chained_turns++;
        pend = 1; pend_idx = idx;
        ref_busy = 1;
        ref_b++;
        if (ref_b == NB) begin
          ref_b = 0;
          ref_t++;
          if (ref_t == NT) begin ref_t = 0; wraps++; end
        end
      end else if (act && cnt == 0) begin
        ref_busy = 0;
      end
      trig_q = trig_in;
      if (slot_start) begin act <= 1; cnt <= LEN - 1; end
      else if (act) begin
        if (cnt == 0) act <= 0; else cnt <= cnt - 1;
      end
    end
  end

  task automatic pulse_trigger(int width);
    @(negedge clk) trig_in = 1'b1;
    repeat (width) @(negedge clk);
    trig_in = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s0;
    for (int i = 0; i < N; i++) begin
      off_tab[i] = '{12'(i * 37 - 200), 12'(5 - i), 12'(i), 12'(1000 + i)};
      fac_tab[i] = '{16'(16384 + i), 16'(16000 - i), 16'(i * 3), 16'(20000 + 5 * i)};
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    chk(!busy && !slot_start, "idle after reset");
    // single triggers: one turn per trigger, across the turn wrap
    for (int k = 0; k < NT + 2; k++) begin
      s0 = starts;
      pulse_trigger(1);
      if (k == 1) begin
        // a trigger in the middle of a slot while the turn is playing
        repeat (7) @(negedge clk);
        pulse_trigger(1);
      end
      repeat (NB * LEN + 3) @(negedge clk);
      chk(starts - s0 == NB, "one turn per trigger");
      chk(!busy, "idle after turn");
    end
    // trigger held high: only its rising edge counts; a second edge while busy is ignored
    s0 = starts;
    pulse_trigger(NB * LEN + 10);
    repeat (3) @(negedge clk);
    pulse_trigger(2);
    repeat (2) @(negedge clk);
    pulse_trigger(2);
    repeat (NB * LEN) @(negedge clk);
    chk(starts - s0 == 2 * NB, "held trigger counted once");
    // continuous mode: turns follow each other without a trigger
    @(negedge clk) continuous = 1'b1;
    s0 = starts;
    pulse_trigger(1);
    repeat (3 * NT * NB * LEN) @(negedge clk);
    chk(starts - s0 >= 3 * NT * NB, "continuous train keeps going");
    @(negedge clk) continuous = 1'b0;
    repeat (NB * LEN + 3) @(negedge clk);
    chk(!busy, "stops after continuous mode is left");
    chk(starts % NB == 0, "stops at a turn boundary");
    $display("slot starts %0d, ignored triggers %0d, turn wraps %0d, chained turns %0d",
             starts, ignored, wraps, chained_turns);
    chk(ignored >= 2 && wraps >= 3 && chained_turns >= 3 * NT, "every scenario exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
