// tb_beam_sim_top: end-to-end test of the four-channel beam signal simulator.
//
// The simulator runs with 16 bunches per turn, 1900-sample slots and a 2000-sample waveform,
// as in the default configuration, but with 4 turns in the tables so that the turn index wraps
// within the test. The testbench loads the tables through the load ports with a damped
// turn-by-turn oscillation: transverse x/y positions turned into the four channel factors
// 1 + (+/-x +/-y), and longitudinal offsets that advance (positive) and delay (negative) the
// bunches, with offsets 0, 50 and 100 for bunch 0 of the first turns and channel D of bunch 5
// skewed against the other channels. Every output sample of every channel is compared with
// round(pulse[(offset[c] + j) mod 2000] * factor[c] / 16384), where the
// pulse is recomputed here from the Gaussian-derivative formula. Also checked: the 3-cycle
// trigger-to-output latency, gap-free slots within a turn, trig_out/bunch_first/turn/bunch
// markers, the start and end addresses, and zero output between turns. In parallel, the direct
// computation path evaluates 2000 samples of four bunches from their parameters; each is
// compared with the pickup formula in real arithmetic.
//
// Mechanisms counted (each must happen): triggered turns, triggers ignored while busy, advance
// and delay offsets, per-channel offset skew, slots whose read wraps past the end of the period,
// turn-index wrap, continuous-mode turns started without a trigger, a waveform reload through
// the load port, and direct-computation samples.
`timescale 1ns/1ps
module tb_beam_sim_top;
  import sim_pkg::*;
  localparam int NB = 16, NT = 4, LEN = 1900, DEPTH = 2000, N = NB * NT;

  logic        clk = 1'b0, rst_n = 1'b0, trig_in = 1'b0, continuous = 1'b0;
  logic        wave_wr_en = 1'b0, phase_wr_en = 1'b0, amp_wr_en = 1'b0;
  logic [10:0] wave_wr_addr = '0;
  sample_t     wave_wr_data = '0;
  logic [5:0]  tbl_wr_addr = '0;
  off_vec_t    phase_wr_data = '0;
  amp_vec_t    amp_wr_data = '0;
  out_t [3:0]  dac_data;
  logic        dac_valid, trig_out, bunch_first, busy;
  logic [1:0]  turn_idx;
  logic [3:0]  bunch_idx;
  logic [3:0][10:0] start_addr, end_addr;
  logic        bc_valid = 1'b0, bc_out_valid;
  logic [15:0] bc_t = '0, bc_t0 = '0, bc_amp = '0;
  logic [9:0]  bc_sigma = 10'd50;
  logic [11:0] bc_a = '0, bc_delta = '0;
  logic signed [15:0] bc_cos_theta = '0, bc_bpm;

  beam_sim_top #(.NT(NT)) dut (
    .clk, .rst_n, .trig_in, .continuous,
    .wave_wr_en, .wave_wr_addr, .wave_wr_data,
    .tbl_wr_addr, .phase_wr_en, .phase_wr_data, .amp_wr_en, .amp_wr_data,
    .dac_data, .dac_valid, .trig_out, .bunch_first, .busy, .turn_idx, .bunch_idx,
    .start_addr, .end_addr,
    .bc_valid, .bc_t, .bc_t0, .bc_sigma, .bc_amp, .bc_a, .bc_delta, .bc_cos_theta,
    .bc_out_valid, .bc_bpm
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_turns = 0, n_ignored = 0, n_advance = 0, n_delay = 0, n_wrap_read = 0;
  int n_turn_wrap = 0, n_chained = 0, n_reload = 0, n_direct = 0, n_skew = 0;

  int      wave_ref [DEPTH];
  int      off_ref [N][4];
  int      fac_ref [N][4];

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int pulse(int n, int center, int sigma, int peak);
    real d, v;
    d = real'(n - center);
    v = peak * (d / sigma) * $exp(0.5 - d * d / (2.0 * sigma * sigma));
    if (v >= 0) return int'($floor(v + 0.5));
    return -int'($floor(-v + 0.5));
  endfunction

  function automatic int scale(int s, int f);
    longint p = longint'(s) * longint'(f) + 8192;
    longint q = p / 16384;
    if (p < 0 && q * 16384 != p) q -= 1;
    return int'(q);
  endfunction

  // ---------------- output checker ----------------
  int  cyc = 0, edge_cyc = -1, last_turn_cyc = -1;
  int  e_t = 0, e_b = 0, e_j = 0;   // expected position in the output stream
  bit  trig_q = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (trig_in && !trig_q) begin
        if (busy) n_ignored++;
        else edge_cyc = cyc;
      end
      trig_q = trig_in;
      if (dac_valid) begin
        automatic int idx = e_t * NB + e_b;
        for (int c = 0; c < 4; c++) begin
          automatic int s = off_ref[idx][c] < 0 ? off_ref[idx][c] + DEPTH : off_ref[idx][c];
          automatic int a = (s + e_j) % DEPTH;
          chk(int'(dac_data[c]) == scale(wave_ref[a], fac_ref[idx][c]),
              $sformatf("turn %0d bunch %0d sample %0d ch %0d: %0d vs %0d", e_t, e_b, e_j, c,
                        dac_data[c], scale(wave_ref[a], fac_ref[idx][c])));
          chk(int'(start_addr[c]) == s && int'(end_addr[c]) == (s + LEN) % DEPTH,
              "start/end address");
          if (e_j == 0) begin
            if (off_ref[idx][c] > 0) n_advance++;
            if (off_ref[idx][c] < 0) n_delay++;
            if (s + LEN > DEPTH) n_wrap_read++;
            if (c > 0 && off_ref[idx][c] != off_ref[idx][0]) n_skew++;
          end
        end
        chk(bunch_first == (e_j == 0), "bunch_first");
        chk(trig_out == (e_j == 0 && e_b == 0), "trig_out");
        chk(int'(turn_idx) == e_t && int'(bunch_idx) == e_b, "turn/bunch index");
        if (e_j == 0 && e_b == 0) begin
          n_turns++;
          if (edge_cyc >= 0) begin
            chk(cyc - edge_cyc == 3, $sformatf("trigger to output latency %0d", cyc - edge_cyc));
            edge_cyc = -1;
          end else begin
            chk(last_turn_cyc >= 0 && cyc - last_turn_cyc == NB * LEN, "chained turn spacing");
            n_chained++;
          end
          last_turn_cyc = cyc;
        end
        e_j++;
        if (e_j == LEN) begin
          e_j = 0;
          e_b++;
          if (e_b == NB) begin
            e_b = 0;
            e_t++;
            if (e_t == NT) begin e_t = 0; n_turn_wrap++; end
          end
        end
      end else begin
        chk(e_j == 0 && e_b == 0, "gap inside a turn");
        chk(dac_data == '0 && !trig_out, "quiet output between turns");
      end
    end
  end

  // ---------------- direct computation path ----------------
  // Reference: amp * dt * G * exp(-dt^2 / 2 sigma^2) / sigma^3 * 2^12, clipped to 16 bits.
  real bc_ref [$];
  real bc_tol [$];

  function automatic real bc_model(int tt, int tt0, int s, int am, int aa, int dd, int c, bit ex);
    real dtr, g, den;
    dtr = real'(tt - tt0);
    if (dd >= aa) return 0.0;
    den = real'(aa * aa + dd * dd) - 2.0 * aa * dd * (real'(c) / 16384.0);
    if (den < 1.0) den = 1.0;
    g = real'(aa * aa - dd * dd) / den;
    return 4096.0 * am * dtr * g * (ex ? $exp(-dtr * dtr / (2.0 * s * s)) : 1.0) /
           (real'(s) * s * s);
  endfunction

  always @(posedge clk) begin
    if (rst_n && bc_valid) begin
      automatic real m = bc_model(int'(bc_t), int'(bc_t0), int'(bc_sigma), int'(bc_amp),
                                  int'(bc_a), int'(bc_delta), int'(bc_cos_theta), 1'b0);
      bc_ref.push_back(bc_model(int'(bc_t), int'(bc_t0), int'(bc_sigma), int'(bc_amp),
                                int'(bc_a), int'(bc_delta), int'(bc_cos_theta), 1'b1));
      bc_tol.push_back(2.0 + (m < 0.0 ? -m : m) / 65536.0);
    end
    if (rst_n && bc_out_valid) begin
      automatic real r = bc_ref.pop_front();
      automatic real tl = bc_tol.pop_front();
      automatic real rc = r > 32767.0 ? 32767.0 : (r < -32768.0 ? -32768.0 : r);
      automatic real err = real'(bc_bpm) - rc;
      if (err < 0.0) err = -err;
      chk(err <= tl + 0.002 * (rc < 0.0 ? -rc : rc),
          $sformatf("direct sample %0d vs %f", bc_bpm, rc));
      n_direct++;
    end
  end

  // A train of bunches passing an off-axis position, evaluated per sample while the playback
  // path runs its first turns.
  initial begin
    @(posedge rst_n);
    repeat (10) @(negedge clk);
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < 500; i++) begin
        @(negedge clk);
        bc_valid     = 1'b1;
        bc_t         = 16'(b * 500 + i);
        bc_t0        = 16'(b * 500 + 250);
        bc_sigma     = 10'(40 + 10 * b);
        bc_amp       = 16'(20000 + 3000 * b);
        bc_a         = 12'd1000;
        bc_delta     = 12'(100 * b);
        bc_cos_theta = 16'(int'(16384.0 * $cos(0.9 * b)));
      end
    end
    @(negedge clk) bc_valid = 1'b0;
  end

  // ---------------- stimulus ----------------
  task automatic load_tables();
    for (int t = 0; t < NT; t++) begin
      for (int b = 0; b < NB; b++) begin
        automatic int i = t * NB + b;
        automatic real turn = real'(t) + real'(b) / NB;
        automatic real x = 0.6 * $exp(-turn / 3.0) * $cos(2.0 * 3.14159265 * 0.23 * turn);
        automatic real y = 0.2 * $exp(-turn / 3.0) * $sin(2.0 * 3.14159265 * 0.19 * turn + 0.5);
        automatic int sx[4] = '{1, 1, -1, -1};
        automatic int sy[4] = '{1, -1, -1, 1};
        // longitudinal: bunch 0 steps 0, 50, 100, ...; others follow an oscillation
        // channel D of bunch 5 carries a fixed 7 ps skew against the other three
        off_ref[i][0] = (b == 0) ? 50 * t : int'($rtoi(120.0 * $sin(0.7 * b + 1.3 * t)));
        for (int c = 1; c < 4; c++) off_ref[i][c] = off_ref[i][0];
        if (b == 5) off_ref[i][3] = off_ref[i][0] - 7;
        for (int c = 0; c < 4; c++)
          fac_ref[i][c] = int'($rtoi(16384.0 * (1.0 + sx[c] * x + sy[c] * y) + 0.5));
        @(negedge clk);
        tbl_wr_addr   = 6'(i);
        phase_wr_en   = 1'b1;
        phase_wr_data = '{12'(off_ref[i][3]), 12'(off_ref[i][2]), 12'(off_ref[i][1]),
                          12'(off_ref[i][0])};
        amp_wr_en     = 1'b1;
        amp_wr_data   = '{16'(fac_ref[i][3]), 16'(fac_ref[i][2]), 16'(fac_ref[i][1]),
                          16'(fac_ref[i][0])};
      end
    end
    @(negedge clk);
    phase_wr_en = 1'b0;
    amp_wr_en   = 1'b0;
  endtask

  task automatic trigger();
    @(negedge clk) trig_in = 1'b1;
    repeat (4) @(negedge clk);
    trig_in = 1'b0;
  endtask

  task automatic wait_idle();
    do @(negedge clk); while (busy || dac_valid || e_j != 0 || e_b != 0);
    repeat (5) @(negedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int i = 0; i < DEPTH; i++) wave_ref[i] = pulse(i, 1000, 50, 30000);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_tables();
    // single-trigger turns, across the turn wrap; a second trigger mid-turn is ignored
    for (int k = 0; k < NT + 1; k++) begin
      trigger();
      if (k == 1) begin
        repeat (5000) @(negedge clk);
        trigger();
      end
      wait_idle();
    end
    // replace the stored pulse: wider, opposite polarity, then play a turn
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wave_ref[i]  = pulse(i, 900, 80, -20000);
      wave_wr_en   = 1'b1;
      wave_wr_addr = 11'(i);
      wave_wr_data = 16'(wave_ref[i]);
    end
    @(negedge clk) wave_wr_en = 1'b0;
    n_reload++;
    trigger();
    wait_idle();
    // continuous train: 3 turns follow the trigger without a gap, then the mode is left
    @(negedge clk) continuous = 1'b1;
    t0 = n_turns;
    trigger();
    while (n_turns < t0 + 3) @(negedge clk);
    continuous = 1'b0;
    wait_idle();
    $display("turns %0d ignored triggers %0d advances %0d delays %0d wrapped reads %0d",
             n_turns, n_ignored, n_advance, n_delay, n_wrap_read);
    $display("turn wraps %0d chained turns %0d waveform reloads %0d direct samples %0d skews %0d",
             n_turn_wrap, n_chained, n_reload, n_direct, n_skew);
    chk(n_turns > 0, "triggered turns happened");
    chk(n_ignored > 0, "ignored trigger happened");
    chk(n_advance > 0, "advance offsets happened");
    chk(n_delay > 0, "delay offsets happened");
    chk(n_wrap_read > 0, "wrapped reads happened");
    chk(n_turn_wrap > 0, "turn wrap happened");
    chk(n_chained >= 2, "continuous turns happened");
    chk(n_reload > 0, "waveform reload happened");
    chk(n_skew > 0, "per-channel offsets happened");
    chk(n_direct == 2000 && bc_ref.size() == 0, "direct computation samples all came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
