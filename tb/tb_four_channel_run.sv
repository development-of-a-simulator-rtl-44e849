// tb_four_channel_run: four-channel joint run of the simulator over 21 triggered turns.
//
// The simulator keeps every default (16 bunches per turn, 1900-sample slots, 2000-sample pulse,
// 8192-turn tables). The testbench loads 21 turns of a transverse oscillation in which every
// bunch has its own betatron phase. x and y are in units where k = 1, so the channel factors
// are 1 + (x + y), 1 + (x - y), 1 - (x + y) and 1 - (x - y). They reach about 1.9, which
// drives the outputs beyond the 16-bit range of the stored pulse. At the same time every bunch
// gets a longitudinal offset of up to +/-90 samples, the same on all four channels. Each turn is
// started by one trigger, and the testbench waits until the turn has ended.
//
// Checks:
// - every slot has exactly 1900 valid samples;
// - trig_out comes once per turn, and turn_idx counts 0..20;
// - the largest and smallest sample of every channel in every slot equal the stored pulse's
//   extremes scaled by that channel's factor (rounding included);
// - the largest sample sits at the position the offset moves it to: the first sample of the slot
//   that reaches the maximum of pulse[(offset + j) mod 2000] * factor;
// - the four-channel outputs are consistent with the position model: from each slot's four
//   peak amplitudes, difference-over-sum gives back the x and y that were loaded.
//
// Counted mechanisms (each must happen): triggered turns, outputs beyond 16 bits, bunches
// with x and y both nonzero, advanced and delayed bunches, and bunches whose position is
// recovered.
`timescale 1ns/1ps
module tb_four_channel_run;
  import sim_pkg::*;
  localparam int NB = 16, NL = 21, LEN = 1900;

  logic        clk = 1'b0, rst_n = 1'b0, trig_in = 1'b0, continuous = 1'b0;
  logic        wave_wr_en = 1'b0, phase_wr_en = 1'b0, amp_wr_en = 1'b0;
  logic [10:0] wave_wr_addr = '0;
  sample_t     wave_wr_data = '0;
  logic [16:0] tbl_wr_addr = '0;
  off_vec_t    phase_wr_data = '0;
  amp_vec_t    amp_wr_data = '0;
  out_t [3:0]  dac_data;
  logic        dac_valid, trig_out, bunch_first, busy;
  logic [12:0] turn_idx;
  logic [3:0]  bunch_idx;
  logic [3:0][10:0] start_addr, end_addr;
  logic        bc_out_valid;
  logic signed [15:0] bc_bpm;

  beam_sim_top dut (
    .clk, .rst_n, .trig_in, .continuous,
    .wave_wr_en, .wave_wr_addr, .wave_wr_data,
    .tbl_wr_addr, .phase_wr_en, .phase_wr_data, .amp_wr_en, .amp_wr_data,
    .dac_data, .dac_valid, .trig_out, .bunch_first, .busy, .turn_idx, .bunch_idx,
    .start_addr, .end_addr,
    .bc_valid(1'b0), .bc_t(16'd0), .bc_t0(16'd0), .bc_sigma(10'd50), .bc_amp(16'd0),
    .bc_a(12'd0), .bc_delta(12'd0), .bc_cos_theta(16'sd0),
    .bc_out_valid, .bc_bpm
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_turns = 0, n_wide = 0, n_xy = 0, n_recovered = 0, n_advance = 0, n_delay = 0;

  real x_ref [NL][NB], y_ref [NL][NB];
  int  fac_ref [NL][NB][4], off_ref [NL][NB];
  int  pk_max [NL][NB][4], pk_min [NL][NB][4], pk_pos [NL][NB][4], n_smp [NL][NB];
  int  wave [WAVE_DEPTH];
  int  w_max, w_min, j_out = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // pulse model of the simulator's start-up memory contents: centre 1000, sigma 50, peak 30000
  function automatic int pulse(int n);
    real d, v;
    d = real'(n - 1000);
    v = 30000.0 * (d / 50.0) * $exp(0.5 - d * d / 5000.0);
    if (v >= 0) return int'($floor(v + 0.5));
    return -int'($floor(-v + 0.5));
  endfunction

  function automatic int scale(int s, int f);
    longint p = longint'(s) * longint'(f) + 8192;
    longint q = p / 16384;
    if (p < 0 && q * 16384 != p) q -= 1;
    return int'(q);
  endfunction

  // ---------------- output monitor ----------------
  always @(posedge clk) begin
    if (rst_n && dac_valid) begin
      automatic int t = int'(turn_idx), b = int'(bunch_idx);
      automatic int j = bunch_first ? 0 : j_out + 1;
      j_out = j;
      if (t < NL) begin
        n_smp[t][b]++;
        for (int c = 0; c < 4; c++) begin
          if (int'(dac_data[c]) > pk_max[t][b][c]) begin
            pk_max[t][b][c] = int'(dac_data[c]);
            pk_pos[t][b][c] = j;
          end
          if (int'(dac_data[c]) < pk_min[t][b][c]) pk_min[t][b][c] = int'(dac_data[c]);
          if (int'(dac_data[c]) > 32767 || int'(dac_data[c]) < -32768) n_wide++;
        end
      end else begin
        chk(1'b0, "turn index beyond the loaded turns");
      end
      if (trig_out) begin
        chk(t == n_turns && b == 0, $sformatf("trig_out at turn %0d bunch %0d", t, b));
        n_turns++;
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    w_max = -100000; w_min = 100000;
    for (int i = 0; i < WAVE_DEPTH; i++) begin
      wave[i] = pulse(i);
      if (wave[i] > w_max) w_max = wave[i];
      if (wave[i] < w_min) w_min = wave[i];
    end
    for (int t = 0; t < NL; t++)
      for (int b = 0; b < NB; b++) begin
        x_ref[t][b] = 0.6 * $cos(6.2832 * 0.27 * t + 0.4 * b) * $exp(-t / 30.0);
        y_ref[t][b] = 0.3 * $sin(6.2832 * 0.19 * t + 0.3 * b + 0.2);
        fac_ref[t][b][0] = int'($rtoi((1.0 + x_ref[t][b] + y_ref[t][b]) * 16384.0 + 0.5));
        fac_ref[t][b][1] = int'($rtoi((1.0 + x_ref[t][b] - y_ref[t][b]) * 16384.0 + 0.5));
        fac_ref[t][b][2] = int'($rtoi((1.0 - x_ref[t][b] - y_ref[t][b]) * 16384.0 + 0.5));
        fac_ref[t][b][3] = int'($rtoi((1.0 - x_ref[t][b] + y_ref[t][b]) * 16384.0 + 0.5));
        off_ref[t][b] = int'($rtoi(90.0 * $sin(6.2832 * 0.11 * t + 0.5 * b)));
        if (off_ref[t][b] > 0) n_advance++;
        if (off_ref[t][b] < 0) n_delay++;
        n_smp[t][b] = 0;
        for (int c = 0; c < 4; c++) begin
          pk_max[t][b][c] = -1000000;
          pk_min[t][b][c] = 1000000;
        end
      end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < NL; t++)
      for (int b = 0; b < NB; b++) begin
        tbl_wr_addr <= 17'(t * NB + b);
        amp_wr_en   <= 1'b1;
        phase_wr_en <= 1'b1;
        amp_wr_data <= '{16'(fac_ref[t][b][3]), 16'(fac_ref[t][b][2]), 16'(fac_ref[t][b][1]),
                         16'(fac_ref[t][b][0])};
        phase_wr_data <= {4{12'(off_ref[t][b])}};
        @(posedge clk);
      end
    amp_wr_en   <= 1'b0;
    phase_wr_en <= 1'b0;
    repeat (4) @(posedge clk);

    for (int t = 0; t < NL; t++) begin
      trig_in <= 1'b1;
      repeat (2) @(posedge clk);
      trig_in <= 1'b0;
      @(posedge clk);
      while (busy) @(posedge clk);
      repeat (20) @(posedge clk);
    end

    // ---------------- evaluation ----------------
    for (int t = 0; t < NL; t++)
      for (int b = 0; b < NB; b++) begin
        automatic real a[4], sum, x_est, y_est;
        chk(n_smp[t][b] == LEN, $sformatf("turn %0d bunch %0d: %0d samples", t, b, n_smp[t][b]));
        for (int c = 0; c < 4; c++) begin
          chk(pk_max[t][b][c] == scale(w_max, fac_ref[t][b][c]) &&
              pk_min[t][b][c] == scale(w_min, fac_ref[t][b][c]),
              $sformatf("turn %0d bunch %0d ch %0d: peaks %0d/%0d", t, b, c,
                        pk_max[t][b][c], pk_min[t][b][c]));
          a[c] = real'(pk_max[t][b][c] - pk_min[t][b][c]);
          begin
            automatic int s = off_ref[t][b] < 0 ? off_ref[t][b] + WAVE_DEPTH : off_ref[t][b];
            automatic int best = -1000000, pos = -1;
            for (int j = 0; j < LEN; j++)
              if (scale(wave[(s + j) % WAVE_DEPTH], fac_ref[t][b][c]) > best) begin
                best = scale(wave[(s + j) % WAVE_DEPTH], fac_ref[t][b][c]);
                pos  = j;
              end
            chk(pk_pos[t][b][c] == pos, $sformatf("turn %0d bunch %0d ch %0d: peak at %0d not %0d",
                                                   t, b, c, pk_pos[t][b][c], pos));
          end
        end
        // difference over sum: (A + B - C - D) / sum = x and (A - B - C + D) / sum = y
        sum   = a[0] + a[1] + a[2] + a[3];
        x_est = (a[0] + a[1] - a[2] - a[3]) / sum;
        y_est = (a[0] - a[1] - a[2] + a[3]) / sum;
        if (x_est - x_ref[t][b] < 2.0e-4 && x_ref[t][b] - x_est < 2.0e-4 &&
            y_est - y_ref[t][b] < 2.0e-4 && y_ref[t][b] - y_est < 2.0e-4)
          n_recovered++;
        else
          chk(1'b0, $sformatf("turn %0d bunch %0d: x %f/%f y %f/%f", t, b, x_est, x_ref[t][b],
                              y_est, y_ref[t][b]));
        checks++;
        if (x_ref[t][b] != 0.0 && y_ref[t][b] != 0.0) n_xy++;
      end

    chk(n_turns == NL, $sformatf("%0d triggered turns", n_turns));
    chk(n_wide > 0, "outputs beyond 16 bits");
    chk(n_xy > 0, "bunches with x and y both nonzero");
    chk(n_advance > 0 && n_delay > 0, "advanced and delayed bunches");
    chk(n_recovered == NL * NB, "every bunch position recovered");
    $display("turns %0d wide samples %0d xy bunches %0d advances %0d delays %0d recovered %0d",
             n_turns, n_wide, n_xy, n_advance, n_delay, n_recovered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
