// tb_bunch_calc: checks the bunch-parameter pipeline against the pickup formula in real
// arithmetic.
//
// A new random parameter set enters every clock (full throughput). The reference is
// amp * dt * G * exp(-dt^2 / 2 sigma^2) / sigma^3 * 2^12, rounded and clipped to 16 bits, with
// G = (a^2 - delta^2) / (a^2 + delta^2 - 2 a delta cos(theta)) and 0 for delta >= a; results
// must agree within 2 codes plus 0.2 % plus one step of the 16-fraction-bit exponential. Directed cases cover the pulse centre (dt = 0), both
// polarities, an off-axis bunch facing and opposite the button, saturation, and a sweep of t
// across one bunch that must reproduce the bipolar pulse with its extremes at dt = +/- sigma.
// The latency must be exactly 38 clocks.
`timescale 1ns/1ps
module tb_bunch_calc;
  localparam int LAT = 38;

  logic               clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [15:0]        t = '0, t0 = '0, amp = '0;
  logic [9:0]         sigma = 10'd50;
  logic [11:0]        a = '0, delta = '0;
  logic signed [15:0] cos_theta = '0;
  logic               out_valid;
  logic signed [15:0] bpm;

  bunch_calc dut (.clk, .rst_n, .in_valid, .t, .t0, .sigma, .amp, .a, .delta, .cos_theta,
                  .out_valid, .bpm);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;
  int cyc = 0, first_in = -1, first_out = -1;
  real    exp_q [$];
  real    tol_q [$];
  int     sweep_got [$];

  // ex = 1 gives the full formula, ex = 0 the same without the exponential factor
  function automatic real model(int tt, int tt0, int s, int am, int aa, int dd, int c, bit ex);
    real dtr, g, den, v;
    dtr = real'(tt - tt0);
    if (dd >= aa) return 0.0;
    den = real'(aa * aa + dd * dd) - 2.0 * aa * dd * (real'(c) / 16384.0);
    if (den < 1.0) den = 1.0;
    g = real'(aa * aa - dd * dd) / den;
    v = am * dtr * g * (ex ? $exp(-dtr * dtr / (2.0 * s * s)) : 1.0) / (real'(s) * s * s);
    return v * 4096.0;
  endfunction

  function automatic real mag(real x);
    return x < 0.0 ? -x : x;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      if (first_in < 0) first_in = cyc;
      exp_q.push_back(model(int'(t), int'(t0), int'(sigma), int'(amp), int'(a), int'(delta),
                            int'(cos_theta), 1'b1));
      // the exponential is resolved to 1/65536: allow that step times the other factors
      tol_q.push_back(mag(model(int'(t), int'(t0), int'(sigma), int'(amp), int'(a),
                                int'(delta), int'(cos_theta), 1'b0)) / 65536.0);
    end
    if (rst_n && out_valid) begin
      automatic real r = exp_q.pop_front();
      automatic real rc = r > 32767.0 ? 32767.0 : (r < -32768.0 ? -32768.0 : r);
      automatic real err = real'(bpm) - rc;
      automatic real tol = tol_q.pop_front();
      if (first_out < 0) first_out = cyc;
      if (r > 32767.0 || r < -32768.0) n_sat++;
      if (err < 0) err = -err;
      checks++;
      if (err > 2.0 + 0.002 * (rc < 0 ? -rc : rc) + tol) begin
        failures++;
        if (failures < 20) $display("FAIL got %0d expected %f", bpm, rc);
      end
      sweep_got.push_back(int'(bpm));
    end
  end

  task automatic drive(int tt, int tt0, int s, int am, int aa, int dd, int c);
    @(negedge clk);
    in_valid = 1'b1;
    t = 16'(tt); t0 = 16'(tt0); sigma = 10'(s); amp = 16'(am);
    a = 12'(aa); delta = 12'(dd); cos_theta = 16'(c);
  endtask

  task automatic flush();
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pmax, pmin;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // directed
    drive(1000, 1000, 50, 30000, 1000, 0, 0);        // centre: zero crossing
    drive(1050, 1000, 50, 30000, 1000, 0, 0);        // positive extreme
    drive(950, 1000, 50, 30000, 1000, 0, 0);         // negative extreme
    drive(1050, 1000, 50, 30000, 1000, 300, 16384);  // bunch towards the button: larger
    drive(1050, 1000, 50, 30000, 1000, 300, -16384); // bunch away from the button: smaller
    drive(1050, 1000, 50, 30000, 1000, 1000, 0);     // delta = a: no signal
    drive(1020, 1000, 20, 65535, 1000, 500, 16384);  // saturates
    drive(980, 1000, 20, 65535, 1000, 500, 16384);   // saturates negative
    flush();
    checks++;
    if (first_out - first_in != LAT) begin
      failures++; $display("FAIL latency %0d", first_out - first_in);
    end
    // sweep across one bunch
    sweep_got.delete();
    for (int i = 0; i < 400; i++) drive(800 + i, 1000, 50, 30000, 1000, 0, 0);
    flush();
    pmax = 0; pmin = 0;
    for (int i = 0; i < sweep_got.size(); i++) begin
      if (sweep_got[i] > sweep_got[pmax]) pmax = i;
      if (sweep_got[i] < sweep_got[pmin]) pmin = i;
    end
    checks++;
    if (pmax != 250 || pmin != 150) begin
      failures++; $display("FAIL pulse extremes at %0d/%0d", pmax, pmin);
    end
    // random, one set per clock
    for (int k = 0; k < 3000; k++) begin
      automatic int s = 20 + $urandom_range(180);
      automatic int aa = 200 + $urandom_range(3800);
      drive($urandom_range(65535), 0, s, $urandom_range(65535), aa, $urandom_range(aa),
            int'($urandom_range(32768)) - 16384);
      t0 = 16'(int'(t) + $urandom_range(6 * s) - 3 * s);
    end
    flush();
    checks++;
    if (exp_q.size() != 0 || n_sat < 2) begin
      failures++; $display("FAIL outputs missing (%0d) or no saturation (%0d)", exp_q.size(), n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
