// bunch_calc: button-pickup signal computed directly from bunch parameters.
//
// The second way of making a BPM signal: instead of playing back a stored pulse, evaluate the
// pickup voltage of a Gaussian bunch for every output sample,
//
//   V = amp * dt * G * exp(-dt^2 / (2 sigma^2)) / sigma^3,  dt = t - t0,
//   G = (a^2 - delta^2) / (a^2 + delta^2 - 2 a delta cos(theta)),
//
// where amp gathers the bunch charge, transfer impedance, beam velocity and pickup constants,
// a is the button radius, delta the bunch's distance from the pipe axis, theta the angle between
// bunch and button, and sigma the bunch length. Three branches work in parallel on each input:
//   - exponential: dt^2, a divider for w = dt^2 / (2 sigma^2), then exp_neg for e^(-w);
//   - multiplier: amp * dt;
//   - divider: the geometry terms a^2, delta^2, a delta cos(theta) and sigma^3, then a divider
//     for G / sigma^3.
// align_delay stages bring the three results to the final multiplier in the same clock, which
// forms V * 2^OSH, rounds it and saturates it to a 16-bit sample.
//
// Following the original design: the formula, the three parallel branches (exponential, multipliers,
// dividers), their alignment and the final multiplier. Own choices: fixed point in place of
// the floating-point and vendor divider cores, all widths and formats, and the output scale OSH.
// Formats: t, t0 unsigned 16-bit ps; sigma unsigned 10-bit ps (nonzero); amp unsigned 16-bit;
// a, delta unsigned 12-bit in a common length unit; cos_theta signed Q2.14. G is taken as 0 when
// delta >= a.
//
// Timing: fully pipelined, one sample per clock, latency 38 clocks from in_valid to
// out_valid.
module bunch_calc #(
  parameter int unsigned OSH = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [15:0]        t,
  input  logic [15:0]        t0,
  input  logic [9:0]         sigma,
  input  logic [15:0]        amp,
  input  logic [11:0]        a,
  input  logic [11:0]        delta,
  input  logic signed [15:0] cos_theta,
  output logic               out_valid,
  output logic signed [15:0] bpm
);

  localparam int unsigned EXP_QW  = 21;               // w: 5 integer + 16 fraction bits
  localparam int unsigned GEO_QW  = 32;               // G / sigma^3 scaled by 2^40
  localparam int unsigned L_EXP   = 1 + (EXP_QW + 1) + 3;
  localparam int unsigned L_GEO   = 3 + (GEO_QW + 1);
  localparam int unsigned L_MUL   = 1;
  localparam int unsigned L_BR    = L_GEO;            // slowest branch
  localparam int unsigned SHIFT   = 40 + 16 - OSH;

  logic signed [16:0] dt;
  assign dt = $signed({1'b0, t}) - $signed({1'b0, t0});

  // ---------------- exponential branch ----------------
  logic        e_v0;
  logic [33:0] dt2;
  logic [20:0] two_s2;
  logic        w_v;
  logic [20:0] w;
  logic        e_v;
  logic [16:0] e_val;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_v0 <= 1'b0; dt2 <= '0; two_s2 <= '0;
    end else begin
      e_v0   <= in_valid;
      dt2    <= 34'(dt * dt);
      two_s2 <= 21'({sigma, 1'b0} * sigma);
    end
  end

  udiv_pipe #(.NW(50), .DW(21), .QW(EXP_QW)) u_div_w (
    .clk, .rst_n, .in_valid(e_v0), .num({dt2[33:0], 16'd0}), .den(two_s2),
    .out_valid(w_v), .q(w)
  );

  exp_neg u_exp (.clk, .rst_n, .in_valid(w_v), .w, .out_valid(e_v), .e(e_val));

  // ---------------- multiplier branch ----------------
  logic signed [33:0] p;
  always_ff @(posedge clk) begin
    if (!rst_n) p <= '0;
    else        p <= $signed({1'b0, amp}) * dt;
  end

  // ---------------- divider branch ----------------
  logic [23:0]        a2, d2, ad;
  logic [19:0]        s2;
  logic [9:0]         s_1;
  logic signed [15:0] cos_1;
  logic [23:0]        gnum;
  logic [25:0]        gden;
  logic [29:0]        s3;
  logic [63:0]        r_num;
  logic [55:0]        r_den;
  logic               g_v1, g_v2, g_v3;
  logic [31:0]        r;
  logic               r_v;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a2 <= '0; d2 <= '0; ad <= '0; s2 <= '0; s_1 <= '0; cos_1 <= '0;
      gnum <= '0; gden <= '0; s3 <= '0; r_num <= '0; r_den <= '0;
      g_v1 <= 1'b0; g_v2 <= 1'b0; g_v3 <= 1'b0;
    end else begin
      // products of the geometry and bunch-length parameters
      g_v1  <= in_valid;
      a2    <= a * a;
      d2    <= delta * delta;
      ad    <= a * delta;
      s2    <= sigma * sigma;
      s_1   <= sigma;
      cos_1 <= cos_theta;
      // numerator and denominator of G, sigma^3
      g_v2  <= g_v1;
      gnum  <= (a2 > d2) ? a2 - d2 : '0;
      gden  <= gden_of(a2, d2, ad, cos_1);
      s3    <= 30'(s2 * s_1);
      // G / sigma^3 as one division
      g_v3  <= g_v2;
      r_num <= {gnum, 40'd0};
      r_den <= 56'(gden * s3);
    end
  end

  // a^2 + delta^2 - 2 a delta cos(theta), never below 1
  function automatic logic [25:0] gden_of(logic [23:0] aa, logic [23:0] dd, logic [23:0] xd,
                                          logic signed [15:0] c);
    logic signed [42:0] xterm;
    logic signed [42:0] sum;
    xterm = $signed({1'b0, xd, 1'b0}) * c;               // 2 a delta cos, Q.14
    sum   = $signed({19'd0, aa}) + $signed({19'd0, dd}) - (xterm >>> 14);
    return (sum < 43'sd1) ? 26'd1 : 26'(sum);
  endfunction

  udiv_pipe #(.NW(64), .DW(56), .QW(GEO_QW)) u_div_g (
    .clk, .rst_n, .in_valid(g_v3), .num(r_num), .den(r_den), .out_valid(r_v), .q(r)
  );

  // ---------------- alignment ----------------
  logic [16:0]        e_al;
  logic [33:0]        p_al;
  logic               ev_al;

  align_delay #(.W(17), .N(L_BR - L_EXP)) u_al_e (.clk, .rst_n, .d(e_val), .q(e_al));
  align_delay #(.W(1),  .N(L_BR - L_EXP)) u_al_v (.clk, .rst_n, .d(e_v),   .q(ev_al));
  align_delay #(.W(34), .N(L_BR - L_MUL)) u_al_p (.clk, .rst_n, .d(p),     .q(p_al));

  // ---------------- final multiplier ----------------
  logic signed [66:0] m1;
  logic [16:0]        e_m;
  logic               v_m;
  logic signed [84:0] m2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m1 <= '0; e_m <= '0; v_m <= 1'b0; out_valid <= 1'b0; bpm <= '0;
    end else begin
      v_m <= r_v;
      m1  <= $signed(p_al) * $signed({1'b0, r});
      e_m <= e_al;
      out_valid <= v_m;
      bpm <= sat16(m2);
    end
  end

  assign m2 = m1 * $signed({1'b0, e_m});

  function automatic logic signed [15:0] sat16(logic signed [84:0] x);
    logic signed [84:0] y;
    y = (x + (85'sd1 <<< (SHIFT - 1))) >>> SHIFT;
    if (y > 85'sd32767)  return 16'sh7fff;
    if (y < -85'sd32768) return -16'sh8000;
    return 16'(y);
  endfunction

  // The three branches deliver the same sample
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) r_v == ev_al);

endmodule
