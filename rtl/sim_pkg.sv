// sim_pkg: shared sizes, types and the waveform model of the beam signal simulator.
//
// The simulator plays back one stored bunch pulse per bunch slot, shifted in time by a
// start-address offset (longitudinal position) and scaled per pickup channel by an amplitude
// modulation factor (transverse position). This package holds the sizes the modules share, the
// fixed-point formats of the stored data, and the constant function that fills the waveform
// memory at start-up with a Gaussian-derivative button-pickup pulse.
//
// Following the original design: 16-bit waveform samples, 2000 samples per 2 ns bunch period (1 ps per
// sample), four channels A-D, 16 bunches per trigger, and the pulse shape of a button electrode
// driven by a Gaussian bunch: V(t) proportional to (t - t0)/sigma^2 * exp(-(t - t0)^2 / 2 sigma^2).
// Own choices: the Q2.14 factor format, the 12-bit signed offset, the pulse centre, width and
// peak code, and the number of turns held in the tables.
package sim_pkg;

  // Pickup channels A, B, C, D
  localparam int unsigned N_CH = 4;

  // Waveform memory: one bunch period of 2 ns at 1 ps per sample
  localparam int unsigned WAVE_DEPTH = 2000;
  localparam int unsigned WAVE_W     = 16;
  // Samples read out per bunch slot (start address to end address)
  localparam int unsigned WIN_LEN    = 1900;

  // Amplitude modulation factor: unsigned Q2.14, 16384 = 1.0
  localparam int unsigned AMP_W    = 16;
  localparam int unsigned AMP_FRAC = 14;
  localparam logic [AMP_W-1:0] AMP_ONE = 16'(1 << AMP_FRAC);

  // Read start address offset in samples (ps), two's complement
  localparam int unsigned OFF_W = 12;

  // Output sample: waveform times factor, rounded back to integer codes
  localparam int unsigned OUT_W = WAVE_W + AMP_W - AMP_FRAC;

  // Bunches per trigger and turns held in the offset and factor tables
  localparam int unsigned N_BUNCH = 16;
  localparam int unsigned N_TURN  = 8192;

  typedef logic signed [WAVE_W-1:0] sample_t;
  typedef logic        [AMP_W-1:0]  amp_t;
  typedef logic signed [OFF_W-1:0]  offset_t;
  typedef logic signed [OUT_W-1:0]  out_t;
  typedef amp_t [N_CH-1:0]          amp_vec_t;
  typedef offset_t [N_CH-1:0]       off_vec_t;

  // Bunch pulse model used to fill the waveform memory. Sample n lies at t = n ps; the pulse is
  // centred at t0 = center and has rms length sigma = width. The result is scaled so that the
  // extreme at t - t0 = +/- sigma has magnitude peak.
  function automatic logic signed [WAVE_W-1:0] pulse_sample(int n, int center, int width,
                                                            int peak);
    real u, v;
    u = real'(n - center) / real'(width);
    v = real'(peak) * u * $exp(0.5 - 0.5 * u * u);
    return WAVE_W'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

endpackage
