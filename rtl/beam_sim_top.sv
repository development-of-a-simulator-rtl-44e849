// beam_sim_top: four-channel electron beam BPM signal simulator.
//
// The simulator stands in for a storage ring when beam position monitors and bunch-by-bunch or
// fast orbit feedback electronics are tested on the bench. It plays back a stored button-pickup
// pulse once per bunch on four channels (the four buttons A-D of a BPM). Longitudinal motion of
// a bunch is imitated by starting the read of the stored pulse at an address offset, so the
// pulse arrives earlier or later in 1-sample (1 ps) steps; transverse motion by scaling the
// pulse on each channel with its own amplitude factor. Offsets (one per channel, normally
// equal) and factors are tables with one entry per bunch per turn, loaded with a measured or
// computed turn-by-turn oscillation, and each trigger plays the next turn.
//
// Data path (one sample per clock on every channel), one chain per channel A-D:
//   burst_ctrl -> read_addr_gen -> wave_rom -> amp_mult -> dac_data[c]
//   phase_rom (four offsets) and amp_rom (four factors) are read by burst_ctrl one slot ahead.
//
// Following the original design: the three tables and the multiplier of the oscillation simulation
// algorithm, 16-bit pulse samples, 2000 samples per 2 ns, 16 bunches per trigger, four output
// channels with a synchronous trigger output, and continuous output. Own choices: the load
// ports, the fixed-point formats, the table depth (N_TURN turns), the output width and the
// pipeline. The converter that turns dac_data into an analog signal is outside this design.
//
// Beside the playback path sits bunch_calc, the direct evaluation of the pickup formula from
// bunch parameters (bc_* ports). It shares only clock and reset with the rest and produces one
// sample per clock, 38 clocks after its inputs.
//
// Timing: a rising edge on trig_in (synchronous to clk) in cycle n gives the first sample of
// bunch 0 on dac_data in cycle n+3 with dac_valid and trig_out high; the NB bunch slots of WIN_LEN
// samples each follow without a gap. Tables are written through the *_wr_* ports, one entry per
// clock, and should be written while no turn is being played.
module beam_sim_top
  import sim_pkg::*;
#(
  parameter int unsigned NB          = N_BUNCH,
  parameter int unsigned NT          = N_TURN,
  parameter int unsigned WDEPTH      = WAVE_DEPTH,
  parameter int unsigned LEN         = WIN_LEN,
  localparam int unsigned IW         = $clog2(NB * NT),
  localparam int unsigned WAW        = $clog2(WDEPTH),
  localparam int unsigned BW         = $clog2(NB) > 0 ? $clog2(NB) : 1,
  localparam int unsigned TW         = $clog2(NT) > 0 ? $clog2(NT) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // trigger and mode
  input  logic                trig_in,
  input  logic                continuous,
  // waveform memory load
  input  logic                wave_wr_en,
  input  logic [WAW-1:0]      wave_wr_addr,
  input  sample_t             wave_wr_data,
  // per-bunch table load, entry = turn * NB + bunch
  input  logic [IW-1:0]       tbl_wr_addr,
  input  logic                phase_wr_en,
  input  off_vec_t            phase_wr_data,
  input  logic                amp_wr_en,
  input  amp_vec_t            amp_wr_data,
  // converter side: four channels A-D and the synchronous trigger
  output out_t [N_CH-1:0]     dac_data,
  output logic                dac_valid,
  output logic                trig_out,
  output logic                bunch_first,
  // status, aligned with dac_data
  output logic                busy,
  output logic [TW-1:0]       turn_idx,
  output logic [BW-1:0]       bunch_idx,
  output logic [N_CH-1:0][WAW-1:0] start_addr,
  output logic [N_CH-1:0][WAW-1:0] end_addr,
  // direct computation from bunch parameters (independent of the playback path)
  input  logic                bc_valid,
  input  logic [15:0]         bc_t,
  input  logic [15:0]         bc_t0,
  input  logic [9:0]          bc_sigma,
  input  logic [15:0]         bc_amp,
  input  logic [11:0]         bc_a,
  input  logic [11:0]         bc_delta,
  input  logic signed [15:0]  bc_cos_theta,
  output logic                bc_out_valid,
  output logic signed [15:0]  bc_bpm
);

  typedef logic [WAW-1:0] waddr_t;

  // table read
  logic [IW-1:0] tbl_addr;
  off_vec_t      tbl_offset;
  amp_vec_t      tbl_fac;

  // stage 0: slot control
  logic          slot_start, turn_start;
  off_vec_t      slot_offset;
  logic [TW-1:0] turn_c;
  logic [BW-1:0] bunch_c;

  // stage 1: read addresses and factors
  waddr_t [N_CH-1:0] rd_addr, sa1, ea1;
  logic   [N_CH-1:0] rd_valid, rd_first, rd_last;
  amp_vec_t          fac;
  logic              ts1;

  // stage 2: waveform samples
  sample_t [N_CH-1:0] sample;
  amp_vec_t           fac2;
  logic               valid2, first2, ts2;
  logic [TW-1:0]      turn2;
  logic [BW-1:0]      bunch2;
  waddr_t [N_CH-1:0]  sa2, ea2;

  // stage 3: output
  logic [N_CH-1:0] ch_valid;

  phase_rom #(.DEPTH(NB * NT)) u_phase_rom (
    .clk, .rd_addr(tbl_addr), .rd_data(tbl_offset),
    .wr_en(phase_wr_en), .wr_addr(tbl_wr_addr), .wr_data(phase_wr_data)
  );

  amp_rom #(.DEPTH(NB * NT)) u_amp_rom (
    .clk, .rd_addr(tbl_addr), .rd_data(tbl_fac),
    .wr_en(amp_wr_en), .wr_addr(tbl_wr_addr), .wr_data(amp_wr_data)
  );

  // All channels' slots have the same length and end together
  burst_ctrl #(.NB(NB), .NT(NT)) u_ctrl (
    .clk, .rst_n, .trig_in, .continuous,
    .tbl_addr, .tbl_offset, .tbl_fac,
    .slot_start, .slot_offset, .slot_last(&rd_last), .fac, .turn_start,
    .busy, .turn(turn_c), .bunch(bunch_c)
  );

  // One offset -> pulse memory -> multiplier chain per channel; every pulse memory is loaded
  // with the same pulse through the shared write port.
  for (genvar c = 0; c < int'(N_CH); c++) begin : g_ch
    read_addr_gen #(.DEPTH(WDEPTH), .LEN(LEN)) u_addr (
      .clk, .rst_n, .start(slot_start), .offset(slot_offset[c]),
      .addr(rd_addr[c]), .valid(rd_valid[c]), .first(rd_first[c]), .last(rd_last[c]),
      .start_addr(sa1[c]), .end_addr(ea1[c])
    );

    wave_rom #(.DEPTH(WDEPTH)) u_wave_rom (
      .clk, .rd_addr(rd_addr[c]), .rd_data(sample[c]),
      .wr_en(wave_wr_en), .wr_addr(wave_wr_addr), .wr_data(wave_wr_data)
    );

    amp_mult u_mult (
      .clk, .rst_n, .in_valid(valid2), .sample(sample[c]), .factor(fac2[c]),
      .out_valid(ch_valid[c]), .y(dac_data[c])
    );
  end

  // Carry factors and tags along with the one-cycle waveform read
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ts1    <= 1'b0;
      fac2   <= {N_CH{AMP_ONE}};
      valid2 <= 1'b0;
      first2 <= 1'b0;
      ts2    <= 1'b0;
      turn2  <= '0;
      bunch2 <= '0;
      sa2    <= '0;
      ea2    <= '0;
    end else begin
      ts1    <= turn_start;
      fac2   <= fac;
      valid2 <= &rd_valid;
      first2 <= &rd_first;
      ts2    <= ts1;
      turn2  <= turn_c;
      bunch2 <= bunch_c;
      sa2    <= sa1;
      ea2    <= ea1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trig_out    <= 1'b0;
      bunch_first <= 1'b0;
      turn_idx    <= '0;
      bunch_idx   <= '0;
      start_addr  <= '0;
      end_addr    <= '0;
    end else begin
      trig_out    <= ts2;
      bunch_first <= first2;
      turn_idx    <= turn2;
      bunch_idx   <= bunch2;
      start_addr  <= sa2;
      end_addr    <= ea2;
    end
  end

  assign dac_valid = &ch_valid;

  // Second signal source: the pickup formula evaluated per sample from bunch parameters
  bunch_calc u_bunch_calc (
    .clk, .rst_n, .in_valid(bc_valid), .t(bc_t), .t0(bc_t0), .sigma(bc_sigma), .amp(bc_amp),
    .a(bc_a), .delta(bc_delta), .cos_theta(bc_cos_theta),
    .out_valid(bc_out_valid), .bpm(bc_bpm)
  );

endmodule
