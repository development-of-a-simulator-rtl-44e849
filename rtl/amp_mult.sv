// amp_mult: scales one waveform sample by a channel's amplitude modulation factor.
//
// The transverse position of a bunch shows up as a different signal amplitude on each pickup
// button, so each output channel multiplies the time-shifted pulse by its own factor. The
// product of the signed sample and the unsigned fixed-point factor is rounded to the nearest
// integer code (halves rounded up) and kept at full width, OUT_W = SW + FW - FRAC bits, which
// holds every product of a full-scale sample and a factor below 4.0 without overflow.
//
// Following the original design: the multiplier between the waveform ROM and the output, fed by the factor
// table. Own choices: the fixed-point format, the rounding and the register stage.
//
// Timing: one clock; in_valid and the operands in cycle n give out_valid and y in cycle n+1.
module amp_mult
  import sim_pkg::*;
#(
  parameter int unsigned SW   = WAVE_W,
  parameter int unsigned FW   = AMP_W,
  parameter int unsigned FRAC = AMP_FRAC,
  localparam int unsigned YW  = SW + FW - FRAC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [SW-1:0] sample,
  input  logic [FW-1:0]        factor,
  output logic                 out_valid,
  output logic signed [YW-1:0] y
);

  logic signed [SW+FW:0] prod;
  logic signed [SW+FW:0] rounded;

  always_comb begin
    prod    = sample * $signed({1'b0, factor});
    rounded = prod + (SW + FW + 1)'(1 << (FRAC - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      y         <= in_valid ? YW'(rounded >>> FRAC) : '0;
    end
  end

endmodule
