// wave_rom: the stored bunch pulse, one bunch period of samples.
//
// A single-port-read memory of DEPTH signed samples. It plays the part of the waveform ROM: the
// read address from read_addr_gen selects a sample, which appears on rd_data one clock later
// (registered output, as a block RAM gives it). A write port lets a host replace the contents
// with a quantized measured pulse; without writes the memory holds the pulse model of sim_pkg,
// computed when the design is elaborated.
//
// Following the original design: 16-bit samples, 2000 samples per 2 ns bunch period, so one address step is
// 1 ps of bunch arrival time; the pulse shape of a button electrode. Own choices: the write
// port, the model pulse's centre (PULSE_CENTER), rms length (PULSE_SIGMA) and peak code
// (PULSE_PEAK), and the one-cycle read latency.
//
// Interface: rd_addr in cycle n gives rd_data in cycle n+1. wr_en writes wr_data at wr_addr on
// the rising clock edge.
module wave_rom
  import sim_pkg::*;
#(
  parameter int unsigned DEPTH        = WAVE_DEPTH,
  parameter int unsigned W            = WAVE_W,
  parameter int          PULSE_CENTER = 1000,
  parameter int          PULSE_SIGMA  = 50,
  parameter int          PULSE_PEAK   = 30000,
  localparam int unsigned AW          = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic [AW-1:0]       rd_addr,
  output logic signed [W-1:0] rd_data,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic signed [W-1:0] wr_data
);

  logic signed [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++)
      mem[i] = W'(pulse_sample(i, PULSE_CENTER, PULSE_SIGMA, PULSE_PEAK));
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < int'(DEPTH))
      mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
