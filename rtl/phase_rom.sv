// phase_rom: per-bunch, per-channel read start offsets (arrival time of every bunch).
//
// Four signed offsets, one per channel A-D, for every bunch slot of every turn, stored at entry
// turn * N_BUNCH + bunch (channel A in the lowest OFF_W bits). An offset is the number of
// waveform samples (ps) by which the bunch arrives early: a positive offset starts the waveform read that many samples into the stored pulse, a negative one starts
// it that many samples before the end of the period (a delay). A host loads the table with the
// quantized turn-by-turn longitudinal oscillation; after configuration it is held unchanged,
// as the ROM of the source is. Until loaded every offset is 0.
//
// Following the original design: the offset table, its role as the read start address of the
// waveform ROM, one offset per channel per bunch, and that a new offset applies each trigger
// cycle. Own choices: the 12-bit two's complement format, the packing, the write port, the zero
// initial contents and the one-cycle read latency. Equal offsets on all four channels model a
// pure longitudinal displacement; unequal ones can model channel-to-channel skew.
//
// Interface: rd_addr in cycle n gives rd_data in cycle n+1; wr_en writes on the rising edge.
module phase_rom
  import sim_pkg::*;
#(
  parameter int unsigned DEPTH = N_TURN * N_BUNCH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr,
  output off_vec_t      rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  off_vec_t      wr_data
);

  off_vec_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < int'(DEPTH))
      mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
