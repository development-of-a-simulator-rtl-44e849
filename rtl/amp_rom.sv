// amp_rom: per-bunch amplitude modulation factors of the four pickup channels.
//
// One word per bunch slot of every turn, stored at entry turn * N_BUNCH + bunch, holding the
// factors of channels A, B, C and D side by side (channel A in the lowest AMP_W bits). Each
// factor is unsigned fixed point with AMP_FRAC fraction bits, so 1.0 leaves the stored pulse
// unchanged. A host loads the factors it derives from the turn-by-turn transverse position by
// inverting the difference-over-sum position formula, k_{A,B,C,D} = k(+/-x +/-y) about 1.0.
// Until loaded every factor is 1.0.
//
// Following the original design: the factor table, four channels per bunch, one factor per channel per bunch
// per trigger. Own choices: the Q2.14 format, the packing, the write port, the initial contents
// and the one-cycle read latency.
//
// Interface: rd_addr in cycle n gives rd_data in cycle n+1; wr_en writes on the rising edge.
module amp_rom
  import sim_pkg::*;
#(
  parameter int unsigned DEPTH = N_TURN * N_BUNCH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr,
  output amp_vec_t      rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  amp_vec_t      wr_data
);

  amp_vec_t mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = {N_CH{AMP_ONE}};
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < int'(DEPTH))
      mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
