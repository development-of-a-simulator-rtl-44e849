// exp_neg: fixed-point e^(-w) for w >= 0, pipelined, one result per clock.
//
// w is unsigned with WF = 16 fraction bits and 5 integer bits (0 <= w < 32). The result is
// e^(-w) with 16 fraction bits (65536 = 1.0). It splits w into its integer part wi, the top 8
// fraction bits fh and the low 8 fraction bits fl and multiplies three factors:
// e^(-wi) and e^(-fh/256) from two tables filled at elaboration, and 1 - fl/65536, the
// first-order value of e^(-fl/65536), whose error stays under half an output step.
// Inputs of 16 and more give 0. It stands in for a floating-point exponential core.
//
// Timing: latency 3 clocks (table read, first product, second product), in_valid to out_valid.
module exp_neg #(
  localparam int unsigned WW  = 21,
  localparam int unsigned EW  = 17
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [WW-1:0] w,
  output logic          out_valid,
  output logic [EW-1:0] e
);

  typedef logic [EW-1:0] tab16_t  [16];
  typedef logic [EW-1:0] tab256_t [256];

  function automatic tab16_t make_int_tab();
    tab16_t tab;
    for (int i = 0; i < 16; i++) tab[i] = EW'($rtoi($exp(-real'(i)) * 65536.0 + 0.5));
    return tab;
  endfunction

  function automatic tab256_t make_frac_tab();
    tab256_t tab;
    for (int i = 0; i < 256; i++) tab[i] = EW'($rtoi($exp(-real'(i) / 256.0) * 65536.0 + 0.5));
    return tab;
  endfunction

  localparam tab16_t  T_INT  = make_int_tab();
  localparam tab256_t T_FRAC = make_frac_tab();

  logic [EW-1:0] ti, tf, lin1, lin2, p1;
  logic          big, v1, v2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      ti <= '0; tf <= '0; lin1 <= '0; lin2 <= '0; p1 <= '0; big <= 1'b0; e <= '0;
    end else begin
      // stage 1: table reads
      v1   <= in_valid;
      big  <= w[WW-1];
      ti   <= T_INT[w[19:16]];
      tf   <= T_FRAC[w[15:8]];
      lin1 <= EW'(17'h10000 - {9'd0, w[7:0]});
      // stage 2: e^(-wi) * e^(-fh/256)
      v2   <= v1;
      p1   <= big ? '0 : EW'((34'(ti) * 34'(tf) + 34'h8000) >> 16);
      lin2 <= lin1;
      // stage 3: times (1 - fl)
      out_valid <= v2;
      e    <= EW'((34'(p1) * 34'(lin2) + 34'h8000) >> 16);
    end
  end

endmodule
