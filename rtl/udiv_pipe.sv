// udiv_pipe: pipelined unsigned divider with a saturating quotient, one division per clock.
//
// Computes q = min(floor(num / den), 2^QW - 1) by restoring division, one quotient bit per
// pipeline stage, most significant bit first. A first stage compares num with den * 2^QW and
// marks results that would not fit; those leave as all ones. A zero divisor also gives all ones.
// Used by bunch_calc for its divisions, standing in for a vendor divider core.
//
// Timing: fully pipelined, latency QW + 1 clocks from in_valid to out_valid.
module udiv_pipe #(
  parameter int unsigned NW  = 48,
  parameter int unsigned DW  = 24,
  parameter int unsigned QW  = 24,
  localparam int unsigned RW = (NW > DW + QW ? NW : DW + QW) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          out_valid,
  output logic [QW-1:0] q
);

  logic [RW-1:0] rem [QW+1];
  logic [DW-1:0] d   [QW+1];
  logic [QW-1:0] qq  [QW+1];
  logic          sat [QW+1];
  logic          vld [QW+1];

  // stage 0: overflow test
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld[0] <= 1'b0;
      rem[0] <= '0;
      d[0]   <= '0;
      qq[0]  <= '0;
      sat[0] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      rem[0] <= RW'(num);
      d[0]   <= den;
      qq[0]  <= '0;
      sat[0] <= (den == '0) || (RW'(num) >= (RW'(den) << QW));
    end
  end

  // stages 1..QW: quotient bit QW-k decided in stage k
  for (genvar k = 1; k <= int'(QW); k++) begin : g_stage
    localparam int unsigned SH = QW - k;
    logic [RW-1:0] trial;
    assign trial = RW'(d[k-1]) << SH;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vld[k] <= 1'b0;
        rem[k] <= '0;
        d[k]   <= '0;
        qq[k]  <= '0;
        sat[k] <= 1'b0;
      end else begin
        vld[k] <= vld[k-1];
        d[k]   <= d[k-1];
        sat[k] <= sat[k-1];
        if (rem[k-1] >= trial) begin
          rem[k] <= rem[k-1] - trial;
          qq[k]  <= qq[k-1] | (QW'(1) << SH);
        end else begin
          rem[k] <= rem[k-1];
          qq[k]  <= qq[k-1];
        end
      end
    end
  end

  assign out_valid = vld[QW];
  assign q         = sat[QW] ? '1 : qq[QW];

endmodule
