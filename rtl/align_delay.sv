// align_delay: an N-clock shift register that lines up a value with a slower parallel branch.
//
// The "alignment" stages of the bunch-parameter pipeline: each branch of the computation is
// delayed by this module until all branches reach the final multiplier in the same clock.
// N = 0 passes the value straight through. Synchronous active-low reset clears every stage.
module align_delay #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_shift
    logic [W-1:0] sr [N];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(N); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(N); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[N-1];
  end

endmodule
