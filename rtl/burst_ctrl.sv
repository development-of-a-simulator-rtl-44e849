// burst_ctrl: trigger handling and bunch/turn sequencing of the beam signal simulator.
//
// Each trigger plays one turn: NB bunch slots back to back, bunch 0 first. For every slot the
// controller takes that bunch's four start-address offsets and four amplitude factors from the
// tables (entry turn * NB + bunch), hands the offsets to the read address generators with a
// start pulse and holds the factors for the multipliers for the length of the slot. After the last slot of a
// turn the turn index advances (wrapping after NT turns), so successive triggers replay the
// stored turn-by-turn oscillation. In single-trigger mode (continuous = 0) the controller then
// waits for the next trigger; in continuous mode it goes straight on with the next turn, giving
// an unbroken train of bunches. A trigger that arrives while a turn is being played is ignored.
//
// Following the original design: output of a set number of bunches (16) on each trigger,
// per-channel factors and offsets for each bunch that change from trigger to trigger, the continuous bunch train of the bench test.
// Own choices: rising-edge trigger detection with the trigger taken as synchronous to clk, the
// ignore-while-busy rule, the table layout and the handshake with read_addr_gen.
//
// Timing: the table entry of the next slot is always on tbl_addr, so it is read (one-cycle
// latency) well before it is needed. A trigger edge seen in cycle n gives slot_start in cycle n
// (combinational from the edge) and the factors on fac from cycle n+1, together with the first
// read address. The next slot starts in the cycle slot_last is high, so slots follow each other
// without a gap. turn_start marks the slot_start of bunch 0.
module burst_ctrl
  import sim_pkg::*;
#(
  parameter int unsigned NB   = N_BUNCH,
  parameter int unsigned NT   = N_TURN,
  localparam int unsigned IW  = $clog2(NB * NT),
  localparam int unsigned BW  = $clog2(NB) > 0 ? $clog2(NB) : 1,
  localparam int unsigned TW  = $clog2(NT) > 0 ? $clog2(NT) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 trig_in,
  input  logic                 continuous,
  // table read
  output logic [IW-1:0]        tbl_addr,
  input  off_vec_t             tbl_offset,
  input  amp_vec_t             tbl_fac,
  // slot control
  output logic                 slot_start,
  output off_vec_t             slot_offset,
  input  logic                 slot_last,
  output amp_vec_t             fac,
  output logic                 turn_start,
  output logic                 busy,
  output logic [TW-1:0]        turn,
  output logic [BW-1:0]        bunch
);

  logic          trig_d;
  logic          trig_edge;
  logic [IW-1:0] nxt_idx;    // table entry of the next slot to start
  logic [BW-1:0] nxt_bunch;
  logic [TW-1:0] nxt_turn;
  logic          more;       // the current turn has slots left to play

  assign trig_edge  = trig_in && !trig_d;
  assign more       = busy && (nxt_bunch != '0);
  assign slot_start = (!busy && trig_edge) ||
                      (slot_last && (more || continuous));
  assign turn_start = slot_start && (nxt_bunch == '0);
  assign slot_offset = tbl_offset;
  assign tbl_addr    = nxt_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      trig_d    <= 1'b0;
      busy      <= 1'b0;
      nxt_idx   <= '0;
      nxt_bunch <= '0;
      nxt_turn  <= '0;
      turn      <= '0;
      bunch     <= '0;
      fac       <= {N_CH{AMP_ONE}};
    end else begin
      trig_d <= trig_in;
      if (slot_start) begin
        busy  <= 1'b1;
        fac   <= tbl_fac;
        turn  <= nxt_turn;
        bunch <= nxt_bunch;
        nxt_idx <= (int'(nxt_idx) == int'(NB * NT) - 1) ? '0 : nxt_idx + 1'b1;
        if (int'(nxt_bunch) == int'(NB) - 1) begin
          nxt_bunch <= '0;
          nxt_turn  <= (int'(nxt_turn) == int'(NT) - 1) ? '0 : nxt_turn + 1'b1;
        end else begin
          nxt_bunch <= nxt_bunch + 1'b1;
        end
      end else if (slot_last) begin
        busy <= 1'b0;
      end
    end
  end

  // A slot ends only while a turn is being played
  a_last_busy: assert property (@(posedge clk) disable iff (!rst_n) slot_last |-> busy);

endmodule
