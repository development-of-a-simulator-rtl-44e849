// read_addr_gen: waveform read addresses for one bunch slot, the "read address offset" method.
//
// A bunch's arrival time is moved by moving where the read of the stored pulse starts. On a
// start pulse the generator turns the signed offset into a start address inside the period
// (offset modulo DEPTH: a positive offset advances the bunch by that many samples, a negative one
// delays it), then steps the address by one per clock for WIN_LEN samples, wrapping from
// DEPTH-1 to 0. The end address, start + WIN_LEN modulo DEPTH, is the first address not read.
// With the default sizes an offset of 0 reads 0..1899 (end 1900), 50 reads 50..1949 (end 1950)
// and 100 reads 100..1999 (end 0).
//
// Following the original design: reading from address 0 in normal output, starting at the offset to advance a
// bunch and postponing it to delay it, a new offset per trigger cycle, 2000 samples per period
// and the start/end address pairs 0/1900, 50/1950 and 100/0. Own choices: the wrap-around for
// negative offsets, the start/busy/last handshake.
//
// Timing: start in cycle n puts the first address on addr in cycle n+1 with valid high; the last
// address (last high) is in cycle n+WIN_LEN. A start in that last cycle continues seamlessly
// with the next slot. A start while busy earlier than that restarts the slot.
module read_addr_gen
  import sim_pkg::*;
#(
  parameter int unsigned DEPTH = WAVE_DEPTH,
  parameter int unsigned LEN   = WIN_LEN,
  parameter int unsigned OW    = OFF_W,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(LEN + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [OW-1:0] offset,
  output logic [AW-1:0]        addr,
  output logic                 valid,
  output logic                 first,
  output logic                 last,
  output logic [AW-1:0]        start_addr,
  output logic [AW-1:0]        end_addr
);

  // Offset folded into 0..DEPTH-1; holds for |offset| < 2*DEPTH
  function automatic logic [AW-1:0] wrap_offset(logic signed [OW-1:0] off);
    int s;
    s = int'(off);
    if (s < 0) s += int'(DEPTH);
    if (s < 0) s += int'(DEPTH);
    if (s >= int'(DEPTH)) s -= int'(DEPTH);
    return AW'(s);
  endfunction

  function automatic logic [AW-1:0] wrap_add(logic [AW-1:0] a, int unsigned n);
    int unsigned s;
    s = int'(a) + n;
    if (s >= DEPTH) s -= DEPTH;
    return AW'(s);
  endfunction

  logic [CW-1:0] remaining;  // samples still to read after the current one
  logic [AW-1:0] sa;

  assign sa   = wrap_offset(offset);
  assign last = valid && (remaining == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr       <= '0;
      valid      <= 1'b0;
      first      <= 1'b0;
      remaining  <= '0;
      start_addr <= '0;
      end_addr   <= AW'(LEN % DEPTH);
    end else if (start) begin
      addr       <= sa;
      valid      <= 1'b1;
      first      <= 1'b1;
      remaining  <= CW'(LEN - 1);
      start_addr <= sa;
      end_addr   <= wrap_add(sa, LEN % DEPTH);
    end else begin
      first <= 1'b0;
      if (valid) begin
        if (remaining == '0) begin
          valid <= 1'b0;
        end else begin
          addr      <= wrap_add(addr, 1);
          remaining <= remaining - 1'b1;
        end
      end
    end
  end

  // Every address handed out lies inside the stored period
  a_addr_range: assert property (@(posedge clk) disable iff (!rst_n) valid |-> int'(addr) < int'(DEPTH));

endmodule
