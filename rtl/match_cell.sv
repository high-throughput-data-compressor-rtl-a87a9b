// match_cell: one cell of the match-cell array.
//
// Two flip-flops, a 2:1 multiplexer and an AND gate. The permission flop
// stores the match output of the left neighbour from the previous symbol
// cycle: a stream that matched up to the left cell may continue here. It is
// preset to 1, so right after reset (or a preset) every buffered symbol is a
// candidate. The last-hit flop stores the left neighbour's hit from the
// previous symbol cycle; it is used when a new stream starts, after the
// maximum length was reached or no cell matched. `mode` selects between the
// two (0: permission, 1: last hit) and the selected bit ANDed with this
// cell's hit gives `match`.
//
// Timing: both flops load when `en` (one input symbol) is high. `preset`
// (synchronous) sets the permission flop, as the asynchronous reset does.
// The reset value 0 of the last-hit flop is this design's choice.
module match_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic preset,
  input  logic mode,
  input  logic match_perm_in,  // match of the left cell
  input  logic last_hit_in,    // hit of the left cell
  input  logic hit,
  output logic match
);

  logic perm_q, last_hit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perm_q     <= 1'b1;
      last_hit_q <= 1'b0;
    end else if (preset) begin
      perm_q     <= 1'b1;
    end else if (en) begin
      perm_q     <= match_perm_in;
      last_hit_q <= last_hit_in;
    end
  end

  assign match = (mode ? last_hit_q : perm_q) & hit;

endmodule
