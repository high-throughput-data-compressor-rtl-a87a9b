// match_cell_array: ring of N match cells, one per CAM cell.
//
// Cell i takes the match and hit outputs of cell i-1 as its permission and
// last-hit inputs; cell 0 takes them from cell N-1, closing the ring that
// follows the cyclic window. Because symbols are written to consecutive CAM
// cells, a stream that matched at cell i-1 for the previous input symbol is
// continued when the current symbol hits at cell i. match[i] therefore means:
// the current stream, ending with the current symbol, matches the window
// stream ending at cell i.
//
// Interface: hit[N] from the CAM, mode from the length generator, en strobes
// one input symbol, preset restores "all cells are candidates".
module match_cell_array #(
  parameter int unsigned N = lz77_pkg::WINDOW_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         preset,
  input  logic         mode,
  input  logic [N-1:0] hit,
  output logic [N-1:0] match
);

  for (genvar i = 0; i < N; i++) begin : g_cell
    localparam int unsigned LEFT = (i + N - 1) % N;
    match_cell u_cell (
      .clk          (clk),
      .rst_n        (rst_n),
      .en           (en),
      .preset       (preset),
      .mode         (mode),
      .match_perm_in(match[LEFT]),
      .last_hit_in  (hit[LEFT]),
      .hit          (hit[i]),
      .match        (match[i])
    );
  end

endmodule
