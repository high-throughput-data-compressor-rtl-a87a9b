// match_logic_unit: turns the CAM hit signals into match length, position
// and sync.
//
// Three parts: the match-cell array (stream matching over the ring of CAM
// cells), the length generator (counter, maximum-length comparator, sync and
// mode) and the position generator (row/column priority generation of the
// matched address, pipelined). The global match, the OR of all match
// signals, is formed inside the position generator's row/column partition
// and feeds the length generator in the same cycle; the loop CAM -> match
// cells -> global match -> mode is the design's only recursive path and is
// not pipelined.
//
// Interface: en strobes one input symbol whose hits are on `hit`; flush ends
// the current stream without a symbol and presets the match cells. On sync,
// `length` is the length of the stream that just ended and `position` the
// CAM address of its last symbol (lowest address when several streams tie).
module match_logic_unit #(
  parameter int unsigned DEPTH   = lz77_pkg::WINDOW_DEFAULT,
  parameter int unsigned ROW_W   = lz77_pkg::ROW_W_DEFAULT,
  parameter int unsigned MAX_LEN = lz77_pkg::MAX_LEN_DEFAULT,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned LW     = $clog2(MAX_LEN + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             flush,
  input  logic [DEPTH-1:0] hit,
  input  logic [LW-1:0]    max_len,
  output logic             sync,
  output logic [LW-1:0]    length,
  output logic [AW-1:0]    position,
  output logic             gmatch,
  output logic             mode,
  output logic [DEPTH-1:0] match
);

  logic pos_valid_unused;

  match_cell_array #(.N(DEPTH)) u_cells (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .preset(flush),
    .mode  (mode),
    .hit   (hit),
    .match (match)
  );

  position_generator #(.DEPTH(DEPTH), .ROW_W(ROW_W)) u_pos (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .match    (match),
    .gmatch   (gmatch),
    .position (position),
    .pos_valid(pos_valid_unused)
  );

  length_generator #(.MAX_LEN(MAX_LEN)) u_len (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (en),
    .flush  (flush),
    .gmatch (gmatch),
    .max_len(max_len),
    .sync   (sync),
    .length (length),
    .mode   (mode)
  );

endmodule
