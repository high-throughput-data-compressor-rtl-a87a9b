// position_generator: finds the physical position (CAM address) of the
// matched stream, using the row/column partition of the CAM.
//
// The DEPTH match signals are grouped into ROWS = DEPTH/ROW_W rows of ROW_W
// cells (64 x 32 by default). Each row's matches are ORed into a row-match
// signal, and the row-match signals are ORed into the global match, which is
// combinational and goes to the length generator in the same cycle. A row
// priority generator picks the lowest matching row; its one-hot output
// selects that row's ROW_W match signals onto a shared column bus. Pipeline
// registers sit at the row priority generator's output (ROWS bits) and at
// the column priority generator's input (ROW_W bits), so only ROWS + ROW_W
// flops are needed. In the next cycle the row encoder gives the high-order
// address and the column priority generator with its encoder the low-order
// address. Lower addresses win at both levels.
//
// Timing: `position` and `pos_valid` describe the match signals of the
// previous symbol cycle (en); the registers hold while en is low. When the
// length generator raises sync, this is exactly the end of the stream that
// has just finished.
//
// The row-select bus is drawn with tri-state buffers in the source; here it
// is an AND-OR multiplexer driven by the one-hot row grant, which has the same
// function with a single driver per net.
module position_generator #(
  parameter int unsigned DEPTH = lz77_pkg::WINDOW_DEFAULT,
  parameter int unsigned ROW_W = lz77_pkg::ROW_W_DEFAULT,
  localparam int unsigned ROWS = DEPTH / ROW_W,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned RIW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CIW  = (ROW_W > 1) ? $clog2(ROW_W) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [DEPTH-1:0] match,
  output logic             gmatch,
  output logic [AW-1:0]    position,
  output logic             pos_valid
);

  initial begin
    assert (ROW_W >= 2 && (ROW_W & (ROW_W - 1)) == 0 && DEPTH % ROW_W == 0)
      else $fatal(1, "position_generator: ROW_W must be a power of two dividing DEPTH");
  end

  logic [ROWS-1:0]  row_match;
  logic [ROWS-1:0]  row_grant;
  logic [RIW-1:0]   row_idx_unused;
  logic [ROW_W-1:0] col_bus;

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      row_match[r] = |match[r*ROW_W +: ROW_W];
  end

  // Row priority generator (the encoder is used after the pipeline register).
  priority_encoder #(.N(ROWS)) u_row_pg (
    .req  (row_match),
    .grant(row_grant),
    .idx  (row_idx_unused),
    .any  (gmatch)
  );

  // Row selection onto the column bus.
  always_comb begin
    col_bus = '0;
    for (int r = 0; r < ROWS; r++)
      if (row_grant[r]) col_bus = col_bus | match[r*ROW_W +: ROW_W];
  end

  // Pipeline registers: ROWS + ROW_W flops.
  logic [ROWS-1:0]  row_grant_q;
  logic [ROW_W-1:0] col_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_grant_q <= '0;
      col_q       <= '0;
    end else if (en) begin
      row_grant_q <= row_grant;
      col_q       <= col_bus;
    end
  end

  // Row encoder (high-order address).
  logic [RIW-1:0] row_idx;
  always_comb begin
    row_idx = '0;
    for (int r = 0; r < ROWS; r++)
      if (row_grant_q[r]) row_idx = row_idx | RIW'(r);
  end

  // Column priority generator and encoder (low-order address).
  logic [ROW_W-1:0] col_grant_unused;
  logic [CIW-1:0]   col_idx;
  priority_encoder #(.N(ROW_W)) u_col_pg (
    .req  (col_q),
    .grant(col_grant_unused),
    .idx  (col_idx),
    .any  (pos_valid)
  );

  assign position = AW'(row_idx) * AW'(ROW_W) + AW'(col_idx);

endmodule
