// output_stage_unit: assembles a codeword whenever the length generator
// raises sync.
//
// On sync the stream that has just ended is `length` symbols long and its
// last symbol sits at CAM address `position`:
//   length >= 2 : ID 0, body = {start address, length - 1}, where the start
//                 address is position - (length - 1), modulo the window size;
//   length == 1 : ID 1, body = the source symbol (the previous input symbol,
//                 kept in a register), zero-extended;
//   length == 0 : no codeword (nothing has been buffered since reset/flush).
// The codeword is registered: cw_valid rises in the cycle after sync.
//
// Sending the start address (computed from position and length) and the
// two codeword kinds follow the source description. The body layout, the
// length stored minus one so that 32 fits in 5 bits, and the separate ID
// bit are this design's choices.
module output_stage_unit #(
  parameter int unsigned DEPTH   = lz77_pkg::WINDOW_DEFAULT,
  parameter int unsigned MAX_LEN = lz77_pkg::MAX_LEN_DEFAULT,
  parameter int unsigned SYM_W   = lz77_pkg::SYM_W_DEFAULT,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned LW     = $clog2(MAX_LEN + 1),
  localparam int unsigned LFW    = $clog2(MAX_LEN),
  localparam int unsigned BW     = AW + LFW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,        // input symbol strobe
  input  logic [SYM_W-1:0]  sym,       // current input symbol
  input  logic              sync,
  input  logic [LW-1:0]     length,
  input  logic [AW-1:0]     position,
  output logic              cw_valid,
  output lz77_pkg::cw_id_e  cw_id,
  output logic [BW-1:0]     cw_body
);

  initial begin
    assert (BW >= SYM_W) else $fatal(1, "output_stage_unit: codeword body narrower than a symbol");
  end

  logic [SYM_W-1:0] prev_sym;
  logic [AW-1:0]    start_addr;
  logic [LFW-1:0]   len_field;

  assign len_field  = LFW'(length - 1'b1);
  assign start_addr = position - AW'(len_field);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sym <= '0;
      cw_valid <= 1'b0;
      cw_id    <= lz77_pkg::ID_LITERAL;
      cw_body  <= '0;
    end else begin
      if (en) prev_sym <= sym;
      cw_valid <= sync && (length != '0);
      if (sync && length != '0) begin
        if (length >= LW'(2)) begin
          cw_id   <= lz77_pkg::ID_MATCH;
          cw_body <= {start_addr, len_field};
        end else begin
          cw_id   <= lz77_pkg::ID_LITERAL;
          cw_body <= BW'(prev_sym);
        end
      end
    end
  end

endmodule
