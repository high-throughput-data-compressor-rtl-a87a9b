// length_generator: counts the current match length and decides when a
// codeword is due.
//
// `length` is a counter holding the number of symbols in the current stream
// up to the previous input symbol. For each input symbol (en):
//   sync = ~gmatch | (length >= max_len)
// i.e. the stream ends when no match cell matched the new symbol, or when it
// already holds the maximum length. On sync the counter loads 1 (the new
// symbol starts the next stream); otherwise it counts up. `mode` is sync
// delayed by one symbol cycle and tells the match cells to start a new
// stream from the last hits. `flush` (a cycle without a symbol) also raises
// sync so that the last stream is sent; it then clears the counter to 0
// (empty stream) and mode to 0, and the match cells are preset.
//
// The counter, the comparator against a programmable maximum length and the
// one-cycle delay from sync to mode follow the source description. Loading
// the counter on every sync (also when the maximum length ends a stream that
// still matches), the reset value 0, the ">=" comparison and the flush input
// are this design's choices.
module length_generator #(
  parameter int unsigned MAX_LEN = lz77_pkg::MAX_LEN_DEFAULT,
  localparam int unsigned LW     = $clog2(MAX_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,       // one input symbol this cycle
  input  logic          flush,    // end of data, no symbol this cycle
  input  logic          gmatch,   // OR of all match signals
  input  logic [LW-1:0] max_len,  // programmable maximum match length
  output logic          sync,
  output logic [LW-1:0] length,
  output logic          mode
);

  logic at_max;

  assign at_max = (length >= max_len);
  assign sync   = (en && (!gmatch || at_max)) || flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      length <= '0;
      mode   <= 1'b0;
    end else if (flush) begin
      length <= '0;
      mode   <= 1'b0;
    end else if (en) begin
      length <= sync ? LW'(1) : length + 1'b1;
      mode   <= sync;
    end
  end

endmodule
