// cam: the content addressable memory that holds the sliding window.
//
// DEPTH byte cells, each with its own comparator. Every cycle all cells are
// compared with `key` and hit[i] is high when cell i holds a symbol equal to
// the key. Symbols are written cyclically: an internal ring counter gives the
// write address, so after DEPTH writes the oldest symbol is overwritten. A
// random-access read port (rd_addr -> rd_data, combinational) serves the
// decoding path, which must fetch symbols from an arbitrary start address.
//
// Timing: hit is combinational from key and the stored cells. A write (we)
// takes effect at the clock edge, so in the cycle of a write the comparison
// and the read still see the old content of the written cell.
//
// Design choices beyond the source description: each cell has a valid bit,
// cleared by reset, so that cells never written cannot report a hit; DEPTH
// must be a power of two so the ring counter and addresses wrap naturally.
module cam #(
  parameter int unsigned DEPTH = lz77_pkg::WINDOW_DEFAULT,
  parameter int unsigned SYM_W = lz77_pkg::SYM_W_DEFAULT,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // search
  input  logic [SYM_W-1:0] key,
  output logic [DEPTH-1:0] hit,
  // cyclic write (ring-counter address)
  input  logic             we,
  input  logic [SYM_W-1:0] wdata,
  output logic [AW-1:0]    wptr,
  // random-access read
  input  logic [AW-1:0]    rd_addr,
  output logic [SYM_W-1:0] rd_data
);

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $fatal(1, "cam: DEPTH must be a power of two");
  end

  logic [SYM_W-1:0] byte_cell [DEPTH];
  logic [DEPTH-1:0] valid;

  // Comparators, one per byte cell.
  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      hit[i] = valid[i] && (byte_cell[i] == key);
  end

  assign rd_data = byte_cell[rd_addr];

  // Byte cells (no reset: the valid bits mask unwritten cells).
  always_ff @(posedge clk) begin
    if (we) byte_cell[wptr] <= wdata;
  end

  // Valid bits and ring counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      wptr  <= '0;
    end else if (we) begin
      valid[wptr] <= 1'b1;
      wptr        <= wptr + 1'b1;
    end
  end

endmodule
