// priority_encoder: priority generator plus binary encoder.
//
// Among the request lines the lowest index wins: grant is the one-hot lowest
// set bit of req, idx its binary index (0 when no request) and any the OR of
// all requests. Purely combinational. Lower addresses having priority
// follows the source description; the structure of the generator is this
// design's own (lowest set bit by two's complement, OR-based encoder).
module priority_encoder #(
  parameter int unsigned N   = 32,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] idx,
  output logic          any
);

  assign grant = req & (~req + 1'b1);
  assign any   = |req;

  always_comb begin
    idx = '0;
    for (int i = 0; i < N; i++)
      if (grant[i]) idx = idx | IW'(i);
  end

endmodule
