// lz77_codec: LZ77 compressor built around a content addressable memory,
// with the decoding path that reuses the same memory.
//
// Encoding (mode_decode = 0): each input symbol is compared with every
// symbol of the sliding window in the CAM in one cycle and then written into
// the window. The match logic unit follows all candidate streams in parallel
// through the ring of match cells, counts the length of the longest current
// match and raises sync when the stream ends (no cell continues it, or the
// maximum length max_len is reached). The output stage unit then sends a
// codeword: (ID 0, start address, length - 1) for a stream of two or more
// symbols, or (ID 1, symbol) otherwise. One symbol is accepted per clock
// cycle with no back-pressure; in_valid may have gaps. After the last
// symbol, one cycle of `flush` (with in_valid low) sends the pending stream.
// Codewords appear one cycle after the sync that produces them.
//
// Decoding (mode_decode = 1): codewords enter at dcw_* with a valid/ready
// handshake and decoded symbols leave at out_valid/out_sym, one per cycle.
//
// Both directions start from an empty window after reset. Change
// mode_decode only while rst_n is low; assertions check this and the other
// interface rules (flush alone, max_len within 2..MAX_LEN). Window size,
// maximum match length (as the width of max_len) and the 64 x 32 row
// partition are parameters.
//
// The three units, their connections and the run-time maximum length follow
// the original architecture. Sharing one CAM between encoder and decoder
// under a mode input, the flush input and the handshakes are this design's
// choices.
module lz77_codec #(
  parameter int unsigned WINDOW  = lz77_pkg::WINDOW_DEFAULT,
  parameter int unsigned MAX_LEN = lz77_pkg::MAX_LEN_DEFAULT,
  parameter int unsigned ROW_W   = lz77_pkg::ROW_W_DEFAULT,
  parameter int unsigned SYM_W   = lz77_pkg::SYM_W_DEFAULT,
  localparam int unsigned AW     = $clog2(WINDOW),
  localparam int unsigned LW     = $clog2(MAX_LEN + 1),
  localparam int unsigned BW     = AW + $clog2(MAX_LEN)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode_decode,
  input  logic [LW-1:0]     max_len,
  // encoder: symbols in, codewords out
  input  logic              in_valid,
  input  logic [SYM_W-1:0]  in_sym,
  input  logic              flush,
  output logic              cw_valid,
  output lz77_pkg::cw_id_e  cw_id,
  output logic [BW-1:0]     cw_body,
  // decoder: codewords in, symbols out
  input  logic              dcw_valid,
  output logic              dcw_ready,
  input  lz77_pkg::cw_id_e  dcw_id,
  input  logic [BW-1:0]     dcw_body,
  output logic              out_valid,
  output logic [SYM_W-1:0]  out_sym
);

  logic             enc_en, enc_flush;
  logic [WINDOW-1:0] hit, match_unused;
  logic             sync, gmatch_unused, mode_unused;
  logic [LW-1:0]    length;
  logic [AW-1:0]    position;

  logic             cam_we;
  logic [SYM_W-1:0] cam_wdata, cam_rd_data;
  logic [AW-1:0]    cam_rd_addr, wptr_unused;

  logic             dec_we, dec_cw_valid;
  logic [SYM_W-1:0] dec_wdata;

  assign enc_en       = in_valid && !mode_decode;
  assign enc_flush    = flush && !in_valid && !mode_decode;
  assign dec_cw_valid = dcw_valid && mode_decode;

  assign cam_we    = mode_decode ? dec_we    : enc_en;
  assign cam_wdata = mode_decode ? dec_wdata : in_sym;

  // Interface rules.
  a_mode_stable: assert property (@(posedge clk) disable iff (!rst_n) $stable(mode_decode))
    else $error("lz77_codec: mode_decode changed outside reset");
  a_flush_alone: assert property (@(posedge clk) disable iff (!rst_n) !(flush && in_valid))
    else $error("lz77_codec: flush together with an input symbol");
  a_max_len: assert property (@(posedge clk) disable iff (!rst_n)
                              enc_en |-> (max_len >= LW'(2) && max_len <= LW'(MAX_LEN)))
    else $error("lz77_codec: max_len outside 2..MAX_LEN");

  cam #(.DEPTH(WINDOW), .SYM_W(SYM_W)) u_cam (
    .clk    (clk),
    .rst_n  (rst_n),
    .key    (in_sym),
    .hit    (hit),
    .we     (cam_we),
    .wdata  (cam_wdata),
    .wptr   (wptr_unused),
    .rd_addr(cam_rd_addr),
    .rd_data(cam_rd_data)
  );

  match_logic_unit #(.DEPTH(WINDOW), .ROW_W(ROW_W), .MAX_LEN(MAX_LEN)) u_mlu (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (enc_en),
    .flush   (enc_flush),
    .hit     (hit),
    .max_len (max_len),
    .sync    (sync),
    .length  (length),
    .position(position),
    .gmatch  (gmatch_unused),
    .mode    (mode_unused),
    .match   (match_unused)
  );

  output_stage_unit #(.DEPTH(WINDOW), .MAX_LEN(MAX_LEN), .SYM_W(SYM_W)) u_osu (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (enc_en),
    .sym     (in_sym),
    .sync    (sync),
    .length  (length),
    .position(position),
    .cw_valid(cw_valid),
    .cw_id   (cw_id),
    .cw_body (cw_body)
  );

  lz77_decoder #(.DEPTH(WINDOW), .MAX_LEN(MAX_LEN), .SYM_W(SYM_W)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .cw_valid   (dec_cw_valid),
    .cw_ready   (dcw_ready),
    .cw_id      (dcw_id),
    .cw_body    (dcw_body),
    .out_valid  (out_valid),
    .out_sym    (out_sym),
    .cam_we     (dec_we),
    .cam_wdata  (dec_wdata),
    .cam_rd_addr(cam_rd_addr),
    .cam_rd_data(cam_rd_data)
  );

endmodule
