// lz77_decoder: decoding control that reuses the CAM as the window.
//
// For each codeword it first checks the ID. A literal (ID 1) is sent out and
// written into the window in the same cycle. A match (ID 0) is split into
// start address and length; the symbols are then read from the window one
// per cycle, starting at the start address, and each one is sent out and
// written back at the window's write position. The read address comes from a
// random-access address generator (a loadable incrementing counter), since a
// start address cannot be produced by the ring counter that the encoder uses.
//
// Timing: one output symbol per cycle. A literal takes one cycle, a match of
// length L takes L cycles: the first symbol is read in the cycle that accepts
// the codeword (read address taken straight from the codeword), the others
// in the following L-1 cycles, during which cw_ready is low. out_valid and
// out_sym are registered and follow the CAM write by one cycle. Because the
// CAM read sees the old content of the cell being written, a match that
// overlaps its own output (distance smaller than length, or equal to the
// window size) decodes correctly.
//
// The ID check, the literal path and reading the match from the CAM follow
// the source description; the valid/ready handshake, the two-state sequencer
// and the one-cycle output register are this design's choices.
module lz77_decoder #(
  parameter int unsigned DEPTH   = lz77_pkg::WINDOW_DEFAULT,
  parameter int unsigned MAX_LEN = lz77_pkg::MAX_LEN_DEFAULT,
  parameter int unsigned SYM_W   = lz77_pkg::SYM_W_DEFAULT,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned LFW    = $clog2(MAX_LEN),
  localparam int unsigned BW     = AW + LFW
) (
  input  logic              clk,
  input  logic              rst_n,
  // codeword input
  input  logic              cw_valid,
  output logic              cw_ready,
  input  lz77_pkg::cw_id_e  cw_id,
  input  logic [BW-1:0]     cw_body,
  // decoded symbols
  output logic              out_valid,
  output logic [SYM_W-1:0]  out_sym,
  // CAM access
  output logic              cam_we,
  output logic [SYM_W-1:0]  cam_wdata,
  output logic [AW-1:0]     cam_rd_addr,
  input  logic [SYM_W-1:0]  cam_rd_data
);

  typedef enum logic {S_IDLE, S_COPY} state_e;

  state_e         state;
  logic [AW-1:0]  addr_q;   // random-access address generator
  logic [LFW-1:0] rem_q;    // symbols of the match still to copy
  logic           accept;
  logic [AW-1:0]  start;
  logic [LFW-1:0] len_m1;

  assign start    = cw_body[BW-1:LFW];
  assign len_m1   = cw_body[LFW-1:0];
  assign cw_ready = (state == S_IDLE);
  assign accept   = cw_valid && cw_ready;

  // A codeword that is offered stays offered, unchanged, until accepted.
  a_cw_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              cw_valid && !cw_ready |=> cw_valid && $stable(cw_id) && $stable(cw_body))
    else $error("lz77_decoder: codeword withdrawn or changed before it was accepted");

  always_comb begin
    if (state == S_IDLE) begin
      cam_rd_addr = start;
      cam_we      = accept;
      cam_wdata   = (cw_id == lz77_pkg::ID_LITERAL) ? cw_body[SYM_W-1:0] : cam_rd_data;
    end else begin
      cam_rd_addr = addr_q;
      cam_we      = 1'b1;
      cam_wdata   = cam_rd_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr_q    <= '0;
      rem_q     <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= cam_we;
      if (cam_we) out_sym <= cam_wdata;
      case (state)
        S_IDLE: begin
          if (accept && cw_id == lz77_pkg::ID_MATCH && len_m1 != '0) begin
            state  <= S_COPY;
            addr_q <= start + 1'b1;
            rem_q  <= len_m1;
          end
        end
        S_COPY: begin
          addr_q <= addr_q + 1'b1;
          rem_q  <= rem_q - 1'b1;
          if (rem_q == LFW'(1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
