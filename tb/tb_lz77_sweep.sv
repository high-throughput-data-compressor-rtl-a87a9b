// tb_lz77_sweep: compression ratio against window size and maximum match
// length, the trade-off used to choose the default configuration.
//
// Five encoders with windows of 128, 256, 512, 1024 and 2048 symbols (each
// built for a maximum length of 64, so the codeword body is log2(window) + 6
// bits) receive the same 50000 bytes of generated English-like text, once
// for each max_len of 4, 8, 16, 32 and 64. Every instance's codewords are
// decoded on the fly by a plain software model of the window (cyclic writes,
// reads from the start address) and must give back the input exactly; no
// match may be longer than max_len. The table of compression ratios (8-bit
// symbols against codewords of one ID bit plus the body) is printed. Windows
// above 2048 are left out to keep the simulation short.
module tb_lz77_sweep;
  import lz77_pkg::*;

  localparam int unsigned N      = 50000;
  localparam int unsigned NW     = 5;
  localparam int unsigned MAXL   = 64;
  localparam int unsigned LW     = $clog2(MAXL + 1);
  localparam int unsigned LFW    = $clog2(MAXL);
  localparam int unsigned WINS [NW] = '{128, 256, 512, 1024, 2048};

  logic clk = 1'b0;
  logic rst_n;
  logic [LW-1:0] max_len;
  logic in_valid, flush;
  logic [7:0] in_sym;
  int   cur_lmax;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] data [N];
  int ncw   [NW];
  int nbad  [NW];
  int nlong [NW];
  int nout  [NW];

  for (genvar w = 0; w < NW; w++) begin : g_win
    localparam int unsigned W  = WINS[w];
    localparam int unsigned AW = $clog2(W);
    localparam int unsigned BW = AW + LFW;

    logic cw_valid, dcw_ready_unused, out_valid_unused;
    cw_id_e cw_id;
    logic [BW-1:0] cw_body;
    logic [7:0] out_sym_unused;

    lz77_codec #(.WINDOW(W), .MAX_LEN(MAXL)) dut (
      .clk, .rst_n, .mode_decode(1'b0), .max_len,
      .in_valid, .in_sym, .flush,
      .cw_valid, .cw_id, .cw_body,
      .dcw_valid(1'b0), .dcw_ready(dcw_ready_unused), .dcw_id(ID_LITERAL), .dcw_body('0),
      .out_valid(out_valid_unused), .out_sym(out_sym_unused)
    );

    // software decoder
    logic [7:0] win [W];
    logic [7:0] s;
    int wp, st, l;
    always @(posedge clk) begin
      if (!rst_n) begin
        wp = 0;
      end else if (cw_valid) begin
        ncw[w]++;
        if (cw_id == ID_LITERAL) begin
          if (cw_body[7:0] != data[nout[w]]) nbad[w]++;
          win[wp] = cw_body[7:0]; wp = (wp + 1) % W; nout[w]++;
        end else begin
          st = int'(cw_body[BW-1:LFW]);
          l  = int'(cw_body[LFW-1:0]) + 1;
          if (l > cur_lmax) nlong[w]++;
          for (int i = 0; i < l; i++) begin
            s = win[(st + i) % W];
            if (s != data[nout[w]]) nbad[w]++;
            win[wp] = s; wp = (wp + 1) % W; nout[w]++;
          end
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic gen_text();
    string words[] = '{"the", "of", "and", "to", "in", "a", "is", "that", "for", "it",
                       "data", "memory", "match", "length", "window", "symbol", "address",
                       "compression", "content", "addressable", "stream", "signal", "cell",
                       "design", "clock", "speed", "with", "are", "this", "be", "by", "on",
                       "input", "output", "codeword", "position", "buffer", "algorithm",
                       "hardware", "throughput", "pipeline", "register", "priority", "row"};
    int k = 0;
    bit cap = 1'b1;
    while (k < N) begin
      int a = $urandom_range(0, words.size() - 1);
      int b = $urandom_range(0, words.size() - 1);
      string wd = words[(a < b) ? a : b];
      for (int i = 0; i < wd.len() && k < N; i++) begin
        byte c = wd[i];
        if (i == 0 && cap) c = c - 8'd32;
        data[k++] = c;
      end
      cap = 1'b0;
      if (k < N) begin
        if ($urandom_range(0, 9) == 0) begin
          data[k++] = ".";
          cap = 1'b1;
          if (k < N) data[k++] = ($urandom_range(0, 4) == 0) ? 8'h0a : " ";
        end else begin
          data[k++] = " ";
        end
      end
    end
  endtask

  initial begin
    int lens [5] = '{4, 8, 16, 32, 64};
    string line;
    real bits;
    rst_n = 1'b0; in_valid = 1'b0; flush = 1'b0; in_sym = '0; max_len = LW'(4); cur_lmax = 4;
    gen_text();
    $display("compression ratio (rows: max_len, columns: window 128 256 512 1024 2048)");
    foreach (lens[j]) begin
      rst_n = 1'b0;
      max_len = LW'(lens[j]); cur_lmax = lens[j];
      for (int w = 0; w < NW; w++) begin ncw[w] = 0; nbad[w] = 0; nlong[w] = 0; nout[w] = 0; end
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      for (int k = 0; k < N; k++) begin
        in_valid = 1'b1; in_sym = data[k];
        @(negedge clk);
      end
      in_valid = 1'b0; flush = 1'b1;
      @(negedge clk) flush = 1'b0;
      repeat (3) @(negedge clk);
      line = $sformatf("max_len %2d:", lens[j]);
      for (int w = 0; w < NW; w++) begin
        bits = 1.0 + $clog2(WINS[w]) + LFW;
        check(nout[w] == N, $sformatf("window %0d max_len %0d: %0d symbols decoded", WINS[w], lens[j], nout[w]));
        check(nbad[w] == 0, $sformatf("window %0d max_len %0d: %0d wrong symbols", WINS[w], lens[j], nbad[w]));
        check(nlong[w] == 0, $sformatf("window %0d max_len %0d: matches above max_len", WINS[w], lens[j]));
        line = {line, $sformatf(" %6.3f", (8.0 * N) / (bits * ncw[w]))};
      end
      $display("%s", line);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
