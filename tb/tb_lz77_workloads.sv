// tb_lz77_workloads: the two evaluation workloads run through the codec at
// its default size (2048-symbol window, maximum match length 32).
//
//  * text:  204800 bytes of generated English-like text (words drawn with a
//           skewed frequency, sentences, punctuation, line breaks), encoded
//           with max_len = 32;
//  * image: a generated 256 x 256 frame of 8-bit pixels (gradients, flat
//           areas, a noisy band), encoded with max_len = 4.
// Each stream is encoded at one symbol per cycle, the codewords are decoded
// again and every decoded symbol must equal the original. The encoder must
// take exactly one cycle per symbol, no match may exceed max_len, and the
// compression ratio (8-bit symbols against 17-bit codewords) is printed.
// The data are generated, not the files the figures were measured on, so
// the printed ratios are not expected to equal those figures.
module tb_lz77_workloads;
  import lz77_pkg::*;

  localparam int unsigned N_TEXT  = 204800;
  localparam int unsigned IMG     = 256;
  localparam int unsigned N_IMAGE = IMG * IMG;
  localparam int unsigned N_MAX   = N_TEXT;
  localparam int unsigned AW      = $clog2(WINDOW_DEFAULT);
  localparam int unsigned LW      = $clog2(MAX_LEN_DEFAULT + 1);
  localparam int unsigned LFW     = $clog2(MAX_LEN_DEFAULT);
  localparam int unsigned BW      = AW + LFW;

  logic clk = 1'b0;
  logic rst_n;
  logic mode_decode;
  logic [LW-1:0] max_len;
  logic in_valid, flush;
  logic [7:0] in_sym;
  logic cw_valid;
  cw_id_e cw_id;
  logic [BW-1:0] cw_body;
  logic dcw_valid, dcw_ready;
  cw_id_e dcw_id;
  logic [BW-1:0] dcw_body;
  logic out_valid;
  logic [7:0] out_sym;

  always #5 clk = ~clk;

  lz77_codec dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [7:0] data [N_MAX];
  typedef struct packed { logic id; logic [BW-1:0] body; } cw_t;
  cw_t cws[$];

  always @(posedge clk)
    if (rst_n && !mode_decode && cw_valid) cws.push_back({cw_id, cw_body});

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic gen_text();
    string words[] = '{"the", "of", "and", "to", "in", "a", "is", "that", "for", "it",
                       "data", "memory", "match", "length", "window", "symbol", "address",
                       "compression", "content", "addressable", "stream", "signal", "cell",
                       "design", "clock", "speed", "with", "are", "this", "be", "by", "on",
                       "input", "output", "codeword", "position", "buffer", "algorithm",
                       "hardware", "throughput", "pipeline", "register", "priority", "row"};
    int k = 0, wcount = 0;
    bit cap = 1'b1;
    while (k < N_TEXT) begin
      // skewed choice: low indices much more frequent
      int a = $urandom_range(0, words.size() - 1);
      int b = $urandom_range(0, words.size() - 1);
      string w = words[(a < b) ? a : b];
      for (int i = 0; i < w.len() && k < N_TEXT; i++) begin
        byte c = w[i];
        if (i == 0 && cap) c = c - 8'd32;
        data[k++] = c;
      end
      cap = 1'b0;
      wcount++;
      if (k < N_TEXT) begin
        if ($urandom_range(0, 9) == 0) begin
          data[k++] = ".";
          cap = 1'b1;
          if (k < N_TEXT) data[k++] = ($urandom_range(0, 4) == 0) ? 8'h0a : " ";
        end else if ($urandom_range(0, 14) == 0) begin
          data[k++] = ",";
          if (k < N_TEXT) data[k++] = " ";
        end else begin
          data[k++] = " ";
        end
      end
    end
  endtask

  task automatic gen_image();
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        int p;
        if (x >= 64 && x < 128 && y >= 32 && y < 160) p = 200;              // flat area
        else if (y >= 192 && y < 208) p = $urandom_range(0, 255);           // noisy band
        else p = ((x + y) / 4) * 2 + ((x / 16) % 2) * 3;                    // gradient
        data[y * IMG + x] = 8'(p);
      end
  endtask

  task automatic do_reset(input logic dec);
    rst_n = 1'b0; in_valid = 1'b0; flush = 1'b0; dcw_valid = 1'b0;
    in_sym = '0; dcw_id = ID_LITERAL; dcw_body = '0;
    mode_decode = dec;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic run(input string name, input int n, input int lmax);
    int start_cycle, enc_cycles, nout, nmatch, nlit, longest;
    real ratio;
    // encode
    do_reset(1'b0);
    max_len = LW'(lmax);
    cws.delete();
    @(negedge clk);
    start_cycle = cycle;
    for (int k = 0; k < n; k++) begin
      in_valid = 1'b1; in_sym = data[k];
      @(negedge clk);
    end
    enc_cycles = cycle - start_cycle;
    in_valid = 1'b0; flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    repeat (3) @(negedge clk);
    check(enc_cycles == n, $sformatf("%s: %0d symbols took %0d cycles", name, n, enc_cycles));
    nmatch = 0; nlit = 0; longest = 0;
    foreach (cws[i]) begin
      if (cws[i].id == ID_LITERAL) nlit++;
      else begin
        int l = int'(cws[i].body[LFW-1:0]) + 1;
        nmatch++;
        if (l > longest) longest = l;
      end
    end
    check(longest <= lmax, $sformatf("%s: match of %0d symbols exceeds max_len", name, longest));
    check(nmatch > 0 && nlit > 0, $sformatf("%s: needs both codeword kinds", name));
    ratio = (8.0 * n) / (17.0 * cws.size());
    $display("%s: %0d symbols -> %0d codewords (%0d matches, %0d literals, longest %0d), ratio %0.3f",
             name, n, cws.size(), nmatch, nlit, longest, ratio);
    // decode
    do_reset(1'b1);
    nout = 0;
    fork
      begin
        foreach (cws[i]) begin
          @(negedge clk);
          dcw_valid = 1'b1; dcw_id = cw_id_e'(cws[i].id); dcw_body = cws[i].body;
          @(posedge clk);
          while (!dcw_ready) @(posedge clk);
        end
        @(negedge clk) dcw_valid = 1'b0;
      end
      begin
        int bad = 0;
        while (nout < n) begin
          @(posedge clk);
          if (out_valid) begin
            if (out_sym != data[nout]) begin
              bad++;
              if (bad < 5) $display("%s: decoded symbol %0d is %h, expected %h", name, nout, out_sym, data[nout]);
            end
            nout++;
          end
        end
        check(bad == 0, $sformatf("%s: %0d decoded symbols differ", name, bad));
      end
    join
    repeat (3) @(posedge clk);
    check(!out_valid, $sformatf("%s: extra decoded symbols", name));
  endtask

  initial begin
    mode_decode = 1'b0;
    max_len = LW'(MAX_LEN_DEFAULT);
    gen_text();
    run("text 200 KB, max_len 32", N_TEXT, 32);
    gen_image();
    run("image 256x256, max_len 4", N_IMAGE, 4);
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
