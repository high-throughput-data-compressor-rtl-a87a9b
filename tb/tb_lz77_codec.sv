// tb_lz77_codec: end-to-end test of the LZ77 CAM codec.
//
// A generated symbol stream (short words from a small alphabet, runs of one
// symbol, copies of earlier segments at distances inside and beyond the
// window, and unrelated bytes) is encoded with gaps in in_valid and a final
// flush. The codewords are compared one by one with a reference encoder
// written here as plain loops over the stream history: longest stream over
// all window distances, capped at max_len, lowest end address on a tie,
// literal when the longest stream is shorter than two. The design is then
// reset into decode mode, the codewords it produced are fed back (with
// gaps), and the decoded symbols must equal the original stream. The run is
// repeated with a second maximum match length, and once more on the short
// sentence "This is a book. That is a pen. Those books are mine.".
// Latency and rate are checked: the last codeword one cycle after flush,
// decoding at one symbol per cycle. Each mechanism (literal, match,
// maximum-length cut, symbol with no hit, tie between candidates,
// overlapping copy, window wrap, idle input, decoder stall, mode switch,
// flush) must occur at least once.
module tb_lz77_codec;
  import lz77_pkg::*;

  localparam int unsigned WINDOW  = 64;
  localparam int unsigned MAX_LEN = 8;
  localparam int unsigned ROW_W   = 8;
  localparam int unsigned SYM_W   = 8;
  localparam int unsigned N_SYM   = 1500;
  localparam int unsigned AW      = $clog2(WINDOW);
  localparam int unsigned LW      = $clog2(MAX_LEN + 1);
  localparam int unsigned LFW     = $clog2(MAX_LEN);
  localparam int unsigned BW      = AW + LFW;
  localparam int unsigned WATCHDOG = 200000;

  logic clk = 1'b0;
  logic rst_n;
  logic mode_decode;
  logic [LW-1:0] max_len;
  logic in_valid, flush;
  logic [SYM_W-1:0] in_sym;
  logic cw_valid;
  cw_id_e cw_id;
  logic [BW-1:0] cw_body;
  logic dcw_valid, dcw_ready;
  cw_id_e dcw_id;
  logic [BW-1:0] dcw_body;
  logic out_valid;
  logic [SYM_W-1:0] out_sym;

  always #5 clk = ~clk;

  lz77_codec #(.WINDOW(WINDOW), .MAX_LEN(MAX_LEN), .ROW_W(ROW_W), .SYM_W(SYM_W)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_literal, n_match, n_maxcut, n_nohit, n_tie, n_overlap, n_wrap, n_idle,
      n_dstall, n_mode_switch, n_flush;

  logic [SYM_W-1:0] data [N_SYM];
  string sentence = "This is a book. That is a pen. Those books are mine.";
  typedef struct packed { logic id; logic [BW-1:0] body; } cw_t;
  cw_t exp_q[$], got_q[$];
  int  got_cycle[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic gen_data();
    int k = 0;
    while (k < N_SYM) begin
      int r = $urandom_range(0, 9);
      if (r < 3) begin
        int len = $urandom_range(1, 6);
        for (int i = 0; i < len && k < N_SYM; i++) data[k++] = SYM_W'("a" + $urandom_range(0, 3));
      end else if (r < 4) begin
        data[k++] = SYM_W'($urandom_range(0, 255));
      end else if (r < 5) begin
        int len = $urandom_range(3, 2 * MAX_LEN);
        logic [SYM_W-1:0] s = SYM_W'("A" + $urandom_range(0, 3));
        for (int i = 0; i < len && k < N_SYM; i++) data[k++] = s;
      end else if (k > 0) begin
        int d   = $urandom_range(1, WINDOW + WINDOW / 4);
        int len = $urandom_range(2, MAX_LEN + 8);
        if (d > k) d = k;
        for (int i = 0; i < len && k < N_SYM; i++) begin
          data[k] = data[k - d];
          k++;
        end
      end
    end
  endtask

  // Reference encoder.
  task automatic ref_encode(input int lmax, input int n);
    int s = 0;
    exp_q.delete();
    while (s < n) begin
      int best = 0, best_d = 0, best_end = 0, nbest = 0;
      int cap = (lmax < n - s) ? lmax : n - s;
      int dmax = (s < WINDOW) ? s : WINDOW;
      for (int d = 1; d <= dmax; d++) begin
        int r = 0;
        while (r < cap && data[s + r] == data[s + r - d]) r++;
        if (r > 0) begin
          int e = (s + r - 1 - d) % WINDOW;
          if (r > best || (r == best && e < best_end)) begin
            if (r > best) nbest = 0;
            best = r; best_d = d; best_end = e;
          end
          if (r == best) nbest++;
        end
      end
      if (best <= 1) begin
        exp_q.push_back({ID_LITERAL, BW'(data[s])});
        if (best == 0) n_nohit++;
        s++;
      end else begin
        int start = (s - best_d) % WINDOW;
        exp_q.push_back({ID_MATCH, AW'(start), LFW'(best - 1)});
        if (best == lmax && s + best < n && data[s + best] == data[s + best - best_d]) n_maxcut++;
        if (nbest > 1) n_tie++;
        if (best_d < best) n_overlap++;
        if (start + best > WINDOW) n_wrap++;
        s += best;
      end
    end
  endtask

  // Codeword monitor (encode mode).
  always @(posedge clk) begin
    if (rst_n && !mode_decode && cw_valid) begin
      got_q.push_back({cw_id, cw_body});
      got_cycle.push_back(cycle);
    end
  end

  task automatic do_reset(input logic dec);
    rst_n = 1'b0; in_valid = 1'b0; flush = 1'b0; dcw_valid = 1'b0;
    in_sym = '0; dcw_id = ID_LITERAL; dcw_body = '0;
    if (mode_decode != dec) n_mode_switch++;
    mode_decode = dec;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic run_pass(input int lmax, input int n);
    cw_t cws[$];
    int flush_cycle, first_out, last_out, nout;
    // ---- encode ----
    do_reset(1'b0);
    max_len = LW'(lmax);
    got_q.delete(); got_cycle.delete();
    for (int k = 0; k < n; k++) begin
      if ($urandom_range(0, 15) == 0) begin
        @(negedge clk); in_valid = 1'b0; n_idle++;
      end
      @(negedge clk); in_valid = 1'b1; in_sym = data[k];
    end
    @(negedge clk); in_valid = 1'b0; flush = 1'b1; flush_cycle = cycle; n_flush++;
    @(negedge clk); flush = 1'b0;
    repeat (4) @(negedge clk);
    ref_encode(lmax, n);
    check(got_q.size() == exp_q.size(),
          $sformatf("codeword count %0d, expected %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++) begin
      check(got_q[i] == exp_q[i], $sformatf("codeword %0d: got %b/%h expected %b/%h",
            i, got_q[i].id, got_q[i].body, exp_q[i].id, exp_q[i].body));
      if (exp_q[i].id == ID_LITERAL) n_literal++; else n_match++;
    end
    if (got_cycle.size() > 0)
      check(got_cycle[got_cycle.size() - 1] == flush_cycle + 1,
            "last codeword not one cycle after flush");
    cws = got_q;
    // ---- decode ----
    do_reset(1'b1);
    nout = 0; first_out = -1; last_out = -1;
    fork
      begin
        foreach (cws[i]) begin
          @(negedge clk);
          dcw_valid = 1'b1; dcw_id = cw_id_e'(cws[i].id); dcw_body = cws[i].body;
          @(posedge clk);
          while (!dcw_ready) begin n_dstall++; @(posedge clk); end
        end
        @(negedge clk) dcw_valid = 1'b0;
      end
      begin
        while (nout < n) begin
          @(posedge clk);
          if (out_valid) begin
            if (first_out < 0) first_out = cycle;
            last_out = cycle;
            check(out_sym == data[nout], $sformatf("decoded symbol %0d: %h expected %h",
                  nout, out_sym, data[nout]));
            nout++;
          end
        end
      end
    join
    repeat (3) @(posedge clk);
    check(!out_valid, "decoder produced extra symbols");
    check(last_out - first_out == n - 1,
          $sformatf("decoding rate: %0d symbols in %0d cycles", n, last_out - first_out + 1));
  endtask

  initial begin
    mode_decode = 1'b0;
    max_len = LW'(MAX_LEN);
    gen_data();
    run_pass(MAX_LEN, N_SYM);
    run_pass(4, N_SYM / 2);
    // the classic example sentence, from an empty window
    for (int i = 0; i < sentence.len(); i++) data[i] = sentence[i];
    run_pass(MAX_LEN, sentence.len());
    check(n_literal > 0, "no literal codeword");
    check(n_match > 0, "no match codeword");
    check(n_maxcut > 0, "maximum length never cut a stream");
    check(n_nohit > 0, "no symbol without hit");
    check(n_tie > 0, "no tie between candidate streams");
    check(n_overlap > 0, "no overlapping match");
    check(n_wrap > 0, "no match across the window wrap");
    check(n_idle > 0, "no idle input cycle");
    check(n_dstall > 0, "decoder never stalled its input");
    check(n_mode_switch > 0, "no mode switch");
    check(n_flush > 0, "no flush");
    $display("mechanisms: literal=%0d match=%0d maxcut=%0d nohit=%0d tie=%0d overlap=%0d wrap=%0d idle=%0d dstall=%0d modesw=%0d flush=%0d",
             n_literal, n_match, n_maxcut, n_nohit, n_tie, n_overlap, n_wrap, n_idle,
             n_dstall, n_mode_switch, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
