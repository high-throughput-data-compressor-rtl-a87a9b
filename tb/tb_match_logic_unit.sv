// tb_match_logic_unit: self-checking test of the match logic unit
// (32 cells as 4 rows of 8, maximum length 8).
// Random hit vectors dense enough for streams of several symbols, symbol
// gaps and flushes. A vector-level reference of the unit (rotated match and
// hit vectors, length counter, sync and mode) predicts match, global match,
// sync and length every cycle, and the position of the stream's last cell
// whenever a stream of two or more symbols ends.
module tb_match_logic_unit;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned ROW_W = 8;
  localparam int unsigned MAX_LEN = 8;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned LW = $clog2(MAX_LEN + 1);

  logic clk = 1'b0, rst_n;
  logic en, flush, sync, gmatch, mode;
  logic [DEPTH-1:0] hit, match;
  logic [LW-1:0] max_len, length;
  logic [AW-1:0] position;

  always #5 clk = ~clk;
  match_logic_unit #(.DEPTH(DEPTH), .ROW_W(ROW_W), .MAX_LEN(MAX_LEN)) dut (.*);

  int checks = 0, failures = 0;
  logic [DEPTH-1:0] perm, lh, em;
  int len, md, last_low, low, n_max = 0, n_end = 0;
  bit esync;

  function automatic logic [DEPTH-1:0] rotl(input logic [DEPTH-1:0] v);
    return {v[DEPTH-2:0], v[DEPTH-1]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; en = 0; flush = 0; hit = '0; max_len = LW'(MAX_LEN);
    perm = '1; lh = '0; len = 0; md = 0; last_low = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t == 2000) max_len = LW'(4);
      flush = $urandom_range(0, 199) == 0;
      en = !flush && $urandom_range(0, 9) != 0;
      for (int i = 0; i < DEPTH; i++) hit[i] = $urandom_range(0, 2) != 0;
      #1;
      em = (md[0] ? lh : perm) & hit;
      low = -1;
      for (int i = DEPTH - 1; i >= 0; i--) if (em[i]) low = i;
      esync = (en && (em == '0 || len >= max_len)) || flush;
      check(match == em, $sformatf("t=%0d match", t));
      check(gmatch == (em != '0), $sformatf("t=%0d gmatch", t));
      check(sync == esync, $sformatf("t=%0d sync", t));
      check(length == LW'(len), $sformatf("t=%0d length %0d expected %0d", t, length, len));
      if (esync && len >= 2) begin
        n_end++;
        if (len >= max_len && en && em != '0) n_max++;
        check(position == AW'(last_low), $sformatf("t=%0d position %0d expected %0d", t, position, last_low));
      end
      @(posedge clk);
      if (flush) begin perm = '1; len = 0; md = 0; end
      else if (en) begin
        perm = rotl(em); lh = rotl(hit);
        len = esync ? 1 : len + 1; md = esync;
        last_low = low;
      end
    end
    check(n_end > 0 && n_max > 0, "streams ending by mismatch and by maximum length must occur");
    $display("ends=%0d maxcut=%0d", n_end, n_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
