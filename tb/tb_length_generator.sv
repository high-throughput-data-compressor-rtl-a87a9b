// tb_length_generator: self-checking test of the length generator.
// Random global-match patterns with long runs, symbol gaps, flushes and a
// changing maximum length; a reference counter predicts sync, length and
// mode (sync delayed by one symbol). Stream ends by no match and by the
// maximum length must both occur.
module tb_length_generator;
  localparam int unsigned MAX_LEN = 32;
  localparam int unsigned LW = $clog2(MAX_LEN + 1);
  logic clk = 1'b0, rst_n;
  logic en, flush, gmatch, sync, mode;
  logic [LW-1:0] max_len, length;

  always #5 clk = ~clk;
  length_generator #(.MAX_LEN(MAX_LEN)) dut (.*);

  int checks = 0, failures = 0;
  int len, md, n_max = 0, n_nomatch = 0;
  bit esync;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; en = 0; flush = 0; gmatch = 0; max_len = LW'(MAX_LEN);
    len = 0; md = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t % 700 == 0) max_len = LW'($urandom_range(2, MAX_LEN));
      flush = $urandom_range(0, 99) == 0;
      en = !flush && $urandom_range(0, 7) != 0;
      gmatch = $urandom_range(0, 19) != 0;
      #1;
      esync = (en && (!gmatch || len >= max_len)) || flush;
      check(sync == esync, $sformatf("t=%0d sync", t));
      check(length == LW'(len), $sformatf("t=%0d length %0d expected %0d", t, length, len));
      check(mode == md[0], $sformatf("t=%0d mode", t));
      if (en && gmatch && len >= max_len) n_max++;
      if (en && !gmatch) n_nomatch++;
      @(posedge clk);
      if (flush) begin len = 0; md = 0; end
      else if (en) begin len = esync ? 1 : len + 1; md = esync; end
    end
    check(n_max > 0 && n_nomatch > 0, "both stream-end causes must occur");
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
