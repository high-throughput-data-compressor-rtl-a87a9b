// tb_output_stage_unit: self-checking test of the output stage unit
// (2048-symbol window, maximum length 32: 11-bit start, 5-bit length).
// Random sync, length, position and symbols; every sync with a non-zero
// length must give exactly one codeword in the next cycle: a literal of the
// previous symbol for length 1, otherwise start = position - (length - 1)
// modulo 2048 (wrapping cases included) and the length field length - 1.
module tb_output_stage_unit;
  import lz77_pkg::*;
  localparam int unsigned DEPTH = 2048;
  localparam int unsigned MAX_LEN = 32;
  localparam int unsigned SYM_W = 8;
  localparam int unsigned AW = 11, LW = 6, LFW = 5, BW = 16;

  logic clk = 1'b0, rst_n;
  logic en, sync, cw_valid;
  logic [SYM_W-1:0] sym;
  logic [LW-1:0] length;
  logic [AW-1:0] position;
  cw_id_e cw_id;
  logic [BW-1:0] cw_body;

  always #5 clk = ~clk;
  output_stage_unit #(.DEPTH(DEPTH), .MAX_LEN(MAX_LEN), .SYM_W(SYM_W)) dut (.*);

  int checks = 0, failures = 0, n_wrap = 0, n_lit = 0, n_match = 0;
  int st;
  logic [SYM_W-1:0] prev;
  bit exp_valid;
  logic exp_id;
  logic [BW-1:0] exp_body;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; en = 0; sync = 0; sym = '0; length = '0; position = '0;
    prev = '0; exp_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      check(cw_valid == exp_valid, $sformatf("t=%0d cw_valid", t));
      if (exp_valid) begin
        check(cw_id == cw_id_e'(exp_id), $sformatf("t=%0d id", t));
        check(cw_body == exp_body, $sformatf("t=%0d body %h expected %h", t, cw_body, exp_body));
      end
      en = $urandom_range(0, 3) != 0;
      sym = SYM_W'($urandom);
      sync = $urandom_range(0, 2) == 0;
      length = LW'($urandom_range(0, 3) == 0 ? $urandom_range(0, 1) : $urandom_range(2, MAX_LEN));
      position = AW'($urandom_range(0, DEPTH - 1));
      @(posedge clk);
      exp_valid = sync && length != 0;
      if (exp_valid) begin
        if (length == 1) begin
          exp_id = 1'b1; exp_body = BW'(prev); n_lit++;
        end else begin
          st = (int'(position) - (int'(length) - 1) + DEPTH) % DEPTH;
          if (int'(position) < int'(length) - 1) n_wrap++;
          exp_id = 1'b0; exp_body = {AW'(st), LFW'(length - 1)}; n_match++;
        end
      end
      if (en) prev = sym;
    end
    check(n_wrap > 0 && n_lit > 0 && n_match > 0, "literal, match and wrapped start must occur");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
