// tb_match_cell_array: self-checking test of the ring of match cells.
// Random hit vectors, modes and presets; a vector-level reference (the
// match and hit vectors of the previous symbol rotated by one cell, with
// cell 0 fed from the last cell) predicts every match output.
module tb_match_cell_array;
  localparam int unsigned N = 16;
  logic clk = 1'b0, rst_n;
  logic en, preset, mode;
  logic [N-1:0] hit, match;

  always #5 clk = ~clk;
  match_cell_array #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  logic [N-1:0] perm, lh, exp_match;
  int n_wrap = 0;

  function automatic logic [N-1:0] rotl(input logic [N-1:0] v);
    return {v[N-2:0], v[N-1]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; en = 0; preset = 0; mode = 0; hit = '0;
    perm = '1; lh = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      en = $urandom_range(0, 4) != 0;
      preset = $urandom_range(0, 31) == 0;
      mode = $urandom_range(0, 2) == 0;
      for (int i = 0; i < N; i++) hit[i] = $urandom_range(0, 2) != 0;
      #1;
      exp_match = (mode ? lh : perm) & hit;
      check(match == exp_match, $sformatf("t=%0d match %b expected %b", t, match, exp_match));
      if (exp_match[0] && (mode ? lh[0] : perm[0])) n_wrap++;
      @(posedge clk);
      if (preset) perm = '1;
      else if (en) begin perm = rotl(exp_match); lh = rotl(hit); end
    end
    check(n_wrap > 0, "wrap from last cell to cell 0 never exercised");
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
