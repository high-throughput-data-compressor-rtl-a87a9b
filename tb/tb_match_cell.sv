// tb_match_cell: self-checking test of one match cell.
// Drives random enables, presets, modes and inputs, keeps its own copy of
// the permission and last-hit state, and checks the match output each cycle,
// including the preset value after reset.
module tb_match_cell;
  logic clk = 1'b0, rst_n;
  logic en, preset, mode, match_perm_in, last_hit_in, hit, match;

  always #5 clk = ~clk;
  match_cell dut (.*);

  int checks = 0, failures = 0;
  logic perm, lh;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; en = 0; preset = 0; mode = 0; match_perm_in = 0; last_hit_in = 0; hit = 0;
    perm = 1'b1; lh = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en = $urandom_range(0, 3) != 0;
      preset = $urandom_range(0, 15) == 0;
      mode = $urandom_range(0, 1);
      match_perm_in = $urandom_range(0, 1);
      last_hit_in = $urandom_range(0, 1);
      hit = $urandom_range(0, 3) != 0;
      #1;
      check(match == ((mode ? lh : perm) && hit), $sformatf("t=%0d match", t));
      @(posedge clk);
      if (preset) perm = 1'b1;
      else if (en) begin perm = match_perm_in; lh = last_hit_in; end
    end
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
