// tb_position_generator: self-checking test of the row/column partitioned
// position generator (64 cells as 8 rows of 8). Random sparse match vectors,
// often with several matching rows; checks the combinational global match
// and, one symbol later, the position of the lowest matching cell, with the
// pipeline registers holding while en is low.
module tb_position_generator;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned ROW_W = 8;
  localparam int unsigned AW = $clog2(DEPTH);
  logic clk = 1'b0, rst_n;
  logic en, gmatch, pos_valid;
  logic [DEPTH-1:0] match;
  logic [AW-1:0] position;

  always #5 clk = ~clk;
  position_generator #(.DEPTH(DEPTH), .ROW_W(ROW_W)) dut (.*);

  int checks = 0, failures = 0;
  int last_low, n_multirow = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; en = 0; match = '0; last_low = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      int low, rows;
      @(negedge clk);
      en = $urandom_range(0, 4) != 0;
      for (int i = 0; i < DEPTH; i++) match[i] = $urandom_range(0, 20) == 0;
      low = -1; rows = 0;
      #1;
      for (int i = DEPTH - 1; i >= 0; i--) if (match[i]) low = i;
      for (int r = 0; r < DEPTH / ROW_W; r++) if (|match[r*ROW_W +: ROW_W]) rows++;
      if (rows > 1) n_multirow++;
      check(gmatch == (low >= 0), $sformatf("t=%0d gmatch", t));
      check(pos_valid == (last_low >= 0), $sformatf("t=%0d pos_valid", t));
      if (last_low >= 0)
        check(position == AW'(last_low), $sformatf("t=%0d position %0d expected %0d", t, position, last_low));
      @(posedge clk);
      if (en) last_low = low;
    end
    check(n_multirow > 0, "never several matching rows");
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
