// tb_cam: self-checking test of the CAM.
// Writes random symbols from a small alphabet (so hits are frequent) past
// the end of a 16-cell window, and each cycle checks the hit vector against
// a reference array with valid bits, the random-access read port and the
// ring-counter write address, including the read-before-write behaviour of a
// cell written in the same cycle. A reset after the window is full must stop
// the old contents from hitting.
module tb_cam;
  localparam int unsigned DEPTH = 16;
  localparam int unsigned SYM_W = 8;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n;
  logic [SYM_W-1:0] key, wdata, rd_data;
  logic [DEPTH-1:0] hit;
  logic we;
  logic [AW-1:0] wptr, rd_addr;

  always #5 clk = ~clk;
  cam #(.DEPTH(DEPTH), .SYM_W(SYM_W)) dut (.*);

  int checks = 0, failures = 0;
  logic [SYM_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0] vld;
  int ptr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [DEPTH-1:0] exp_hit;
    rst_n = 1'b0; we = 1'b0; key = '0; wdata = '0; rd_addr = '0;
    vld = '0; ptr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // Fill the window, then reset: the old contents must no longer hit.
    for (int t = 0; t < DEPTH; t++) begin
      @(negedge clk); we = 1'b1; wdata = SYM_W'(t % 6);
    end
    @(negedge clk); we = 1'b0; rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      key = SYM_W'($urandom_range(0, 5));
      we = ($urandom_range(0, 3) != 0);
      wdata = SYM_W'($urandom_range(0, 5));
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      #1;
      for (int i = 0; i < DEPTH; i++) exp_hit[i] = vld[i] && mem[i] == key;
      check(hit == exp_hit, $sformatf("t=%0d hit %b expected %b", t, hit, exp_hit));
      check(wptr == AW'(ptr), $sformatf("t=%0d wptr %0d expected %0d", t, wptr, ptr));
      if (vld[rd_addr])
        check(rd_data == mem[rd_addr], $sformatf("t=%0d read %0d", t, rd_addr));
      @(posedge clk);
      if (we) begin mem[ptr] = wdata; vld[ptr] = 1'b1; ptr = (ptr + 1) % DEPTH; end
    end
    check(vld == '1, "window never filled");
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
