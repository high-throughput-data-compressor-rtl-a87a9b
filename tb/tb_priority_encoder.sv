// tb_priority_encoder: self-checking test of the priority generator and
// encoder: sparse and dense random request vectors, the empty vector and
// every single-bit vector; the lowest requesting index must win.
module tb_priority_encoder;
  localparam int unsigned N = 32;
  localparam int unsigned IW = $clog2(N);
  logic [N-1:0] req, grant;
  logic [IW-1:0] idx;
  logic any;

  priority_encoder #(.N(N)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic try_req(input logic [N-1:0] r);
    int low = -1;
    req = r;
    #1;
    for (int i = N - 1; i >= 0; i--) if (r[i]) low = i;
    check(any == (low >= 0), "any");
    if (low >= 0) begin
      check(grant == (N'(1) << low), $sformatf("grant %h for %h", grant, r));
      check(idx == IW'(low), $sformatf("idx %0d for %h", idx, r));
    end else begin
      check(grant == '0, "grant with no request");
    end
  endtask

  initial begin
    try_req('0);
    for (int i = 0; i < N; i++) try_req(N'(1) << i);
    for (int t = 0; t < 500; t++) begin
      logic [N-1:0] r;
      for (int i = 0; i < N; i++) r[i] = $urandom_range(0, (t % 2) ? 1 : 12) == 0;
      try_req(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
