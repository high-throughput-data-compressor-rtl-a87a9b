// tb_lz77_decoder: self-checking test of the decoder (32-symbol window,
// maximum length 8) with a plain array standing in for the CAM's write
// (cyclic) and read (random-access, read before write) ports.
// Codewords are generated from a known symbol stream: literals, and matches
// of random length at random distances up to the full window, overlapping
// matches included. Gaps in cw_valid test the handshake. The decoded
// symbols must equal the stream, one per cycle while codewords are waiting.
module tb_lz77_decoder;
  import lz77_pkg::*;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned MAX_LEN = 8;
  localparam int unsigned SYM_W = 8;
  localparam int unsigned AW = 5, LFW = 3, BW = 8;
  localparam int unsigned N = 3000;

  logic clk = 1'b0, rst_n;
  logic cw_valid, cw_ready, out_valid, cam_we;
  cw_id_e cw_id;
  logic [BW-1:0] cw_body;
  logic [SYM_W-1:0] out_sym, cam_wdata, cam_rd_data;
  logic [AW-1:0] cam_rd_addr;

  always #5 clk = ~clk;
  lz77_decoder #(.DEPTH(DEPTH), .MAX_LEN(MAX_LEN), .SYM_W(SYM_W)) dut (.*);

  // window model
  logic [SYM_W-1:0] win [DEPTH];
  int wp = 0;
  assign cam_rd_data = win[cam_rd_addr];
  always @(posedge clk) if (rst_n && cam_we) begin win[wp] <= cam_wdata; wp <= (wp + 1) % DEPTH; end

  int checks = 0, failures = 0;
  logic [SYM_W-1:0] data [N];
  typedef struct packed { logic id; logic [BW-1:0] body; } cw_t;
  cw_t cws[$];
  int nout = 0, n_overlap = 0, n_full = 0, n_gap = 0, busy_cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic gen();
    int k = 0;
    while (k < N) begin
      if (k < 2 || $urandom_range(0, 2) == 0) begin
        data[k] = SYM_W'($urandom);
        cws.push_back({ID_LITERAL, BW'(data[k])});
        k++;
      end else begin
        int d = $urandom_range(1, (k < DEPTH) ? k : DEPTH);
        int l = $urandom_range(2, MAX_LEN);
        if (l > N - k) l = N - k;
        if (l < 2) begin data[k] = SYM_W'($urandom); cws.push_back({ID_LITERAL, BW'(data[k])}); k++; continue; end
        if (d < l) n_overlap++;
        if (d == DEPTH) n_full++;
        cws.push_back({ID_MATCH, AW'((k - d) % DEPTH), LFW'(l - 1)});
        for (int i = 0; i < l; i++) begin data[k] = data[k - d]; k++; end
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; cw_valid = 0; cw_id = ID_LITERAL; cw_body = '0;
    gen();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      begin
        foreach (cws[i]) begin
          @(negedge clk);
          if ($urandom_range(0, 9) == 0) begin cw_valid = 0; n_gap++; @(negedge clk); end
          cw_valid = 1; cw_id = cw_id_e'(cws[i].id); cw_body = cws[i].body;
          @(posedge clk);
          while (!cw_ready) @(posedge clk);
        end
        @(negedge clk) cw_valid = 0;
      end
      begin
        while (nout < N) begin
          @(posedge clk);
          if (out_valid) begin
            check(out_sym == data[nout], $sformatf("symbol %0d: %h expected %h", nout, out_sym, data[nout]));
            nout++;
          end
          busy_cycles++;
        end
      end
    join
    // one symbol per cycle apart from the inserted gaps (plus pipeline slack)
    check(busy_cycles <= N + n_gap + 3, $sformatf("rate: %0d symbols took %0d cycles, %0d gaps", N, busy_cycles, n_gap));
    check(n_overlap > 0 && n_full > 0, "overlapping and full-window matches must occur");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
