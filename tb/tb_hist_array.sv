// tb_hist_array: self-checking test of the pipelined array of C-slow cells.
//
// Runs with 4-bit pixels: 16 bins in 8 cells, latency m = 16 cycles.
// Phase 1: 500 cycles of random pixels on both lanes with random valid bits.
//   Every cycle all 16 bins are compared with a model in which a pixel that
//   entered in cycle t is counted in the bin pair of cell k from cycle
//   t + 2k + 2 on; the lanes at the end of the chain must carry the inputs of
//   m cycles ago.
// Phase 2 (after a clear): n = 40 pixels, one per cycle on alternating lanes,
//   the last one of value 15 (last cell). The histogram must be complete in
//   cycle n - 1 + m counted from the first pixel, i.e. after n + m cycles,
//   and not one cycle earlier.
module tb_hist_array;
  localparam int unsigned PIX_W = 4, COUNT_W = 16;
  localparam int M = 2 ** PIX_W;
  localparam int NCYC = 500;
  localparam int N2 = 40;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [PIX_W-1:0] x1_in = '0, x2_in = '0, x1_out, x2_out, sout;
  logic x1_vld_in = 1'b0, x2_vld_in = 1'b0, x1_vld_out, x2_vld_out;
  logic [COUNT_W-1:0] hist [M];
  int checks = 0, failures = 0;

  hist_array #(.PIX_W(PIX_W), .COUNT_W(COUNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [PIX_W-1:0] h1 [NCYC], h2 [NCYC];
  logic             hv1 [NCYC], hv2 [NCYC];

  // Expected count of bin b in cycle j for the phase-1 history.
  function automatic int expected(int b, int j);
    int k = b / 2, c = 0;
    for (int t = 0; t <= j - 2 * k - 2 && t < NCYC; t++) begin
      if (hv1[t] && h1[t] == PIX_W'(b)) c++;
      if (hv2[t] && h2[t] == PIX_W'(b)) c++;
    end
    return c;
  endfunction

  int ref2 [M];
  int done_cycle, early_ok;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Phase 1
    for (int j = 0; j < NCYC + M + 4; j++) begin
      if (j < NCYC) begin
        h1[j] = PIX_W'($urandom); h2[j] = PIX_W'($urandom);
        hv1[j] = ($urandom_range(0, 3) != 0); hv2[j] = ($urandom_range(0, 3) != 0);
        x1_in = h1[j]; x2_in = h2[j]; x1_vld_in = hv1[j]; x2_vld_in = hv2[j];
      end else begin
        x1_vld_in = 1'b0; x2_vld_in = 1'b0;
      end
      @(negedge clk);
      for (int b = 0; b < M; b++)
        check($sformatf("bin %0d cycle %0d", b, j), hist[b], expected(b, j));
      if (j >= M && j - M < NCYC) begin
        check("x1_vld_out", x1_vld_out, hv1[j-M]);
        check("x2_vld_out", x2_vld_out, hv2[j-M]);
        if (hv1[j-M]) check("x1_out", x1_out, h1[j-M]);
        if (hv2[j-M]) check("x2_out", x2_out, h2[j-M]);
      end
      if (j >= M) check("sout", sout, 0);
      @(posedge clk); #1;
    end
    // Phase 2
    clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    for (int b = 0; b < M; b++) ref2[b] = 0;
    done_cycle = -1; early_ok = 0;
    for (int j = 0; j < N2 + M + 4; j++) begin
      logic [PIX_W-1:0] px;
      x1_vld_in = 1'b0; x2_vld_in = 1'b0;
      if (j < N2) begin
        px = (j == N2 - 1) ? PIX_W'(M - 1) : PIX_W'($urandom);
        ref2[px]++;
        if (j % 2 == 0) begin x1_in = px; x1_vld_in = 1'b1; end
        else            begin x2_in = px; x2_vld_in = 1'b1; end
      end
      @(negedge clk);
      if (done_cycle < 0) begin
        bit all;
        all = 1'b1;
        for (int b = 0; b < M; b++) if (int'(hist[b]) != ref2[b]) all = 1'b0;
        if (all) done_cycle = j;
      end
      @(posedge clk); #1;
    end
    $display("phase 2: %0d pixels complete in cycle %0d (n + m - 1 = %0d)", N2, done_cycle, N2 + M - 1);
    check("histogram complete after n + m cycles", done_cycle, N2 + M - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
