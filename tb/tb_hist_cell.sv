// tb_hist_cell: self-checking test of one C-slow histogram cell.
//
// The cell is given the bin index sin = 6 (bins 6 and 7) with the default
// 8-bit pixels. For 600 cycles each lane gets a random pixel, drawn mostly
// from values 4..9 so that both bins and their neighbours are hit often,
// with a random valid bit. Checked every cycle:
//   - x1_out, x2_out and their valid bits are the inputs of two cycles ago,
//     sout is sin + 2 (two-stage pass-through, two-cycle cell latency);
//   - r2_out (bin 6) and r1_out (bin 7) equal the number of valid lane
//     pixels of that value presented up to two cycles ago.
// Cycles with both lanes hitting the same bin are counted and must occur.
// A clear then returns both counts to zero.
module tb_hist_cell;
  localparam int unsigned PIX_W = 8, COUNT_W = 24;
  localparam int NCYC = 600;
  localparam int SIN = 6;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [PIX_W-1:0] sin = PIX_W'(SIN), x1_in = '0, x2_in = '0;
  logic x1_vld_in = 1'b0, x2_vld_in = 1'b0;
  logic [PIX_W-1:0] sout, x1_out, x2_out;
  logic x1_vld_out, x2_vld_out;
  logic [COUNT_W-1:0] r1_out, r2_out;
  int checks = 0, failures = 0;

  hist_cell #(.PIX_W(PIX_W), .COUNT_W(COUNT_W)) dut (.*);

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
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [PIX_W-1:0] pick();
    if ($urandom_range(0, 3) == 0) return PIX_W'($urandom);
    return PIX_W'($urandom_range(4, 9));
  endfunction

  // Per-cycle history of what was applied.
  logic [PIX_W-1:0] h1 [NCYC], h2 [NCYC];
  logic             hv1 [NCYC], hv2 [NCYC];
  int cnt_even [NCYC+1], cnt_odd [NCYC+1];  // counts including cycle index-1
  int double_hits = 0;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);  // let sout settle
    #1;
    cnt_even[0] = 0; cnt_odd[0] = 0;
    for (int j = 0; j < NCYC; j++) begin
      h1[j] = pick(); h2[j] = pick();
      hv1[j] = ($urandom_range(0, 4) != 0);
      hv2[j] = ($urandom_range(0, 4) != 0);
      x1_in = h1[j]; x2_in = h2[j]; x1_vld_in = hv1[j]; x2_vld_in = hv2[j];
      cnt_even[j+1] = cnt_even[j] + int'(hv1[j] && h1[j] == PIX_W'(SIN))
                                  + int'(hv2[j] && h2[j] == PIX_W'(SIN));
      cnt_odd[j+1]  = cnt_odd[j]  + int'(hv1[j] && h1[j] == PIX_W'(SIN+1))
                                  + int'(hv2[j] && h2[j] == PIX_W'(SIN+1));
      if (hv1[j] && hv2[j] && h1[j] == h2[j] && h1[j] >> 1 == PIX_W'(SIN/2)) double_hits++;
      @(negedge clk);
      check("sout", sout, SIN + 2);
      if (j >= 2) begin
        check("x1_out", x1_out, h1[j-2]);
        check("x2_out", x2_out, h2[j-2]);
        check("x1_vld_out", x1_vld_out, hv1[j-2]);
        check("x2_vld_out", x2_vld_out, hv2[j-2]);
        check($sformatf("r2_out (bin %0d) cycle %0d", SIN, j), r2_out, cnt_even[j-1]);
        check($sformatf("r1_out (bin %0d) cycle %0d", SIN+1, j), r1_out, cnt_odd[j-1]);
      end
      @(posedge clk); #1;
    end
    x1_vld_in = 1'b0; x2_vld_in = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check("final r2_out", r2_out, cnt_even[NCYC]);
    check("final r1_out", r1_out, cnt_odd[NCYC]);
    check("both lanes hit one bin pair in a cycle", longint'(double_hits > 0), 1);
    clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    @(negedge clk);
    check("r2_out after clear", r2_out, 0);
    check("r1_out after clear", r1_out, 0);
    $display("cycles with both lanes hitting the cell: %0d", double_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
