// tb_hist_top: end-to-end test of the histogram engine in both input modes.
//
// Two engines with 4-bit pixels (16 bins, 8 cells, m = 16) are driven:
//   alt: single-edge demultiplexer, at most one pixel per cycle;
//   ddr: dual-edge demultiplexer, up to two pixels per cycle.
// Each runs several frames of random pixels (some with idle cycles). A frame
// ends when the retired flags have counted all its pixels; then every bin is
// compared with a software histogram, and a clear starts the next frame.
// Gap-free frames also check the cycle count: with the single-edge input a
// frame of n pixels is complete n + m + 1 cycles after its first pixel is
// presented (one demultiplexer cycle plus the array's n + m); with the
// dual-edge input it is n/2 + m + 1.
// Mechanisms counted, each of which must occur: pixels on lane 1, pixels on
// lane 2, both lanes valid in one cycle, both interleaved partial sums of a
// C-slow accumulator non-zero at once, clears, frames checked in each mode.
module tb_hist_top;
  localparam int unsigned PIX_W = 4, COUNT_W = 16;
  localparam int M = 2 ** PIX_W;
  localparam int NFRAMES = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear_a = 1'b0, clear_d = 1'b0;
  logic [PIX_W-1:0] a_data = '0, d_data = '0;
  logic a_valid = 1'b0, d_valid = 1'b0;
  logic [COUNT_W-1:0] a_hist [M], d_hist [M];
  logic [1:0] a_ret, d_ret;
  int checks = 0, failures = 0;

  hist_top #(.PIX_W(PIX_W), .COUNT_W(COUNT_W), .DUAL_EDGE(1'b0)) top_alt (
    .clk, .rst_n, .clear(clear_a), .s_data(a_data), .s_valid(a_valid),
    .hist(a_hist), .retired(a_ret));
  hist_top #(.PIX_W(PIX_W), .COUNT_W(COUNT_W), .DUAL_EDGE(1'b1)) top_ddr (
    .clk, .rst_n, .clear(clear_d), .s_data(d_data), .s_valid(d_valid),
    .hist(d_hist), .retired(d_ret));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // Mechanism counters, sampled on every rising edge.
  int n_lane1 = 0, n_lane2 = 0, n_both = 0, n_interleave = 0, n_clear = 0;
  int n_frames_alt = 0, n_frames_ddr = 0;
  int cyc = 0;
  int ret_a = 0, ret_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_lane1 += int'(top_alt.u_demux.s1_valid) + int'(top_ddr.u_demux.s1_valid);
      n_lane2 += int'(top_alt.u_demux.s2_valid) + int'(top_ddr.u_demux.s2_valid);
      n_both  += int'(top_ddr.u_demux.s1_valid && top_ddr.u_demux.s2_valid);
      if (top_alt.u_array.g_cell[0].u_cell.u_acc0.r != 0 &&
          top_alt.u_array.g_cell[0].u_cell.u_acc0.r_prime != 0) n_interleave++;
      n_clear += int'(clear_a) + int'(clear_d);
      ret_a += int'(a_ret[0]) + int'(a_ret[1]);
      ret_d += int'(d_ret[0]) + int'(d_ret[1]);
    end
  end

  int ref_h [M];

  task automatic compare(input string mode, input logic [COUNT_W-1:0] h [M]);
    for (int b = 0; b < M; b++) check($sformatf("%s bin %0d", mode, b), h[b], ref_h[b]);
  endtask

  // Single-edge frame: n pixels, idle cycles if gaps.
  task automatic frame_alt(input int n, input bit gaps);
    int sent = 0, start, ret0, done;
    for (int b = 0; b < M; b++) ref_h[b] = 0;
    ret0 = ret_a;
    start = cyc;
    while (sent < n) begin
      if (gaps && $urandom_range(0, 3) == 0) a_valid = 1'b0;
      else begin
        a_data = PIX_W'($urandom);
        a_valid = 1'b1;
        ref_h[a_data]++;
        sent++;
      end
      @(posedge clk); #2;
    end
    a_valid = 1'b0;
    while (ret_a - ret0 < n) begin @(posedge clk); #2; end
    done = cyc;  // cycles counted from the first pixel's cycle to the last retire
    compare("alt", a_hist);
    if (!gaps) check($sformatf("alt frame of %0d: cycles", n), done - start, n + M + 1);
    n_frames_alt++;
    clear_a = 1'b1; @(posedge clk); #2 clear_a = 1'b0;
    compare_zero("alt", a_hist);
  endtask

  task automatic compare_zero(input string mode, input logic [COUNT_W-1:0] h [M]);
    for (int b = 0; b < M; b++) check($sformatf("%s bin %0d after clear", mode, b), h[b], 0);
  endtask

  // Dual-edge frame: n (even) pixels, two per cycle; enters just after a
  // rising edge + 2.
  task automatic frame_ddr(input int n, input bit gaps);
    int sent = 0, start, ret0, done;
    for (int b = 0; b < M; b++) ref_h[b] = 0;
    ret0 = ret_d;
    start = cyc;  // the first pixel is presented in this cycle
    while (sent < n) begin
      // pixel for the rising edge
      @(negedge clk); #2;
      if (gaps && $urandom_range(0, 3) == 0) d_valid = 1'b0;
      else begin d_data = PIX_W'($urandom); d_valid = 1'b1; ref_h[d_data]++; sent++; end
      // pixel for the falling edge
      @(posedge clk); #2;
      if (sent < n && !(gaps && $urandom_range(0, 3) == 0)) begin
        d_data = PIX_W'($urandom); d_valid = 1'b1; ref_h[d_data]++; sent++;
      end else d_valid = 1'b0;
    end
    @(negedge clk); #2 d_valid = 1'b0;
    @(posedge clk); #2;
    while (ret_d - ret0 < n) begin @(posedge clk); #2; end
    done = cyc;
    compare("ddr", d_hist);
    if (!gaps) check($sformatf("ddr frame of %0d: cycles", n), done - start, n / 2 + M + 1);
    n_frames_ddr++;
    clear_d = 1'b1; @(posedge clk); #2 clear_d = 1'b0;
    compare_zero("ddr", d_hist);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (2 * M) @(posedge clk);
    #2;
    for (int f = 0; f < NFRAMES; f++) frame_alt(64 + 37 * f, f[0]);
    for (int f = 0; f < NFRAMES; f++) frame_ddr(64 + 38 * f, f[0]);
    $display("mechanisms: lane1=%0d lane2=%0d both_lanes=%0d cslow_interleave=%0d clears=%0d frames alt=%0d ddr=%0d",
             n_lane1, n_lane2, n_both, n_interleave, n_clear, n_frames_alt, n_frames_ddr);
    check("lane 1 used", n_lane1 > 0, 1);
    check("lane 2 used", n_lane2 > 0, 1);
    check("both lanes in one cycle", n_both > 0, 1);
    check("two interleaved partial sums", n_interleave > 0, 1);
    check("clear", n_clear > 0, 1);
    check("frames alt", n_frames_alt, NFRAMES);
    check("frames ddr", n_frames_ddr, NFRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
