// tb_hist_full: one complete VGA frame through the full-size engine.
//
// The engine runs at its default size: 8-bit pixels, 256 bins in 128 cells,
// 24-bit counters, single-edge input at one pixel per clock cycle. The test
// streams a 640 x 480 frame (307,200 pixels) without gaps. The image is
// generated: a diagonal gradient, (x + y) mod 256, with random noise added in
// one pixel of eight, so every bin is hit and the counts differ from bin to
// bin. When the retired flags have counted every pixel all 256 bins are
// compared with a software histogram, and the frame must have taken
// n + m + 1 cycles (n pixels, m = 256 cycles of array latency, one
// demultiplexer cycle).
module tb_hist_full;
  localparam int W = 640, H = 480;
  localparam int N = W * H;
  localparam int M = 256;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [7:0] s_data = '0;
  logic s_valid = 1'b0;
  logic [23:0] hist [M];
  logic [1:0] retired;
  int checks = 0, failures = 0;

  hist_top dut (.clk, .rst_n, .clear, .s_data, .s_valid, .hist, .retired);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, ret = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) ret += int'(retired[0]) + int'(retired[1]);
  end

  int ref_h [M];
  int start, done;

  initial begin
    for (int b = 0; b < M; b++) ref_h[b] = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (M) @(posedge clk);
    #2;
    start = cyc;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic [7:0] px;
        px = 8'(x + y);
        if ($urandom_range(0, 7) == 0) px = px + 8'($urandom_range(0, 31));
        s_data = px;
        s_valid = 1'b1;
        ref_h[px]++;
        @(posedge clk); #2;
      end
    s_valid = 1'b0;
    while (ret < N) begin @(posedge clk); #2; end
    done = cyc;
    for (int b = 0; b < M; b++) begin
      checks++;
      if (int'(hist[b]) != ref_h[b]) begin
        failures++;
        $display("FAIL bin %0d: got %0d expected %0d", b, hist[b], ref_h[b]);
      end
    end
    checks++;
    if (done - start != N + M + 1) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", done - start, N + M + 1);
    end
    $display("frame of %0d pixels complete after %0d cycles", N, done - start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
