// tb_hist_ddr_frame: one VGA frame through the engine with dual-edge input.
//
// Same 8-bit, 256-bin, 24-bit engine as the default, but with DUAL_EDGE = 1:
// the source puts two pixels on s in every clock cycle, the first held around
// the rising edge and the second around the falling edge. A 640 x 480 frame
// (diagonal gradient with noise in one pixel of eight) is streamed without
// gaps. All 256 bins are compared with a software histogram once the retired
// flags have counted every pixel, and the frame must take n/2 + m + 1 cycles.
module tb_hist_ddr_frame;
  localparam int W = 640, H = 480;
  localparam int N = W * H;
  localparam int M = 256;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [7:0] s_data = '0;
  logic s_valid = 1'b0;
  logic [23:0] hist [M];
  logic [1:0] retired;
  int checks = 0, failures = 0;

  hist_top #(.DUAL_EDGE(1'b1)) dut (.clk, .rst_n, .clear, .s_data, .s_valid, .hist, .retired);

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
  int start, done, idx;

  function automatic logic [7:0] pixel(int i);
    logic [7:0] px;
    px = 8'((i % W) + (i / W));
    if ($urandom_range(0, 7) == 0) px = px + 8'($urandom_range(0, 31));
    return px;
  endfunction

  initial begin
    for (int b = 0; b < M; b++) ref_h[b] = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (M) @(posedge clk);
    #2;
    start = cyc;
    for (idx = 0; idx < N; idx += 2) begin
      logic [7:0] pa, pb;
      pa = pixel(idx); pb = pixel(idx + 1);
      ref_h[pa]++; ref_h[pb]++;
      @(negedge clk); #2 s_data = pa; s_valid = 1'b1;  // sampled on the rising edge
      @(posedge clk); #2 s_data = pb;                  // sampled on the falling edge
    end
    @(negedge clk); #2 s_valid = 1'b0;
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
    if (done - start != N / 2 + M + 1) begin
      failures++;
      $display("FAIL frame took %0d cycles, expected %0d", done - start, N / 2 + M + 1);
    end
    $display("frame of %0d pixels complete after %0d cycles", N, done - start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
