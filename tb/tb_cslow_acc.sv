// tb_cslow_acc: self-checking test of the C-slow retimed accumulator.
//
// 1. The worked example: u = 3,5,4,1 must give r = 0,0,3,5,7,6,
//    r' = 0,0,0,3,5,7 and r + r' = 0,0,3,8,12,13, cycle by cycle.
// 2. 400 random increments: every cycle r must equal the sum of the inputs
//    of cycles t-2, t-4, ..., r' the sum of those of t-3, t-5, ..., and
//    r_out the sum of all inputs up to cycle t-2 (two-cycle latency).
// 3. A clear in the middle of the random run restarts all sums at zero.
// Inputs change just after the rising edge; outputs are sampled at the
// falling edge.
module tb_cslow_acc;
  localparam int unsigned IN_W  = 4;
  localparam int unsigned ACC_W = 16;
  localparam int NRAND = 400;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [IN_W-1:0]  u = '0;
  logic [ACC_W-1:0] r, r_prime, r_out;
  int checks = 0, failures = 0;

  cslow_acc #(.IN_W(IN_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int ex_u [6]   = '{3, 5, 4, 1, 0, 0};
  int ex_r [6]   = '{0, 0, 3, 5, 7, 6};
  int ex_rp [6]  = '{0, 0, 0, 3, 5, 7};
  int ex_sum [6] = '{0, 0, 3, 8, 12, 13};
  int hist_u [NRAND];
  int clear_at;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Worked example, first input in cycle 0.
    for (int j = 0; j < 6; j++) begin
      u = IN_W'(ex_u[j]);
      @(negedge clk);
      check($sformatf("example r[%0d]", j),  int'(r),       ex_r[j]);
      check($sformatf("example r'[%0d]", j), int'(r_prime), ex_rp[j]);
      check($sformatf("example r+r'[%0d]", j), int'(r_out), ex_sum[j]);
      @(posedge clk); #1;
    end
    // Restart from zero.
    u = '0; clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    @(negedge clk);
    check("after clear", int'(r_out), 0);
    @(posedge clk); #1;
    // Random run with a clear part way through.
    clear_at = NRAND / 2;
    for (int j = 0; j < NRAND; j++) begin
      int even_sum, odd_sum;
      hist_u[j] = int'($urandom_range(0, (1 << IN_W) - 1));
      u = IN_W'(hist_u[j]);
      clear = (j == clear_at);
      if (clear) hist_u[j] = 0;  // the cleared cycle's input is dropped
      @(negedge clk);
      even_sum = 0; odd_sum = 0;
      for (int i = j - 2; i >= 0; i -= 2) if (i > clear_at || j <= clear_at) even_sum += hist_u[i];
      for (int i = j - 3; i >= 0; i -= 2) if (i > clear_at || j <= clear_at) odd_sum += hist_u[i];
      if (j == clear_at + 1) begin even_sum = 0; odd_sum = 0; end
      check($sformatf("rand r[%0d]", j),     int'(r),       even_sum);
      check($sformatf("rand r'[%0d]", j),    int'(r_prime), odd_sum);
      check($sformatf("rand r_out[%0d]", j), int'(r_out),   even_sum + odd_sum);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
