// tb_stream_demux: self-checking test of both demultiplexer modes.
//
// Single-edge instance (DUAL_EDGE = 0): 300 cycles of random pixels with a
//   random valid bit. Each valid pixel must appear one cycle later on s1 or
//   s2, alternating and starting with s1, with the other lane idle.
// Dual-edge instance (DUAL_EDGE = 1): every cycle two random pixels are put
//   on the input, one held around the rising edge and one around the falling
//   edge. Before the next rising edge s1 must hold the first and s2 the
//   second, with their valid bits.
// Clock period 10; inputs change 2 time units after a clock edge.
module tb_stream_demux;
  localparam int unsigned PIX_W = 8;
  localparam int NCYC = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PIX_W-1:0] a_data = '0, a1_data, a2_data;
  logic a_valid = 1'b0, a1_valid, a2_valid;
  logic [PIX_W-1:0] d_data = '0, d1_data, d2_data;
  logic d_valid = 1'b0, d1_valid, d2_valid;
  int checks = 0, failures = 0;

  stream_demux #(.PIX_W(PIX_W), .DUAL_EDGE(1'b0)) dut_alt (
    .clk, .rst_n, .s_data(a_data), .s_valid(a_valid),
    .s1_data(a1_data), .s1_valid(a1_valid), .s2_data(a2_data), .s2_valid(a2_valid));
  stream_demux #(.PIX_W(PIX_W), .DUAL_EDGE(1'b1)) dut_ddr (
    .clk, .rst_n, .s_data(d_data), .s_valid(d_valid),
    .s1_data(d1_data), .s1_valid(d1_valid), .s2_data(d2_data), .s2_valid(d2_valid));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
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

  int to_s2 = 0, lane1 = 0, lane2 = 0;

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    // Single-edge mode
    for (int j = 0; j < NCYC; j++) begin
      logic [PIX_W-1:0] px;
      logic vld;
      px = PIX_W'($urandom); vld = ($urandom_range(0, 3) != 0);
      a_data = px; a_valid = vld;
      @(posedge clk); #2;
      a_valid = 1'b0;
      check("alt s1_valid", a1_valid, vld && to_s2 == 0);
      check("alt s2_valid", a2_valid, vld && to_s2 == 1);
      if (vld) begin
        if (to_s2 == 0) begin check("alt s1_data", a1_data, px); lane1++; end
        else            begin check("alt s2_data", a2_data, px); lane2++; end
        to_s2 ^= 1;
      end
    end
    check("alt used lane 1", lane1 > 0, 1);
    check("alt used lane 2", lane2 > 0, 1);
    // Dual-edge mode: now just after a rising edge.
    for (int j = 0; j < NCYC; j++) begin
      logic [PIX_W-1:0] pa, pb;
      logic va, vb;
      pa = PIX_W'($urandom); va = ($urandom_range(0, 3) != 0);
      pb = PIX_W'($urandom); vb = ($urandom_range(0, 3) != 0);
      // First pixel of the cycle: must be stable at the rising edge.
      @(negedge clk); #2 d_data = pa; d_valid = va;
      // Second pixel: must be stable at the falling edge.
      @(posedge clk); #2 d_data = pb; d_valid = vb;
      @(negedge clk); #4;
      check("ddr s1_valid", d1_valid, va);
      check("ddr s2_valid", d2_valid, vb);
      if (va) check("ddr s1_data", d1_data, pa);
      if (vb) check("ddr s2_data", d2_data, pb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
