// tb_hist_logic: exhaustive test of the cell's Logic block.
//
// All 64 combinations of the two lanes' valid, compare and LSB inputs are
// applied; v0 must count the valid matching lanes whose pixel is even and v1
// those whose pixel is odd. The block is combinational, so each result is
// checked one time step after its inputs change.
module tb_hist_logic;
  logic x1_vld, x1_eq, x1_lsb, x2_vld, x2_eq, x2_lsb;
  logic [1:0] v0, v1;
  int checks = 0, failures = 0;

  hist_logic dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      int e0, e1;
      {x1_vld, x1_eq, x1_lsb, x2_vld, x2_eq, x2_lsb} = 6'(i);
      #1;
      e0 = 0; e1 = 0;
      if (x1_vld && x1_eq) begin if (x1_lsb) e1++; else e0++; end
      if (x2_vld && x2_eq) begin if (x2_lsb) e1++; else e0++; end
      checks += 2;
      if (int'(v0) != e0 || int'(v1) != e1) begin
        failures++;
        $display("FAIL inputs %b: v0=%0d v1=%0d expected %0d %0d", 6'(i), v0, v1, e0, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
