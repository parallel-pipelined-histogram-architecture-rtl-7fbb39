// stream_demux: splits one pixel stream s into the two sub-streams s1, s2.
//
// The C-slow array needs two input streams. This block makes them out of the
// single stream a camera sensor or an 8-bit bus delivers. It has two modes,
// chosen by DUAL_EDGE:
//
//   DUAL_EDGE = 0 (default): s carries at most one pixel per clock cycle,
//     marked by s_valid. Valid pixels go to s1 and s2 in turn (the first to
//     s1), so each lane carries every other pixel and at most one lane is
//     valid in a cycle. Output registered: a pixel on s in cycle t is on its
//     lane in cycle t+1. The array then takes one pixel per cycle and a
//     histogram of n pixels takes n + m cycles.
//
//   DUAL_EDGE = 1: s carries up to two pixels per clock cycle, one sampled on
//     the rising edge (to s1) and one on the falling edge (to s2), as in a
//     double-data-rate interface. Both lanes then run at f_clk and are read by
//     the array on the next rising edge: a pixel sampled on the rising edge
//     of cycle t and one sampled on the falling edge within cycle t both
//     appear in cycle t+1.
//
// Dual-edge sampling is the arrangement of the source design; the alternating
// single-edge mode, the valid bits and the reset are this design's own.
module stream_demux #(
  parameter int unsigned PIX_W     = hist_pkg::PIX_W_DEF,
  parameter bit          DUAL_EDGE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [PIX_W-1:0] s_data,
  input  logic             s_valid,
  output logic [PIX_W-1:0] s1_data,
  output logic             s1_valid,
  output logic [PIX_W-1:0] s2_data,
  output logic             s2_valid
);
  if (DUAL_EDGE) begin : g_ddr
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        s1_data  <= '0;
        s1_valid <= 1'b0;
      end else begin
        s1_data  <= s_data;
        s1_valid <= s_valid;
      end
    end
    always_ff @(negedge clk) begin
      if (!rst_n) begin
        s2_data  <= '0;
        s2_valid <= 1'b0;
      end else begin
        s2_data  <= s_data;
        s2_valid <= s_valid;
      end
    end
  end else begin : g_alt
    logic sel;  // 0: next valid pixel goes to s1, 1: to s2
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        sel      <= 1'b0;
        s1_data  <= '0;
        s1_valid <= 1'b0;
        s2_data  <= '0;
        s2_valid <= 1'b0;
      end else begin
        s1_valid <= s_valid & ~sel;
        s2_valid <= s_valid &  sel;
        if (s_valid && !sel) s1_data <= s_data;
        if (s_valid &&  sel) s2_data <= s_data;
        if (s_valid) sel <= ~sel;
      end
    end

    // In this mode the lanes never carry a pixel in the same cycle.
    a_one_lane : assert property (@(posedge clk) disable iff (!rst_n)
                                  !(s1_valid && s2_valid));
  end
endmodule
