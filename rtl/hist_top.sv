// hist_top: m-bin histogram of a pixel stream on a C-slow retimed array.
//
// A stream_demux splits the incoming pixel stream s into the two lanes the
// C-slow cells need and a hist_array of m/2 two-bin cells counts them. With
// the default single-edge demultiplexer one pixel enters per clock cycle and
// the histogram of n pixels is complete n + m + 1 cycles after the first
// pixel is presented (one cycle in the demultiplexer, m in the array). With
// DUAL_EDGE = 1 two pixels enter per cycle, one sampled on each clock edge.
//
// Interface:
//   s_data, s_valid   input pixel stream (up to two pixels a cycle if DUAL_EDGE)
//   clear             zeroes every bin; apply it while no pixel is in flight
//   hist[i]           count of pixels with value i so far
//   retired[1:0]      lane 2 / lane 1 pixel leaving the array this cycle:
//                     every bin includes it from this cycle on
//
// The array structure and the demultiplexer follow the source design; the
// readout of all hist in parallel, the clear and the retired flags are this
// design's own.
module hist_top #(
  parameter int unsigned PIX_W     = hist_pkg::PIX_W_DEF,
  parameter int unsigned COUNT_W   = hist_pkg::COUNT_W_DEF,
  parameter bit          DUAL_EDGE = 1'b0,
  localparam int unsigned NUM_BINS = 2 ** PIX_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [PIX_W-1:0]   s_data,
  input  logic               s_valid,
  output logic [COUNT_W-1:0] hist [NUM_BINS],
  output logic [1:0]         retired
);
  logic [PIX_W-1:0] s1_data, s2_data;
  logic             s1_valid, s2_valid;

  stream_demux #(.PIX_W(PIX_W), .DUAL_EDGE(DUAL_EDGE)) u_demux (
    .clk, .rst_n, .s_data, .s_valid,
    .s1_data, .s1_valid, .s2_data, .s2_valid
  );

  logic [PIX_W-1:0] x1_last, x2_last, s_last;
  logic             x1v_last, x2v_last;

  hist_array #(.PIX_W(PIX_W), .COUNT_W(COUNT_W)) u_array (
    .clk, .rst_n, .clear,
    .x1_in      (s1_data), .x1_vld_in  (s1_valid),
    .x2_in      (s2_data), .x2_vld_in  (s2_valid),
    .x1_out     (x1_last), .x1_vld_out (x1v_last),
    .x2_out     (x2_last), .x2_vld_out (x2v_last),
    .sout       (s_last),
    .hist       (hist)
  );

  assign retired = {x2v_last, x1v_last};

  // Only the valid bits of the last cell are needed here.
  logic unused_last;
  assign unused_last = ^{x1_last, x2_last, s_last};
endmodule
