// hist_array: linear pipelined array of C-slow histogram cells.
//
// m = 2**PIX_W hist are computed by m/2 hist_cell instances in a chain. The
// first cell gets bin index 0 and each cell passes sin + 2 on, so cell k owns
// hist 2k and 2k+1. Both pixel lanes enter the first cell and travel through
// the chain, two cycles per cell; every cell counts the pixels of its two
// hist as they pass. hist[2k] is cell k's r2_out, hist[2k+1] its r1_out.
//
// Timing: a pixel entering on lane 1 or 2 in cycle t is counted in cell k
// from cycle t+2k+2 on. It leaves the last cell, on x1_out/x2_out, in cycle
// t+m, the same cycle the last cell's counts include it; at that point every
// bin includes it. With one pixel per cycle (the two lanes used in turn) a
// histogram of n pixels is complete n + m cycles after its first pixel.
//
// The last cell's outputs are brought out so that the end of a stream can be
// seen and arrays can be chained. The parallel bin outputs stand in for a
// pipelined readout, which the array design does not describe.
module hist_array #(
  parameter int unsigned PIX_W   = hist_pkg::PIX_W_DEF,
  parameter int unsigned COUNT_W = hist_pkg::COUNT_W_DEF,
  localparam int unsigned NUM_BINS  = 2 ** PIX_W,
  localparam int unsigned NUM_CELLS = NUM_BINS / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [PIX_W-1:0]   x1_in,
  input  logic               x1_vld_in,
  input  logic [PIX_W-1:0]   x2_in,
  input  logic               x2_vld_in,
  output logic [PIX_W-1:0]   x1_out,
  output logic               x1_vld_out,
  output logic [PIX_W-1:0]   x2_out,
  output logic               x2_vld_out,
  output logic [PIX_W-1:0]   sout,
  output logic [COUNT_W-1:0] hist [NUM_BINS]
);
  // Chain signals; index k is the input of cell k, index NUM_CELLS the output.
  logic [PIX_W-1:0] s_c  [NUM_CELLS+1];
  logic [PIX_W-1:0] x1_c [NUM_CELLS+1];
  logic [PIX_W-1:0] x2_c [NUM_CELLS+1];
  logic             v1_c [NUM_CELLS+1];
  logic             v2_c [NUM_CELLS+1];

  assign s_c[0]  = '0;
  assign x1_c[0] = x1_in;
  assign v1_c[0] = x1_vld_in;
  assign x2_c[0] = x2_in;
  assign v2_c[0] = x2_vld_in;

  for (genvar k = 0; k < NUM_CELLS; k++) begin : g_cell
    hist_cell #(.PIX_W(PIX_W), .COUNT_W(COUNT_W)) u_cell (
      .clk, .rst_n, .clear,
      .sin        (s_c[k]),
      .x1_in      (x1_c[k]),   .x1_vld_in  (v1_c[k]),
      .x2_in      (x2_c[k]),   .x2_vld_in  (v2_c[k]),
      .sout       (s_c[k+1]),
      .x1_out     (x1_c[k+1]), .x1_vld_out (v1_c[k+1]),
      .x2_out     (x2_c[k+1]), .x2_vld_out (v2_c[k+1]),
      .r1_out     (hist[2*k+1]),
      .r2_out     (hist[2*k])
    );
  end

  assign x1_out     = x1_c[NUM_CELLS];
  assign x1_vld_out = v1_c[NUM_CELLS];
  assign x2_out     = x2_c[NUM_CELLS];
  assign x2_vld_out = v2_c[NUM_CELLS];
  assign sout       = s_c[NUM_CELLS];
endmodule
