// hist_logic: the "Logic" block of the C-slow histogram cell.
//
// Each cell owns an even bin 2k (pixel LSB 0) and the odd bin 2k+1 (LSB 1).
// For each of the two pixel lanes the cell's comparator reports whether the
// pixel's upper bits p-1..1 equal those of the cell's bin index; the pixel's
// LSB then selects which of the two bins it falls in. This block counts, per
// bin, how many of the two lanes hit it in this cycle:
//
//   v0 = (lane 1 hits, LSB 0) + (lane 2 hits, LSB 0)    range 0..2
//   v1 = (lane 1 hits, LSB 1) + (lane 2 hits, LSB 1)    range 0..2
//
// Purely combinational. The block's inputs (lane LSBs and compare results)
// follow the cell structure; the lane valid inputs, which keep an idle lane
// from being counted, are this design's addition.
module hist_logic (
  input  logic       x1_vld, // lane 1 carries a pixel
  input  logic       x1_eq,  // lane 1 upper bits match the cell's bins
  input  logic       x1_lsb, // lane 1 pixel bit 0
  input  logic       x2_vld,
  input  logic       x2_eq,
  input  logic       x2_lsb,
  output logic [1:0] v0,     // increment for the even bin
  output logic [1:0] v1      // increment for the odd bin
);
  logic hit1, hit2;

  always_comb begin
    hit1 = x1_vld & x1_eq;
    hit2 = x2_vld & x2_eq;
    v0   = 2'({1'b0, hit1 & ~x1_lsb}) + 2'({1'b0, hit2 & ~x2_lsb});
    v1   = 2'({1'b0, hit1 &  x1_lsb}) + 2'({1'b0, hit2 &  x2_lsb});
  end
endmodule
