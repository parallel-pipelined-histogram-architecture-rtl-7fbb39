// hist_cell: C-slow retimed (C = 2) histogram processing cell, two bins.
//
// A cell takes two pixel lanes, x1 and x2, and the bin index sin of its even
// bin. Two comparators test each lane's pixel bits p-1..1 against sin bits
// p-1..1; the Logic block (hist_logic) uses the result and the pixel LSB to
// form v0, the number of lane hits on bin sin, and v1, the number on bin
// sin+1. Each increment goes through a C-slow accumulator (cslow_acc): an
// input register, an adder with a two-register feedback loop and a merge
// adder that gives the bin count.
//
// The pixels, their valid bits and the bin index move on to the next cell
// through two register stages each, the second stage being the one added by
// C-slowing; the next cell's index is sout = sin + 2. A pixel therefore spends
// two cycles in a cell, and an array of m/2 cells has a latency of m cycles.
//
// Interface and timing:
//   sin                 bin index of the even bin (the first cell gets 0)
//   x1_in / x2_in       pixels, qualified by x1_vld_in / x2_vld_in
//   sout, x1_out, ...   the same, two cycles later, for the next cell
//   r2_out              count of bin sin   (from v0)
//   r1_out              count of bin sin+1 (from v1)
// A pixel on x*_in in cycle t shows in r*_out from cycle t+2 on, the same
// cycle it appears on x*_out.
//
// The compare, Logic, accumulator and register structure follow the cell
// design. The valid bits, the clear input and the reset are this design's own
// additions; the registers reset to zero, which is safe because sin settles
// at each cell before any pixel, entering after reset, can reach it. How bins
// are read out of a cell is left open by the cell design; here both counts
// are plain outputs.
module hist_cell #(
  parameter int unsigned PIX_W   = hist_pkg::PIX_W_DEF,
  parameter int unsigned COUNT_W = hist_pkg::COUNT_W_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [PIX_W-1:0]   sin,
  input  logic [PIX_W-1:0]   x1_in,
  input  logic               x1_vld_in,
  input  logic [PIX_W-1:0]   x2_in,
  input  logic               x2_vld_in,
  output logic [PIX_W-1:0]   sout,
  output logic [PIX_W-1:0]   x1_out,
  output logic               x1_vld_out,
  output logic [PIX_W-1:0]   x2_out,
  output logic               x2_vld_out,
  output logic [COUNT_W-1:0] r1_out,
  output logic [COUNT_W-1:0] r2_out
);
  // Pass-through pipeline: stage a (original register), stage b (C-slow).
  logic [PIX_W-1:0] s_a, s_b, x1_a, x1_b, x2_a, x2_b;
  logic             x1v_a, x1v_b, x2v_a, x2v_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_a   <= '0;  s_b   <= '0;
      x1_a  <= '0;  x1_b  <= '0;
      x2_a  <= '0;  x2_b  <= '0;
      x1v_a <= 1'b0; x1v_b <= 1'b0;
      x2v_a <= 1'b0; x2v_b <= 1'b0;
    end else begin
      s_a   <= sin + PIX_W'(hist_pkg::BIN_STEP);
      s_b   <= s_a;
      x1_a  <= x1_in;   x1_b  <= x1_a;
      x2_a  <= x2_in;   x2_b  <= x2_a;
      x1v_a <= x1_vld_in; x1v_b <= x1v_a;
      x2v_a <= x2_vld_in; x2v_b <= x2v_a;
    end
  end

  assign sout       = s_b;
  assign x1_out     = x1_b;
  assign x1_vld_out = x1v_b;
  assign x2_out     = x2_b;
  assign x2_vld_out = x2v_b;

  // Comparators on bits p-1..1.
  logic eq1, eq2;
  assign eq1 = (x1_in[PIX_W-1:1] == sin[PIX_W-1:1]);
  assign eq2 = (x2_in[PIX_W-1:1] == sin[PIX_W-1:1]);

  logic [1:0] v0, v1;
  hist_logic u_logic (
    .x1_vld (x1_vld_in), .x1_eq (eq1), .x1_lsb (x1_in[0]),
    .x2_vld (x2_vld_in), .x2_eq (eq2), .x2_lsb (x2_in[0]),
    .v0     (v0),        .v1    (v1)
  );

  logic [COUNT_W-1:0] acc0_r, acc0_rp, acc1_r, acc1_rp;

  cslow_acc #(.IN_W(hist_pkg::INC_W), .ACC_W(COUNT_W)) u_acc0 (
    .clk, .rst_n, .clear, .u(v0), .r(acc0_r), .r_prime(acc0_rp), .r_out(r2_out)
  );
  cslow_acc #(.IN_W(hist_pkg::INC_W), .ACC_W(COUNT_W)) u_acc1 (
    .clk, .rst_n, .clear, .u(v1), .r(acc1_r), .r_prime(acc1_rp), .r_out(r1_out)
  );

  // The partial sums are observed only through the merge adder.
  logic unused_partials;
  assign unused_partials = ^{acc0_r, acc0_rp, acc1_r, acc1_rp};

  initial assert (PIX_W >= 2) else $error("hist_cell: PIX_W must be at least 2");
endmodule
