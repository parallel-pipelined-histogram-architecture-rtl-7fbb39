// cslow_acc: C-slow (C = 2) retimed accumulator.
//
// A plain accumulator r <= r + u has its adder inside a one-register loop.
// Here the loop holds two registers, r_q and rp_q, so it carries two
// interleaved running sums: one over the increments of even cycles and one
// over those of odd cycles. A register on the input (u_q) splits the logic
// that produces u from the adder, so the critical path is the longer of the
// two rather than their sum. The merge adder r_out = r_q + rp_q adds the two
// interleaved sums back into the total of every increment seen so far.
//
//   u_q  <= u            input register (gray register after "Logic")
//   r_q  <= u_q + rp_q   accumulator register
//   rp_q <= r_q          second loop register (r')
//   r_out = r_q + rp_q   combinational merge adder
//
// Timing: an increment applied on u in cycle t is included in r_out from
// cycle t+2 on. For u = 3,5,4,1 the outputs are r = 0,0,3,5,7,6,
// r' = 0,0,0,3,5,7 and r_out = 0,0,3,8,12,13.
//
// The structure follows the retimed accumulator of the C-slow histogram
// cell. The synchronous clear and active-low synchronous reset, which zero
// all three registers, are this design's own choice.
module cslow_acc #(
  parameter int unsigned IN_W  = hist_pkg::INC_W,
  parameter int unsigned ACC_W = hist_pkg::COUNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,   // zero both partial sums
  input  logic [IN_W-1:0]  u,       // increment of this cycle
  output logic [ACC_W-1:0] r,       // accumulator register (one stream)
  output logic [ACC_W-1:0] r_prime, // second loop register (other stream)
  output logic [ACC_W-1:0] r_out    // merged total r + r'
);
  logic [IN_W-1:0]  u_q;
  logic [ACC_W-1:0] r_q, rp_q;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      u_q  <= '0;
      r_q  <= '0;
      rp_q <= '0;
    end else begin
      u_q  <= u;
      r_q  <= ACC_W'(u_q) + rp_q;
      rp_q <= r_q;
    end
  end

  assign r       = r_q;
  assign r_prime = rp_q;
  assign r_out   = r_q + rp_q;
endmodule
