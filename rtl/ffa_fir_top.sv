// ffa_fir_top -- the two-, three- and four-parallel symmetric fast-FIR
// filters side by side, each with its own sample, coefficient and result
// ports and a shared clock and reset.
//
//   l2_*  fir_l2_prop: N2 taps, 2 samples per clock (y two clocks after x)
//   l3_*  fir_l3_prop: N3 taps, 3 samples per clock
//   l4_*  fir_l4_prop: N4 taps, 4 samples per clock
//
// Each *_h port carries the independent half of a symmetric coefficient set
// (h(i) for i < ceil(N/2)); each *_x port one block of consecutive samples,
// oldest in element 0; each *_y port the matching block of outputs. The
// defaults are 8-bit samples and coefficients, 12 taps for the two-parallel
// filter, 27 for the three-parallel one and 24 for the four-parallel one,
// with carry-save pre/post-processing adders (ARCH).
//
// The three filters and the 8-bit, 12- and 27-tap sizes are the published
// ones (24 taps for four-parallel is the shortest length compared);
// placing them side by side is this design's choice.
module ffa_fir_top
  import ffa_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned N2   = 12,
  parameter int unsigned N3   = 27,
  parameter int unsigned N4   = 24,
  parameter adder_arch_e ARCH = ADD_CSA,
  parameter int unsigned AW2  = acc_width(W, N2),
  parameter int unsigned AW3  = acc_width(W, N3),
  parameter int unsigned AW4  = acc_width(W, N4)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W-1:0]   l2_x [2],
  input  logic [W-1:0]   l2_h [N2/2],
  output logic [AW2-1:0] l2_y [2],
  input  logic [W-1:0]   l3_x [3],
  input  logic [W-1:0]   l3_h [(N3+1)/2],
  output logic [AW3-1:0] l3_y [3],
  input  logic [W-1:0]   l4_x [4],
  input  logic [W-1:0]   l4_h [N4/2],
  output logic [AW4-1:0] l4_y [4]
);

  fir_l2_prop #(.W(W), .N(N2), .ARCH(ARCH), .AW(AW2)) u_l2 (
    .clk, .rst_n, .x(l2_x), .h(l2_h), .y(l2_y)
  );

  fir_l3_prop #(.W(W), .N(N3), .ARCH(ARCH), .AW(AW3)) u_l3 (
    .clk, .rst_n, .x(l3_x), .h(l3_h), .y(l3_y)
  );

  fir_l4_prop #(.W(W), .N(N4), .ARCH(ARCH), .AW(AW4)) u_l4 (
    .clk, .rst_n, .x(l4_x), .h(l4_h), .y(l4_y)
  );

endmodule
