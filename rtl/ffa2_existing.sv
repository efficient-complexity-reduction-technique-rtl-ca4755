// ffa2_existing -- 2x2 fast-FIR (FFA) core in its classic form: a length-2M
// filter G(z) = G0(z^2) + z^-1 G1(z^2) applied to two interleaved input phases
// with three length-M sub-filters instead of four.
//
//   y0 = G0*u0 + D{G1*u1}
//   y1 = (G0+G1)*(u0+u1) - G0*u0 - G1*u1
//
// where u0/u1 and y0/y1 are the even/odd sample phases (one pair per clock)
// and D is one clock (one two-sample block). Inside the four-parallel
// symmetric filter this core serves the branch whose coefficients H1, H3 carry
// no symmetry, which is why it is used there instead of the symmetric form
// (ffa2_proposed): it needs fewer pre/post-processing adders.
//
// Structure: one pre-processing adder (u0+u1), three sym_subfilter instances
// with one multiplier per tap, three post-processing adders (two operand
// y0, three operand y1) and one delay register. The coefficient sum G0+G1 is
// formed here from the coefficient ports; with fixed coefficients it is a
// constant. Widths: samples XW, coefficients CW (callers leave room for the
// sums), internal words and outputs AW. Outputs are combinational from the
// inputs plus the sub-filter and delay registers; registers reset to zero.
//
// The equations are the classic 2x2 FFA; the widths and reset are this
// design's choices.
module ffa2_existing
  import ffa_pkg::*;
#(
  parameter int unsigned M    = 6,
  parameter int unsigned XW   = 11,
  parameter int unsigned CW   = 11,
  parameter int unsigned AW   = 26,
  parameter adder_arch_e ARCH = ADD_CSA
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] u0,
  input  logic [XW-1:0] u1,
  input  logic [CW-1:0] g0 [M],
  input  logic [CW-1:0] g1 [M],
  output logic [AW-1:0] y0,
  output logic [AW-1:0] y1
);

  // coefficient set of the (G0+G1) sub-filter
  logic [CW-1:0] g01 [M];
  always_comb begin
    for (int k = 0; k < int'(M); k++) g01[k] = g0[k] + g1[k];
  end

  // pre-processing: u0 + u1
  logic [XW-1:0] u01;
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0000), .ARCH(ARCH)) u_pre (
    .ops('{u0, u1}), .sum(u01)
  );

  // sub-filters
  logic [AW-1:0] f0, f1, f01;
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_NONE)) u_f0 (
    .clk, .rst_n, .x(u0), .c(g0), .y(f0)
  );
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_NONE)) u_f1 (
    .clk, .rst_n, .x(u1), .c(g1), .y(f1)
  );
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_NONE)) u_f01 (
    .clk, .rst_n, .x(u01), .c(g01), .y(f01)
  );

  // delay element D on the G1*u1 branch
  logic [AW-1:0] f1_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) f1_d <= '0;
    else        f1_d <= f1;
  end

  // post-processing
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0000), .ARCH(ARCH)) u_post0 (
    .ops('{f0, f1_d}), .sum(y0)
  );
  add_tree #(.NOPS(3), .W(AW), .SUB(16'h0006), .ARCH(ARCH)) u_post1 (
    .ops('{f01, f0, f1}), .sum(y1)
  );

endmodule
