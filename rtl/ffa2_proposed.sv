// ffa2_proposed -- 2x2 fast-FIR (FFA) core in the symmetric form: a
// length-2M filter G(z) = G0(z^2) + z^-1 G1(z^2) on two interleaved input
// phases, built from the sub-filters (G0+G1), (G0-G1) and G1.
//
//   a = (G0+G1)*(u0+u1)      b = (G0-G1)*(u0-u1)      c = G1*u1
//   y0 = (a+b)/2 - c + D{c}  (= G0*u0 + D{G1*u1})
//   y1 = (a-b)/2             (= G0*u1 + G1*u0)
//
// u0/u1 and y0/y1 are the even/odd sample phases, one pair per clock, and D is
// one clock. The point of this form: when G1 is G0 reversed (the polyphase
// halves of an even-length symmetric filter) G0+G1 is symmetric and G0-G1 is
// antisymmetric, so two of the three sub-filters need only half their
// multipliers. SYM_SUM / SYM_DIFF tell the (G0+G1) and (G0-G1) sub-filters
// which kind of symmetry to exploit (inside the four-parallel filter the
// roles are different, hence parameters).
//
// The factor 1/2 is applied after the butterfly (a+b, a-b) as a one-bit
// arithmetic right shift. a+b = 2(G0*u0 + G1*u1) and a-b = 2(G0*u1 + G1*u0)
// are always even, so the shift is exact and the sub-filters use the integer
// coefficient sets G0+/-G1 instead of halved ones.
//
// Adders: two pre-processing (u0+u1, u0-u1), two butterfly and one
// three-operand post-processing adder, built per ARCH. Outputs are
// combinational from the inputs plus the registers of the sub-filters and of
// D; all registers reset to zero. Words: samples XW, coefficients CW, internal
// and output AW bits, two's complement.
//
// The sub-filter set and equations follow the published symmetric 2x2 form;
// the exact post-butterfly halving and the symmetry parameters are this
// design's choices.
module ffa2_proposed
  import ffa_pkg::*;
#(
  parameter int unsigned M        = 6,
  parameter int unsigned XW       = 11,
  parameter int unsigned CW       = 11,
  parameter int unsigned AW       = 26,
  parameter sym_e        SYM_SUM  = SYM_EVEN,
  parameter sym_e        SYM_DIFF = SYM_ODD,
  parameter adder_arch_e ARCH     = ADD_CSA
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

  // coefficient sets of the sum and difference sub-filters
  logic [CW-1:0] gs [M];
  logic [CW-1:0] gd [M];
  always_comb begin
    for (int k = 0; k < int'(M); k++) begin
      gs[k] = g0[k] + g1[k];
      gd[k] = g0[k] - g1[k];
    end
  end

  // pre-processing: u0 + u1 and u0 - u1
  logic [XW-1:0] us, ud;
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0000), .ARCH(ARCH)) u_pre_s (
    .ops('{u0, u1}), .sum(us)
  );
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0002), .ARCH(ARCH)) u_pre_d (
    .ops('{u0, u1}), .sum(ud)
  );

  // sub-filters
  logic [AW-1:0] fa, fb, fc;
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_SUM)) u_fa (
    .clk, .rst_n, .x(us), .c(gs), .y(fa)
  );
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_DIFF)) u_fb (
    .clk, .rst_n, .x(ud), .c(gd), .y(fb)
  );
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_NONE)) u_fc (
    .clk, .rst_n, .x(u1), .c(g1), .y(fc)
  );

  // butterfly and exact halving
  logic [AW-1:0] bf_p, bf_m;
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0000), .ARCH(ARCH)) u_bf_p (
    .ops('{fa, fb}), .sum(bf_p)
  );
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_bf_m (
    .ops('{fa, fb}), .sum(bf_m)
  );
  logic [AW-1:0] half_p;
  assign half_p = AW'($signed(bf_p) >>> 1);
  assign y1     = AW'($signed(bf_m) >>> 1);

  // delay element D on the G1*u1 branch
  logic [AW-1:0] fc_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fc_d <= '0;
    else        fc_d <= fc;
  end

  add_tree #(.NOPS(3), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_post0 (
    .ops('{half_p, fc, fc_d}), .sum(y0)
  );

endmodule
