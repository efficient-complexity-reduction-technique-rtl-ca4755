// fir_l3_prop -- three-parallel FIR filter for symmetric coefficients, built
// from the symmetric 3x3 fast-FIR form.
//
// Computes y(n) = sum_{i=0}^{N-1} h(i) x(n-i) for an N-tap even-symmetric
// filter, h(i) = h(N-1-i), N a multiple of 3 (odd N allowed), three samples
// per clock: x[p] = x(3k+p), y[p] = y(3k+p).
//
// Polyphase components H0 = {h(0), h(3), ...}, H1 = {h(1), h(4), ...},
// H2 = {h(2), h(5), ...}, each M = N/3 long. Symmetry makes H2 the reverse of
// H0 and H1 its own reverse, so four of the six sub-filters have symmetric
// (S) or antisymmetric (A) coefficients and need only ceil(M/2) multipliers:
//
//   R = (H0+H1)(X0+X1)        S = (H0-H1)(X0-X1)
//   P = (H0+H2)(X0+X2)  [S]   Q = (H0-H2)(X0-X2)  [A]
//   U = H1 X1           [S]   T = (H0+H1+H2)(X0+X1+X2)  [S]
//
// With the exact halvings r+ = (R+S)/2 = H0X0+H1X1, r- = (R-S)/2,
// p+ = (P+Q)/2 = H0X0+H2X2, p- = (P-Q)/2 (all sums even, so one-bit
// arithmetic right shifts):
//
//   Y0 = (r+ - U) + D{T - P - U - r-}
//   Y1 = r-       + D{p+ - r+ + U}
//   Y2 = p- + U
//
// which equal H0X0 + D(H1X2 + H2X1), H0X1 + H1X0 + D H2X2 and
// H0X2 + H1X1 + H2X0. D is one clock (one three-sample block).
//
// Coefficient port: h[i] = h(i) for i < (N+1)/2; the rest is mirrored. The
// coefficient sums are formed here (constant when h is fixed). The halving
// is done after the butterflies, so the sub-filters use the integer sets
// H0+/-H1, H0+/-H2 and the doubled term 2*(P/2) becomes P itself.
//
// Timing: inputs registered, outputs registered, y(3k+p) two clocks after the
// edge that samples block k. Asynchronous active-low reset clears all state.
// x, h: W bits; y: AW bits. ARCH selects ripple-carry or carry-save
// pre/post-processing adders.
//
// The six sub-filters and the output equations follow the published
// symmetric three-parallel FFA; the I/O registers, reset, coefficient port,
// placement of the halving and internal word lengths are this design's own.
module fir_l3_prop
  import ffa_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned N    = 27,
  parameter adder_arch_e ARCH = ADD_CSA,
  parameter int unsigned AW   = acc_width(W, N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  x [3],
  input  logic [W-1:0]  h [(N+1)/2],
  output logic [AW-1:0] y [3]
);

  localparam int unsigned M    = N / 3;
  localparam int unsigned HALF = (N + 1) / 2;
  localparam int unsigned XW   = W + PRE_GUARD;
  localparam int unsigned CW   = W + PRE_GUARD;

  if (!is_multiple(N, 3)) begin : g_bad_n
    $error("fir_l3_prop: N must be a multiple of 3");
  end

  // coefficient sets of the six sub-filters
  logic [W-1:0]  hf [N];
  logic [CW-1:0] c_r [M], c_s [M], c_p [M], c_q [M], c_u [M], c_t [M];
  always_comb begin
    logic [CW-1:0] a0, a1, a2;
    for (int i = 0; i < int'(N); i++) begin
      hf[i] = (i < int'(HALF)) ? h[i] : h[int'(N) - 1 - i];
    end
    for (int k = 0; k < int'(M); k++) begin
      a0 = CW'($signed(hf[3*k]));
      a1 = CW'($signed(hf[3*k+1]));
      a2 = CW'($signed(hf[3*k+2]));
      c_r[k] = a0 + a1;
      c_s[k] = a0 - a1;
      c_p[k] = a0 + a2;
      c_q[k] = a0 - a2;
      c_u[k] = a1;
      c_t[k] = a0 + a1 + a2;
    end
  end

  // input register
  logic [W-1:0] x_q [3];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_q <= '{default: '0};
    else        x_q <= x;
  end

  logic [XW-1:0] x0, x1, x2;
  assign x0 = XW'($signed(x_q[0]));
  assign x1 = XW'($signed(x_q[1]));
  assign x2 = XW'($signed(x_q[2]));

  // pre-processing adders
  logic [XW-1:0] x01p, x01m, x02p, x02m, x012;
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0000), .ARCH(ARCH)) u_pre_01p (.ops('{x0, x1}),   .sum(x01p));
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0002), .ARCH(ARCH)) u_pre_01m (.ops('{x0, x1}),   .sum(x01m));
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0000), .ARCH(ARCH)) u_pre_02p (.ops('{x0, x2}),   .sum(x02p));
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0002), .ARCH(ARCH)) u_pre_02m (.ops('{x0, x2}),   .sum(x02m));
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0000), .ARCH(ARCH)) u_pre_012 (.ops('{x01p, x2}), .sum(x012));

  // sub-filters
  logic [AW-1:0] f_r, f_s, f_p, f_q, f_u, f_t;
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_NONE)) u_r (.clk, .rst_n, .x(x01p), .c(c_r), .y(f_r));
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_NONE)) u_s (.clk, .rst_n, .x(x01m), .c(c_s), .y(f_s));
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_EVEN)) u_p (.clk, .rst_n, .x(x02p), .c(c_p), .y(f_p));
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_ODD))  u_q (.clk, .rst_n, .x(x02m), .c(c_q), .y(f_q));
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_EVEN)) u_u (.clk, .rst_n, .x(x1),   .c(c_u), .y(f_u));
  sym_subfilter #(.M(M), .XW(XW), .CW(CW), .AW(AW), .SYM(SYM_EVEN)) u_t (.clk, .rst_n, .x(x012), .c(c_t), .y(f_t));

  // butterflies and exact halvings
  logic [AW-1:0] rs_p2, rs_m2, pq_p2, pq_m2;
  logic [AW-1:0] rs_p, rs_m, pq_p, pq_m;
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0000), .ARCH(ARCH)) u_bf_rp (.ops('{f_r, f_s}), .sum(rs_p2));
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_bf_rm (.ops('{f_r, f_s}), .sum(rs_m2));
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0000), .ARCH(ARCH)) u_bf_pp (.ops('{f_p, f_q}), .sum(pq_p2));
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_bf_pm (.ops('{f_p, f_q}), .sum(pq_m2));
  assign rs_p = AW'($signed(rs_p2) >>> 1);
  assign rs_m = AW'($signed(rs_m2) >>> 1);
  assign pq_p = AW'($signed(pq_p2) >>> 1);
  assign pq_m = AW'($signed(pq_m2) >>> 1);

  // terms that pass through the delay element D
  logic [AW-1:0] d0_in, d1_in, d0_q, d1_q;
  add_tree #(.NOPS(4), .W(AW), .SUB(16'h000E), .ARCH(ARCH)) u_d0 (.ops('{f_t, f_p, f_u, rs_m}), .sum(d0_in));
  add_tree #(.NOPS(3), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_d1 (.ops('{pq_p, rs_p, f_u}),     .sum(d1_in));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d0_q <= '0;
      d1_q <= '0;
    end else begin
      d0_q <= d0_in;
      d1_q <= d1_in;
    end
  end

  // output post-processing
  logic [AW-1:0] y0, y1, y2;
  add_tree #(.NOPS(3), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_y0 (.ops('{rs_p, f_u, d0_q}), .sum(y0));
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0000), .ARCH(ARCH)) u_y1 (.ops('{rs_m, d1_q}),      .sum(y1));
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0000), .ARCH(ARCH)) u_y2 (.ops('{pq_m, f_u}),       .sum(y2));

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '{default: '0};
    else begin
      y[0] <= y0;
      y[1] <= y1;
      y[2] <= y2;
    end
  end

endmodule
