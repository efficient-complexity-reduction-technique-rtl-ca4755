// fir_l4_prop -- four-parallel FIR filter for symmetric coefficients, built by
// cascading two-parallel fast-FIR (FFA) stages.
//
// Computes y(n) = sum_{i=0}^{N-1} h(i) x(n-i) for an N-tap even-symmetric
// filter, h(i) = h(N-1-i), N a multiple of 4, four samples per clock:
// x[p] = x(4k+p), y[p] = y(4k+p).
//
// First stage: the filter is split into even and odd taps,
// H'0 = H0 + z^-2 H2 and H'1 = H1 + z^-2 H3 (Hp = {h(p), h(p+4), ...}, each
// M = N/4 long), and the symmetric 2x2 form is applied: products
// A' = (H'0+H'1)(X'0+X'1), B' = (H'0-H'1)(X'0-X'1) and C' = H'1 X'1, where
// X'0 = X0 + z^-2 X2 and X'1 = X1 + z^-2 X3. Second stage: each of these
// two-phase products is itself a two-parallel filter at the block rate:
//   A'  symmetric 2x2 form (ffa2_proposed) on G0 = H0+H1, G1 = H2+H3:
//       sub-filters (H0+H1+H2+H3) [S], (H0+H1-H2-H3) [A], (H2+H3)
//   B'  symmetric 2x2 form on K0 = H0-H1, K1 = H2-H3:
//       sub-filters (H0-H1+H2-H3) [A], (H0-H1-H2+H3) [S], (H2-H3)
//   C'  classic 2x2 form (ffa2_existing) on H1, H3, which carry no symmetry:
//       sub-filters H1, H3, (H1+H3)
// Nine sub-filters, four with symmetric (S) or antisymmetric (A) coefficient
// sets (H3 is H0 reversed, H2 is H1 reversed) that use half the multipliers.
// The first-stage post-processing, with A', B', C' split into phases e/o:
//   Y0 = (A'e + B'e)/2 - C'e + D{C'o}     Y1 = (A'e - B'e)/2
//   Y2 = (A'o + B'o)/2 - C'o + C'e        Y3 = (A'o - B'o)/2
// The delay z^-2 of the first stage is one phase step: on the even phase it
// becomes one clock D of the odd phase, on the odd phase no delay at all.
// Every halving acts on a sum that is even by construction and is an exact
// one-bit arithmetic right shift, so no precision is lost and the
// sub-filters use integer coefficient sets.
//
// Coefficient port: h[i] = h(i) for i < N/2; the rest is mirrored. The
// coefficient sums are formed here (constant when h is fixed).
//
// Timing: inputs registered, outputs registered; y(4k+p) two clocks after the
// edge that samples block k. Asynchronous active-low reset clears all state.
// x, h: W bits; y: AW bits. ARCH picks ripple-carry or carry-save adders.
//
// The nine sub-filters and the cascade follow the published symmetric
// four-parallel FFA; its post-processing is derived here from the algebra,
// and the I/O registers, reset, coefficient port, placement of the halving
// and internal word lengths are this design's own choices.
module fir_l4_prop
  import ffa_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned N    = 24,
  parameter adder_arch_e ARCH = ADD_CSA,
  parameter int unsigned AW   = acc_width(W, N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  x [4],
  input  logic [W-1:0]  h [N/2],
  output logic [AW-1:0] y [4]
);

  localparam int unsigned M  = N / 4;
  localparam int unsigned XW = W + PRE_GUARD;
  localparam int unsigned CW = W + PRE_GUARD;

  if (!is_multiple(N, 4)) begin : g_bad_n
    $error("fir_l4_prop: N must be a multiple of 4");
  end

  // polyphase components and the second-stage coefficient pairs
  logic [W-1:0]  hf [N];
  logic [CW-1:0] c_g0 [M], c_g1 [M], c_k0 [M], c_k1 [M], c_h1 [M], c_h3 [M];
  always_comb begin
    logic [CW-1:0] a0, a1, a2, a3;
    for (int i = 0; i < int'(N); i++) begin
      hf[i] = (i < int'(N / 2)) ? h[i] : h[int'(N) - 1 - i];
    end
    for (int k = 0; k < int'(M); k++) begin
      a0 = CW'($signed(hf[4*k]));
      a1 = CW'($signed(hf[4*k+1]));
      a2 = CW'($signed(hf[4*k+2]));
      a3 = CW'($signed(hf[4*k+3]));
      c_g0[k] = a0 + a1;
      c_g1[k] = a2 + a3;
      c_k0[k] = a0 - a1;
      c_k1[k] = a2 - a3;
      c_h1[k] = a1;
      c_h3[k] = a3;
    end
  end

  // input register
  logic [W-1:0] x_q [4];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_q <= '{default: '0};
    else        x_q <= x;
  end

  logic [XW-1:0] x0, x1, x2, x3;
  assign x0 = XW'($signed(x_q[0]));
  assign x1 = XW'($signed(x_q[1]));
  assign x2 = XW'($signed(x_q[2]));
  assign x3 = XW'($signed(x_q[3]));

  // first-stage pre-processing: phases of X'0 + X'1 and X'0 - X'1
  logic [XW-1:0] s01, s23, d01, d23;
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0000), .ARCH(ARCH)) u_pre_s01 (.ops('{x0, x1}), .sum(s01));
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0000), .ARCH(ARCH)) u_pre_s23 (.ops('{x2, x3}), .sum(s23));
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0002), .ARCH(ARCH)) u_pre_d01 (.ops('{x0, x1}), .sum(d01));
  add_tree #(.NOPS(2), .W(XW), .SUB(16'h0002), .ARCH(ARCH)) u_pre_d23 (.ops('{x2, x3}), .sum(d23));

  // second stage
  logic [AW-1:0] a_e, a_o, b_e, b_o, c_e, c_o;
  ffa2_proposed #(
    .M(M), .XW(XW), .CW(CW), .AW(AW),
    .SYM_SUM(SYM_EVEN), .SYM_DIFF(SYM_ODD), .ARCH(ARCH)
  ) u_a (
    .clk, .rst_n, .u0(s01), .u1(s23), .g0(c_g0), .g1(c_g1), .y0(a_e), .y1(a_o)
  );
  ffa2_proposed #(
    .M(M), .XW(XW), .CW(CW), .AW(AW),
    .SYM_SUM(SYM_ODD), .SYM_DIFF(SYM_EVEN), .ARCH(ARCH)
  ) u_b (
    .clk, .rst_n, .u0(d01), .u1(d23), .g0(c_k0), .g1(c_k1), .y0(b_e), .y1(b_o)
  );
  ffa2_existing #(
    .M(M), .XW(XW), .CW(CW), .AW(AW), .ARCH(ARCH)
  ) u_c (
    .clk, .rst_n, .u0(x1), .u1(x3), .g0(c_h1), .g1(c_h3), .y0(c_e), .y1(c_o)
  );

  // first-stage butterflies and exact halvings
  logic [AW-1:0] abe_p2, abe_m2, abo_p2, abo_m2, abe_p, abo_p;
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0000), .ARCH(ARCH)) u_bf_ep (.ops('{a_e, b_e}), .sum(abe_p2));
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_bf_em (.ops('{a_e, b_e}), .sum(abe_m2));
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0000), .ARCH(ARCH)) u_bf_op (.ops('{a_o, b_o}), .sum(abo_p2));
  add_tree #(.NOPS(2), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_bf_om (.ops('{a_o, b_o}), .sum(abo_m2));
  assign abe_p = AW'($signed(abe_p2) >>> 1);
  assign abo_p = AW'($signed(abo_p2) >>> 1);

  // first-stage delay: odd phase of C' delayed by one block
  logic [AW-1:0] c_o_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) c_o_d <= '0;
    else        c_o_d <= c_o;
  end

  logic [AW-1:0] y0, y1, y2, y3;
  add_tree #(.NOPS(3), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_y0 (.ops('{abe_p, c_e, c_o_d}), .sum(y0));
  add_tree #(.NOPS(3), .W(AW), .SUB(16'h0002), .ARCH(ARCH)) u_y2 (.ops('{abo_p, c_o, c_e}),   .sum(y2));
  assign y1 = AW'($signed(abe_m2) >>> 1);
  assign y3 = AW'($signed(abo_m2) >>> 1);

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '{default: '0};
    else begin
      y[0] <= y0;
      y[1] <= y1;
      y[2] <= y2;
      y[3] <= y3;
    end
  end

endmodule
