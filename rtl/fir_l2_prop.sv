// fir_l2_prop -- two-parallel FIR filter for symmetric coefficients, built on
// the symmetric 2x2 fast-FIR form (ffa2_proposed).
//
// Computes y(n) = sum_{i=0}^{N-1} h(i) x(n-i) for an N-tap filter whose
// coefficients are even-symmetric, h(i) = h(N-1-i), N even, taking and
// delivering two samples per clock: x[0] = x(2k), x[1] = x(2k+1),
// y[0] = y(2k), y[1] = y(2k+1).
//
// Only the independent half of the coefficients enters the filter: port
// h[i] = h(i) for i < N/2, the rest follows from the symmetry. The polyphase
// halves are H0 = {h(0), h(2), ...} and H1 = {h(1), h(3), ...}; because
// H1 is H0 reversed, the (H0+H1) sub-filter is symmetric and the (H0-H1)
// sub-filter is antisymmetric, and each of the two needs only N/4 (rounded up)
// multipliers. The H1 sub-filter keeps N/2 multipliers. The coefficient
// sums are formed from the coefficient port (constant when h is fixed).
//
// Timing: the input pair is registered, processed combinationally through
// pre-adders, sub-filters and post-adders, and the output pair is registered:
// y(2k+p) appears two clocks after the edge that samples x(2k), x(2k+1).
// h must be held constant while the filter runs. rst_n (asynchronous, active
// low) clears every register, i.e. the filter starts from an all-zero past.
// Words: x and h are W-bit two's complement; y is AW bits (full precision
// with headroom, default from ffa_pkg::acc_width). ARCH picks ripple-carry or
// carry-save pre/post-processing adders.
//
// The sub-filter set and output equations follow the published symmetric
// two-parallel FFA; the I/O registers, reset, coefficient port, placement of
// the halving and internal word lengths are this design's own choices.
module fir_l2_prop
  import ffa_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned N    = 12,
  parameter adder_arch_e ARCH = ADD_CSA,
  parameter int unsigned AW   = acc_width(W, N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  x [2],
  input  logic [W-1:0]  h [N/2],
  output logic [AW-1:0] y [2]
);

  localparam int unsigned M  = N / 2;
  localparam int unsigned XW = W + PRE_GUARD;
  localparam int unsigned CW = W + PRE_GUARD;

  if (!is_multiple(N, 2)) begin : g_bad_n
    $error("fir_l2_prop: N must be a multiple of 2");
  end

  // full symmetric coefficient set and its polyphase components
  logic [W-1:0]  hf [N];
  logic [CW-1:0] h0 [M];
  logic [CW-1:0] h1 [M];
  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      hf[i] = (i < int'(N / 2)) ? h[i] : h[int'(N) - 1 - i];
    end
    for (int k = 0; k < int'(M); k++) begin
      h0[k] = CW'($signed(hf[2*k]));
      h1[k] = CW'($signed(hf[2*k+1]));
    end
  end

  // input register
  logic [W-1:0] x_q [2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_q <= '{default: '0};
    else        x_q <= x;
  end

  logic [XW-1:0] u0, u1;
  assign u0 = XW'($signed(x_q[0]));
  assign u1 = XW'($signed(x_q[1]));

  logic [AW-1:0] y0, y1;
  ffa2_proposed #(
    .M(M), .XW(XW), .CW(CW), .AW(AW),
    .SYM_SUM(SYM_EVEN), .SYM_DIFF(SYM_ODD), .ARCH(ARCH)
  ) u_core (
    .clk, .rst_n, .u0, .u1, .g0(h0), .g1(h1), .y0, .y1
  );

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '{default: '0};
    else begin
      y[0] <= y0;
      y[1] <= y1;
    end
  end

endmodule
