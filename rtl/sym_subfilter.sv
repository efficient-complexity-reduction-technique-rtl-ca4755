// sym_subfilter -- one length-M FIR sub-filter of a fast-FIR structure, in
// transposed direct form, sharing multipliers when its coefficients are
// symmetric or antisymmetric.
//
// y[k] = sum_{j=0}^{M-1} c[j] * x[k-j], one input and one output per clock.
//
// Transposed direct form: every tap j multiplies the current input, and a
// chain of M-1 registers s[1..M-1] carries the partial sums towards the output
// (s[j] <= s[j+1] + c[j]*x, s[M-1] <= c[M-1]*x, y = c[0]*x + s[1]). Because all
// taps see the same input sample, the product c[j]*x equals +/-c[M-1-j]*x when
// the set is symmetric (SYM_EVEN) or antisymmetric (SYM_ODD), so only the first
// ceil(M/2) products are formed and each feeds two taps; for SYM_ODD the
// mirrored tap subtracts instead of adding. With SYM_NONE every tap has its own
// multiplier. For SYM_EVEN/SYM_ODD the coefficients c[ceil(M/2)..M-1] are not
// read: the symmetry is assumed, not checked. For SYM_ODD with odd M the middle
// coefficient should be zero; its multiplier is kept and uses c[(M-1)/2].
//
// Timing: y is combinational in x (one multiply and one add) plus the state
// held in the tap registers; the registers reset to zero (rst_n, asynchronous,
// active low). Words are two's complement: x is XW bits, c is CW bits, the
// tap sums and y are AW bits and wrap modulo 2^AW. The tap adders are
// ripple-carry adders.
//
// Transposed direct form and one product per two taps follow the published
// description; the symmetry modes as a parameter and the adder type are this
// design's choices.
module sym_subfilter
  import ffa_pkg::*;
#(
  parameter int unsigned M   = 6,
  parameter int unsigned XW  = 11,
  parameter int unsigned CW  = 11,
  parameter int unsigned AW  = 26,
  parameter sym_e        SYM = SYM_EVEN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x,
  input  logic [CW-1:0] c [M],
  output logic [AW-1:0] y
);

  localparam int unsigned NMUL = (SYM == SYM_NONE) ? M : (M + 1) / 2;
  localparam int unsigned PW   = XW + CW;

  if (AW < PW) begin : g_bad_aw
    $error("sym_subfilter: AW must hold a full product");
  end

  // shared products, sign-extended to the accumulator width
  logic [AW-1:0] prod [NMUL];
  for (genvar k = 0; k < int'(NMUL); k++) begin : g_mul
    logic signed [PW-1:0] p;
    assign p       = $signed(x) * $signed(c[k]);
    assign prod[k] = AW'(p);
  end

  // tap sums: tsum[j] = s[j+1] +/- (product feeding tap j)
  logic [AW-1:0] tsum [M];
  logic [AW-1:0] s    [M];   // s[0] unused; s[1..M-1] are the tap registers

  for (genvar j = 0; j < int'(M); j++) begin : g_tap
    localparam int unsigned SRC = (j < int'(NMUL)) ? j : M - 1 - j;
    localparam bit          NEG = (SYM == SYM_ODD) && (j >= int'(NMUL));
    logic [AW-1:0] upstream;
    logic          unused_cout;
    if (j == int'(M) - 1) begin : g_last
      assign upstream = '0;
    end else begin : g_mid
      assign upstream = s[j+1];
    end
    rca_adder #(.W(AW)) u_add (
      .a   (upstream),
      .b   (prod[SRC]),
      .cin (1'b0),
      .sub (NEG),
      .s   (tsum[j]),
      .cout(unused_cout)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(M); j++) s[j] <= '0;
    end else begin
      s[0] <= '0;
      for (int j = 1; j < int'(M); j++) s[j] <= tsum[j];
    end
  end

  assign y = tsum[0];

endmodule
