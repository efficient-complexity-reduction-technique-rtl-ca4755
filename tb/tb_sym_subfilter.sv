// tb_sym_subfilter -- self-checking testbench of the transposed direct-form
// sub-filter with shared multipliers.
//
// Five instances run in parallel on one random input stream: length 6 with
// no symmetry, with symmetric and with antisymmetric coefficients, and
// length 5 symmetric and antisymmetric (odd length, zero middle tap for the
// antisymmetric one). Coefficients are random but obey the declared
// symmetry. Every output is compared, in the same clock cycle as its input
// sample, with the direct convolution y(k) = sum c[j] x(k-j).
module tb_sym_subfilter;
  import ffa_pkg::*;

  localparam int unsigned XW = 11;
  localparam int unsigned CW = 11;
  localparam int unsigned AW = 26;
  localparam int unsigned NS = 600;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [XW-1:0] x;
  int            xs [NS];

  localparam int NDUT = 5;
  localparam int MS   [NDUT] = '{6, 6, 6, 5, 5};
  localparam sym_e SY [NDUT] = '{SYM_NONE, SYM_EVEN, SYM_ODD, SYM_EVEN, SYM_ODD};

  int            cf [NDUT][6];
  logic [AW-1:0] y  [NDUT];

  for (genvar d = 0; d < NDUT; d++) begin : g_dut
    logic [CW-1:0] c [MS[d]];
    always_comb for (int j = 0; j < MS[d]; j++) c[j] = CW'(cf[d][j]);
    sym_subfilter #(.M(MS[d]), .XW(XW), .CW(CW), .AW(AW), .SYM(SY[d])) dut (
      .clk, .rst_n, .x, .c, .y(y[d])
    );
  end

  function automatic int rnd(input int lim);
    return int'($urandom_range(0, 2 * lim)) - lim;
  endfunction

  initial begin
    // coefficients obeying each instance's symmetry
    for (int d = 0; d < NDUT; d++) begin
      for (int j = 0; j < 6; j++) cf[d][j] = 0;
      for (int j = 0; j < MS[d]; j++) cf[d][j] = rnd(500);
      if (SY[d] != SYM_NONE) begin
        for (int j = 0; j < MS[d] / 2; j++)
          cf[d][MS[d] - 1 - j] = (SY[d] == SYM_ODD) ? -cf[d][j] : cf[d][j];
        if (SY[d] == SYM_ODD && (MS[d] % 2) == 1) cf[d][MS[d] / 2] = 0;
      end
    end
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < int'(NS); k++) begin
      @(negedge clk);
      xs[k] = rnd(1000);
      x = XW'(xs[k]);
      #1;
      for (int d = 0; d < NDUT; d++) begin
        longint acc;
        acc = 0;
        for (int j = 0; j < MS[d]; j++)
          if (k - j >= 0) acc += longint'(cf[d][j]) * longint'(xs[k - j]);
        checks++;
        if (longint'($signed(y[d])) !== acc) begin
          failures++;
          if (failures < 10) $display("FAIL dut %0d sample %0d: got %0d expected %0d", d, k, $signed(y[d]), acc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NS * 4) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
