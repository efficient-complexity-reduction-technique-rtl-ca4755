// tb_ffa2_proposed -- self-checking testbench of the 2x2 fast-FIR core (proposed form).
//
// Three instances: length 6 and 5 with G1 = reverse(G0) (sum sub-filter
// symmetric, difference sub-filter antisymmetric, as in a symmetric
// two-parallel filter) and length 6 with G1 = -reverse(G0) (roles swapped, as
// in the difference branch of the four-parallel filter).
// The two phases u0 = x(2k), u1 = x(2k+1) are random. Outputs y0, y1 are
// compared in the same clock with y(2k), y(2k+1) of the direct convolution
// by the interleaved filter h(2i) = G0[i], h(2i+1) = G1[i]; this checks the
// delay element D as well.
module tb_ffa2_proposed;
  import ffa_pkg::*;

  localparam int unsigned XW = 11;
  localparam int unsigned CW = 11;
  localparam int unsigned AW = 26;
  localparam int unsigned NB = 500;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [XW-1:0] u0, u1;
  int            xs [2 * NB];

  function automatic int rnd(input int lim);
    return int'($urandom_range(0, 2 * lim)) - lim;
  endfunction

  // instance a: M = 6
  logic [CW-1:0] g0_a [6], g1_a [6];
  int            h_a [12];
  logic [AW-1:0] y0_a, y1_a;
  ffa2_proposed #(.M(6), .XW(XW), .CW(CW), .AW(AW), .SYM_SUM(SYM_EVEN), .SYM_DIFF(SYM_ODD), .ARCH(ADD_CSA)) dut_a (
    .clk, .rst_n, .u0, .u1, .g0(g0_a), .g1(g1_a), .y0(y0_a), .y1(y1_a)
  );

  // instance b: M = 5
  logic [CW-1:0] g0_b [5], g1_b [5];
  int            h_b [10];
  logic [AW-1:0] y0_b, y1_b;
  ffa2_proposed #(.M(5), .XW(XW), .CW(CW), .AW(AW), .SYM_SUM(SYM_EVEN), .SYM_DIFF(SYM_ODD), .ARCH(ADD_CSA)) dut_b (
    .clk, .rst_n, .u0, .u1, .g0(g0_b), .g1(g1_b), .y0(y0_b), .y1(y1_b)
  );

  // instance c: M = 6
  logic [CW-1:0] g0_c [6], g1_c [6];
  int            h_c [12];
  logic [AW-1:0] y0_c, y1_c;
  ffa2_proposed #(.M(6), .XW(XW), .CW(CW), .AW(AW), .SYM_SUM(SYM_ODD), .SYM_DIFF(SYM_EVEN), .ARCH(ADD_CSA)) dut_c (
    .clk, .rst_n, .u0, .u1, .g0(g0_c), .g1(g1_c), .y0(y0_c), .y1(y1_c)
  );

  task automatic check(input string name, input logic [AW-1:0] got, input longint exp_v);
    checks++;
    if (longint'($signed(got)) !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", name, $signed(got), exp_v);
    end
  endtask

  initial begin
    for (int i = 0; i < 6; i++) h_a[2*i] = rnd(120);
    for (int i = 0; i < 6; i++) h_a[2*i+1] = h_a[2*(6-1-i)];
    for (int i = 0; i < 6; i++) begin
      g0_a[i] = CW'(h_a[2*i]);
      g1_a[i] = CW'(h_a[2*i+1]);
    end
    for (int i = 0; i < 5; i++) h_b[2*i] = rnd(120);
    for (int i = 0; i < 5; i++) h_b[2*i+1] = h_b[2*(5-1-i)];
    for (int i = 0; i < 5; i++) begin
      g0_b[i] = CW'(h_b[2*i]);
      g1_b[i] = CW'(h_b[2*i+1]);
    end
    for (int i = 0; i < 6; i++) h_c[2*i] = rnd(120);
    for (int i = 0; i < 6; i++) h_c[2*i+1] = -h_c[2*(6-1-i)];
    for (int i = 0; i < 6; i++) begin
      g0_c[i] = CW'(h_c[2*i]);
      g1_c[i] = CW'(h_c[2*i+1]);
    end
    u0 = '0;
    u1 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < int'(NB); k++) begin
      @(negedge clk);
      xs[2*k]   = rnd(127);
      xs[2*k+1] = rnd(127);
      u0 = XW'(xs[2*k]);
      u1 = XW'(xs[2*k+1]);
      #1;
      for (int p = 0; p < 2; p++) begin
        longint acc;
        acc = 0;
        for (int i = 0; i < 12; i++)
          if (2*k + p - i >= 0) acc += longint'(h_a[i]) * longint'(xs[2*k + p - i]);
        check($sformatf("a y%0d block %0d", p, k), (p == 0) ? y0_a : y1_a, acc);
      end
      for (int p = 0; p < 2; p++) begin
        longint acc;
        acc = 0;
        for (int i = 0; i < 10; i++)
          if (2*k + p - i >= 0) acc += longint'(h_b[i]) * longint'(xs[2*k + p - i]);
        check($sformatf("b y%0d block %0d", p, k), (p == 0) ? y0_b : y1_b, acc);
      end
      for (int p = 0; p < 2; p++) begin
        longint acc;
        acc = 0;
        for (int i = 0; i < 12; i++)
          if (2*k + p - i >= 0) acc += longint'(h_c[i]) * longint'(xs[2*k + p - i]);
        check($sformatf("c y%0d block %0d", p, k), (p == 0) ? y0_c : y1_c, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NB * 4) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
