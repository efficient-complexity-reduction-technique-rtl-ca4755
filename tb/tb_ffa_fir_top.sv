// tb_ffa_fir_top -- end-to-end testbench of the three symmetric parallel FIR
// filters at their default sizes (12 taps two-parallel, 27 taps
// three-parallel, 24 taps four-parallel, 8-bit words, carry-save adders).
//
// All three filters get random symmetric coefficient sets and random sample
// streams with bursts of extreme samples. Every output sample is compared,
// two clocks after its input block, with the direct convolution
// y(n) = sum h(i) x(n-i). The run covers three coefficient sets separated by
// resets issued while the filters hold state. Mechanisms counted (each must
// occur, else a failure is counted):
//   cross   outputs with a non-zero contribution from earlier blocks, i.e.
//           through the block delays D of the fast-FIR structure
//   burst   blocks of extreme samples (-128 or +127)
//   reset   resets issued while the filter state was non-zero
//   wide    outputs whose magnitude needs more than 16 bits
module tb_ffa_fir_top;
  import ffa_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned NB = 300;
  localparam int unsigned NRUN = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_reset = 0;

  // 2-parallel filter, 12 taps
  localparam int unsigned L_l2  = 2;
  localparam int unsigned N_l2  = 12;
  localparam int unsigned AW_l2 = acc_width(W, N_l2);
  logic [W-1:0]        l2_x [2];
  logic [W-1:0]        l2_h [6];
  logic [AW_l2-1:0]   l2_y [2];
  int                  hf_l2 [12];
  int                  xs_l2 [NB * 2 + 8];
  int                  n_cross_l2 = 0;
  int                  n_burst_l2 = 0;
  int                  n_wide_l2 = 0;

  // 3-parallel filter, 27 taps
  localparam int unsigned L_l3  = 3;
  localparam int unsigned N_l3  = 27;
  localparam int unsigned AW_l3 = acc_width(W, N_l3);
  logic [W-1:0]        l3_x [3];
  logic [W-1:0]        l3_h [14];
  logic [AW_l3-1:0]   l3_y [3];
  int                  hf_l3 [27];
  int                  xs_l3 [NB * 3 + 8];
  int                  n_cross_l3 = 0;
  int                  n_burst_l3 = 0;
  int                  n_wide_l3 = 0;

  // 4-parallel filter, 24 taps
  localparam int unsigned L_l4  = 4;
  localparam int unsigned N_l4  = 24;
  localparam int unsigned AW_l4 = acc_width(W, N_l4);
  logic [W-1:0]        l4_x [4];
  logic [W-1:0]        l4_h [12];
  logic [AW_l4-1:0]   l4_y [4];
  int                  hf_l4 [24];
  int                  xs_l4 [NB * 4 + 8];
  int                  n_cross_l4 = 0;
  int                  n_burst_l4 = 0;
  int                  n_wide_l4 = 0;

  ffa_fir_top dut (
    .clk, .rst_n,
    .l2_x, .l2_h, .l2_y,
    .l3_x, .l3_h, .l3_y,
    .l4_x, .l4_h, .l4_y
  );

  function automatic int rnd_w(input int mode);
    case (mode)
      1:       return -(1 <<< (W - 1));
      2:       return (1 <<< (W - 1)) - 1;
      default: return int'($signed(W'($urandom)));
    endcase
  endfunction

  task automatic set_coefs();
    for (int i = 0; i < 6; i++) begin
      hf_l2[i] = rnd_w(0);
      hf_l2[N_l2 - 1 - i] = hf_l2[i];
      l2_h[i] = W'(hf_l2[i]);
    end
    for (int i = 0; i < 14; i++) begin
      hf_l3[i] = rnd_w(0);
      hf_l3[N_l3 - 1 - i] = hf_l3[i];
      l3_h[i] = W'(hf_l3[i]);
    end
    for (int i = 0; i < 12; i++) begin
      hf_l4[i] = rnd_w(0);
      hf_l4[N_l4 - 1 - i] = hf_l4[i];
      l4_h[i] = W'(hf_l4[i]);
    end
  endtask

  // direct convolution; cross = contribution of samples before block start
  function automatic longint ref_l2(input int n, input int blk_start, output longint xblk);
    longint acc = 0;
    xblk = 0;
    for (int i = 0; i < int'(N_l2); i++) begin
      if (n - i >= 0) begin
        acc += longint'(hf_l2[i]) * longint'(xs_l2[n - i]);
        if (n - i < blk_start) xblk += longint'(hf_l2[i]) * longint'(xs_l2[n - i]);
      end
    end
    return acc;
  endfunction

  // direct convolution; cross = contribution of samples before block start
  function automatic longint ref_l3(input int n, input int blk_start, output longint xblk);
    longint acc = 0;
    xblk = 0;
    for (int i = 0; i < int'(N_l3); i++) begin
      if (n - i >= 0) begin
        acc += longint'(hf_l3[i]) * longint'(xs_l3[n - i]);
        if (n - i < blk_start) xblk += longint'(hf_l3[i]) * longint'(xs_l3[n - i]);
      end
    end
    return acc;
  endfunction

  // direct convolution; cross = contribution of samples before block start
  function automatic longint ref_l4(input int n, input int blk_start, output longint xblk);
    longint acc = 0;
    xblk = 0;
    for (int i = 0; i < int'(N_l4); i++) begin
      if (n - i >= 0) begin
        acc += longint'(hf_l4[i]) * longint'(xs_l4[n - i]);
        if (n - i < blk_start) xblk += longint'(hf_l4[i]) * longint'(xs_l4[n - i]);
      end
    end
    return acc;
  endfunction

  task automatic run();
    for (int k = 0; k < int'(NB) + 2; k++) begin
      bit burst;
      int m;
      @(negedge clk);
      if (k >= 2) begin
        for (int p = 0; p < int'(L_l2); p++) begin
          longint xblk;
          longint exp_v;
          exp_v = ref_l2((k - 2) * int'(L_l2) + p, (k - 2) * int'(L_l2), xblk);
          checks++;
          if (xblk != 0) n_cross_l2++;
          if (exp_v >= 32768 || exp_v < -32768) n_wide_l2++;
          if (longint'($signed(l2_y[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL l2 block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(l2_y[p]), exp_v);
          end
        end
        for (int p = 0; p < int'(L_l3); p++) begin
          longint xblk;
          longint exp_v;
          exp_v = ref_l3((k - 2) * int'(L_l3) + p, (k - 2) * int'(L_l3), xblk);
          checks++;
          if (xblk != 0) n_cross_l3++;
          if (exp_v >= 32768 || exp_v < -32768) n_wide_l3++;
          if (longint'($signed(l3_y[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL l3 block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(l3_y[p]), exp_v);
          end
        end
        for (int p = 0; p < int'(L_l4); p++) begin
          longint xblk;
          longint exp_v;
          exp_v = ref_l4((k - 2) * int'(L_l4) + p, (k - 2) * int'(L_l4), xblk);
          checks++;
          if (xblk != 0) n_cross_l4++;
          if (exp_v >= 32768 || exp_v < -32768) n_wide_l4++;
          if (longint'($signed(l4_y[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL l4 block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(l4_y[p]), exp_v);
          end
        end
      end
      burst = (k < int'(NB)) && ((k % 11) < 3) && (k > 20);
      m = burst ? 1 + ((k / 11) % 2) : 0;
      if (burst) n_burst_l2++;
      for (int p = 0; p < int'(L_l2); p++) begin
        xs_l2[k * int'(L_l2) + p] = (k < int'(NB)) ? rnd_w(m) : 0;
        l2_x[p] = W'(xs_l2[k * int'(L_l2) + p]);
      end
      if (burst) n_burst_l3++;
      for (int p = 0; p < int'(L_l3); p++) begin
        xs_l3[k * int'(L_l3) + p] = (k < int'(NB)) ? rnd_w(m) : 0;
        l3_x[p] = W'(xs_l3[k * int'(L_l3) + p]);
      end
      if (burst) n_burst_l4++;
      for (int p = 0; p < int'(L_l4); p++) begin
        xs_l4[k * int'(L_l4) + p] = (k < int'(NB)) ? rnd_w(m) : 0;
        l4_x[p] = W'(xs_l4[k * int'(L_l4) + p]);
      end
    end
  endtask

  task automatic check_seen(input string name, input int count);
    checks++;
    $display("mechanism %-10s seen %0d times", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    foreach (l2_x[p]) l2_x[p] = '0;
    foreach (l3_x[p]) l3_x[p] = '0;
    foreach (l4_x[p]) l4_x[p] = '0;
    repeat (3) @(posedge clk);
    for (int r = 0; r < int'(NRUN); r++) begin
      set_coefs();
      @(negedge clk) rst_n = 1'b1;
      run();
      // one more block of extreme samples so that the reset clears live state
      foreach (l2_x[p]) l2_x[p] = W'(rnd_w(2));
      foreach (l3_x[p]) l3_x[p] = W'(rnd_w(2));
      foreach (l4_x[p]) l4_x[p] = W'(rnd_w(2));
      @(negedge clk);
      if (r + 1 < int'(NRUN)) begin
        n_reset++;
        rst_n = 1'b0;
        foreach (l2_x[p]) l2_x[p] = '0;
        foreach (l3_x[p]) l3_x[p] = '0;
        foreach (l4_x[p]) l4_x[p] = '0;
        @(negedge clk);
      end
    end
    check_seen("reset", n_reset);
    check_seen("cross_l2", n_cross_l2);
    check_seen("burst_l2", n_burst_l2);
    check_seen("wide_l2", n_wide_l2);
    check_seen("cross_l3", n_cross_l3);
    check_seen("burst_l3", n_burst_l3);
    check_seen("wide_l3", n_wide_l3);
    check_seen("cross_l4", n_cross_l4);
    check_seen("burst_l4", n_burst_l4);
    check_seen("wide_l4", n_wide_l4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NRUN * (NB + 20) * 4) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
