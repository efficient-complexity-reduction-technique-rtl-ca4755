// tb_table1_lengths -- the symmetric parallel FIR filters at longer lengths.
//
// Runs the two-parallel filter at 24 and 36 taps and the three- and
// four-parallel filters at 36 taps, the shorter lengths of the comparison
// of filter lengths (longer lengths only change N), all with 8-bit samples
// and coefficients and carry-save adders, on random symmetric coefficient
// sets and random samples. The stream is long enough to fill every delay
// line (more than N/L blocks). Each output sample is compared, two clocks
// after its block, with the direct convolution
// y(n) = sum h(i) x(n-i).
module tb_table1_lengths;
  import ffa_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned NB = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // fir_l2_prop, 24 taps
  localparam int unsigned L_a  = 2;
  localparam int unsigned N_a  = 24;
  localparam int unsigned AW_a = acc_width(W, N_a);
  logic [W-1:0]      x_a [2];
  logic [W-1:0]      h_a [12];
  logic [AW_a-1:0] y_a [2];
  int                hf_a [24];
  int                xs_a [NB * 2 + 8];
  fir_l2_prop #(.W(W), .N(N_a), .ARCH(ADD_CSA)) dut_a (
    .clk, .rst_n, .x(x_a), .h(h_a), .y(y_a)
  );

  function automatic longint ref_a(input int n);
    longint acc = 0;
    for (int i = 0; i < int'(N_a); i++)
      if (n - i >= 0) acc += longint'(hf_a[i]) * longint'(xs_a[n - i]);
    return acc;
  endfunction

  // fir_l2_prop, 36 taps
  localparam int unsigned L_b  = 2;
  localparam int unsigned N_b  = 36;
  localparam int unsigned AW_b = acc_width(W, N_b);
  logic [W-1:0]      x_b [2];
  logic [W-1:0]      h_b [18];
  logic [AW_b-1:0] y_b [2];
  int                hf_b [36];
  int                xs_b [NB * 2 + 8];
  fir_l2_prop #(.W(W), .N(N_b), .ARCH(ADD_CSA)) dut_b (
    .clk, .rst_n, .x(x_b), .h(h_b), .y(y_b)
  );

  function automatic longint ref_b(input int n);
    longint acc = 0;
    for (int i = 0; i < int'(N_b); i++)
      if (n - i >= 0) acc += longint'(hf_b[i]) * longint'(xs_b[n - i]);
    return acc;
  endfunction

  // fir_l3_prop, 36 taps
  localparam int unsigned L_d  = 3;
  localparam int unsigned N_d  = 36;
  localparam int unsigned AW_d = acc_width(W, N_d);
  logic [W-1:0]      x_d [3];
  logic [W-1:0]      h_d [18];
  logic [AW_d-1:0] y_d [3];
  int                hf_d [36];
  int                xs_d [NB * 3 + 8];
  fir_l3_prop #(.W(W), .N(N_d), .ARCH(ADD_CSA)) dut_d (
    .clk, .rst_n, .x(x_d), .h(h_d), .y(y_d)
  );

  function automatic longint ref_d(input int n);
    longint acc = 0;
    for (int i = 0; i < int'(N_d); i++)
      if (n - i >= 0) acc += longint'(hf_d[i]) * longint'(xs_d[n - i]);
    return acc;
  endfunction

  // fir_l4_prop, 36 taps
  localparam int unsigned L_f  = 4;
  localparam int unsigned N_f  = 36;
  localparam int unsigned AW_f = acc_width(W, N_f);
  logic [W-1:0]      x_f [4];
  logic [W-1:0]      h_f [18];
  logic [AW_f-1:0] y_f [4];
  int                hf_f [36];
  int                xs_f [NB * 4 + 8];
  fir_l4_prop #(.W(W), .N(N_f), .ARCH(ADD_CSA)) dut_f (
    .clk, .rst_n, .x(x_f), .h(h_f), .y(y_f)
  );

  function automatic longint ref_f(input int n);
    longint acc = 0;
    for (int i = 0; i < int'(N_f); i++)
      if (n - i >= 0) acc += longint'(hf_f[i]) * longint'(xs_f[n - i]);
    return acc;
  endfunction

  function automatic int rnd_w();
    return int'($signed(W'($urandom)));
  endfunction

  initial begin
    for (int i = 0; i < 12; i++) begin
      hf_a[i] = rnd_w();
      hf_a[N_a - 1 - i] = hf_a[i];
      h_a[i] = W'(hf_a[i]);
    end
    foreach (x_a[p]) x_a[p] = '0;
    for (int i = 0; i < 18; i++) begin
      hf_b[i] = rnd_w();
      hf_b[N_b - 1 - i] = hf_b[i];
      h_b[i] = W'(hf_b[i]);
    end
    foreach (x_b[p]) x_b[p] = '0;
    for (int i = 0; i < 18; i++) begin
      hf_d[i] = rnd_w();
      hf_d[N_d - 1 - i] = hf_d[i];
      h_d[i] = W'(hf_d[i]);
    end
    foreach (x_d[p]) x_d[p] = '0;
    for (int i = 0; i < 18; i++) begin
      hf_f[i] = rnd_w();
      hf_f[N_f - 1 - i] = hf_f[i];
      h_f[i] = W'(hf_f[i]);
    end
    foreach (x_f[p]) x_f[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < int'(NB) + 2; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        for (int p = 0; p < int'(L_a); p++) begin
          longint exp_v;
          exp_v = ref_a((k - 2) * int'(L_a) + p);
          checks++;
          if (longint'($signed(y_a[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL 24-tap L=2 block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(y_a[p]), exp_v);
          end
        end
        for (int p = 0; p < int'(L_b); p++) begin
          longint exp_v;
          exp_v = ref_b((k - 2) * int'(L_b) + p);
          checks++;
          if (longint'($signed(y_b[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL 36-tap L=2 block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(y_b[p]), exp_v);
          end
        end
        for (int p = 0; p < int'(L_d); p++) begin
          longint exp_v;
          exp_v = ref_d((k - 2) * int'(L_d) + p);
          checks++;
          if (longint'($signed(y_d[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL 36-tap L=3 block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(y_d[p]), exp_v);
          end
        end
        for (int p = 0; p < int'(L_f); p++) begin
          longint exp_v;
          exp_v = ref_f((k - 2) * int'(L_f) + p);
          checks++;
          if (longint'($signed(y_f[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL 36-tap L=4 block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(y_f[p]), exp_v);
          end
        end
      end
      for (int p = 0; p < int'(L_a); p++) begin
        xs_a[k * int'(L_a) + p] = (k < int'(NB)) ? rnd_w() : 0;
        x_a[p] = W'(xs_a[k * int'(L_a) + p]);
      end
      for (int p = 0; p < int'(L_b); p++) begin
        xs_b[k * int'(L_b) + p] = (k < int'(NB)) ? rnd_w() : 0;
        x_b[p] = W'(xs_b[k * int'(L_b) + p]);
      end
      for (int p = 0; p < int'(L_d); p++) begin
        xs_d[k * int'(L_d) + p] = (k < int'(NB)) ? rnd_w() : 0;
        x_d[p] = W'(xs_d[k * int'(L_d) + p]);
      end
      for (int p = 0; p < int'(L_f); p++) begin
        xs_f[k * int'(L_f) + p] = (k < int'(NB)) ? rnd_w() : 0;
        x_f[p] = W'(xs_f[k * int'(L_f) + p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (4 * NB) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
