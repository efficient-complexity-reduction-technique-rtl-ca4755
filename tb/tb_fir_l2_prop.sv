// tb_fir_l2_prop -- self-checking testbench of the 2-parallel symmetric FIR filter.
//
// Three filters run in lock step on independent random symmetric coefficient
// sets and random input streams: the default length with carry-save adders,
// the default length with ripple-carry adders, and a 10-tap filter
// (other sub-filter length, carry-save). Each output sample is compared with
// y(n) = sum h(i) x(n-i) computed directly from the full coefficient set, at
// exactly two clocks after the block that completes it, which also checks the
// latency. Blocks of extreme samples (-2^(W-1) and 2^(W-1)-1) and extreme
// coefficients are mixed in to exercise the word lengths. A reset in the
// middle of the run checks that all filter state is cleared.
module tb_fir_l2_prop;
  import ffa_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned L  = 2;
  localparam int unsigned NB = 400;            // blocks per run
  localparam int unsigned NS = NB * L + 8;     // samples kept per run

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---- DUT csa: N = 12, ADD_CSA
  localparam int unsigned N_csa  = 12;
  localparam int unsigned AW_csa = acc_width(W, N_csa);
  logic [W-1:0]        x_csa [L];
  logic [W-1:0]        h_csa [6];
  logic [AW_csa-1:0] y_csa [L];
  int                  hf_csa [N_csa];
  int                  xs_csa [NS];
  fir_l2_prop #(.W(W), .N(N_csa), .ARCH(ADD_CSA)) dut_csa (
    .clk, .rst_n, .x(x_csa), .h(h_csa), .y(y_csa)
  );

  // ---- DUT rca: N = 12, ADD_RCA
  localparam int unsigned N_rca  = 12;
  localparam int unsigned AW_rca = acc_width(W, N_rca);
  logic [W-1:0]        x_rca [L];
  logic [W-1:0]        h_rca [6];
  logic [AW_rca-1:0] y_rca [L];
  int                  hf_rca [N_rca];
  int                  xs_rca [NS];
  fir_l2_prop #(.W(W), .N(N_rca), .ARCH(ADD_RCA)) dut_rca (
    .clk, .rst_n, .x(x_rca), .h(h_rca), .y(y_rca)
  );

  // ---- DUT alt: N = 10, ADD_CSA
  localparam int unsigned N_alt  = 10;
  localparam int unsigned AW_alt = acc_width(W, N_alt);
  logic [W-1:0]        x_alt [L];
  logic [W-1:0]        h_alt [5];
  logic [AW_alt-1:0] y_alt [L];
  int                  hf_alt [N_alt];
  int                  xs_alt [NS];
  fir_l2_prop #(.W(W), .N(N_alt), .ARCH(ADD_CSA)) dut_alt (
    .clk, .rst_n, .x(x_alt), .h(h_alt), .y(y_alt)
  );

  function automatic int rnd_w(input int mode);
    // mode 0: uniform, 1: most negative, 2: most positive
    case (mode)
      1:       return -(1 <<< (W - 1));
      2:       return (1 <<< (W - 1)) - 1;
      default: return int'($signed(W'($urandom)));
    endcase
  endfunction
  task automatic set_coefs(input int mode);
    for (int i = 0; i < 6; i++) begin
      hf_csa[i] = rnd_w(mode);
      hf_csa[N_csa - 1 - i] = hf_csa[i];
      h_csa[i] = W'(hf_csa[i]);
    end
    for (int i = 0; i < 6; i++) begin
      hf_rca[i] = rnd_w(mode);
      hf_rca[N_rca - 1 - i] = hf_rca[i];
      h_rca[i] = W'(hf_rca[i]);
    end
    for (int i = 0; i < 5; i++) begin
      hf_alt[i] = rnd_w(mode);
      hf_alt[N_alt - 1 - i] = hf_alt[i];
      h_alt[i] = W'(hf_alt[i]);
    end
  endtask

  function automatic longint ref_csa(input int n);
    longint acc = 0;
    for (int i = 0; i < N_csa; i++) begin
      if (n - i >= 0) acc += longint'(hf_csa[i]) * longint'(xs_csa[n - i]);
    end
    return acc;
  endfunction

  function automatic longint ref_rca(input int n);
    longint acc = 0;
    for (int i = 0; i < N_rca; i++) begin
      if (n - i >= 0) acc += longint'(hf_rca[i]) * longint'(xs_rca[n - i]);
    end
    return acc;
  endfunction

  function automatic longint ref_alt(input int n);
    longint acc = 0;
    for (int i = 0; i < N_alt; i++) begin
      if (n - i >= 0) acc += longint'(hf_alt[i]) * longint'(xs_alt[n - i]);
    end
    return acc;
  endfunction

  // Drive NB blocks starting from a cleared filter; check every output.
  task automatic run(input int xmode);
    for (int k = 0; k < int'(NB) + 2; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        for (int p = 0; p < int'(L); p++) begin
          longint exp_v = ref_csa((k - 2) * int'(L) + p);
          checks++;
          if (longint'($signed(y_csa[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL csa block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(y_csa[p]), exp_v);
          end
        end
        for (int p = 0; p < int'(L); p++) begin
          longint exp_v = ref_rca((k - 2) * int'(L) + p);
          checks++;
          if (longint'($signed(y_rca[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL rca block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(y_rca[p]), exp_v);
          end
        end
        for (int p = 0; p < int'(L); p++) begin
          longint exp_v = ref_alt((k - 2) * int'(L) + p);
          checks++;
          if (longint'($signed(y_alt[p])) !== exp_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL alt block %0d phase %0d: got %0d expected %0d", k - 2, p, $signed(y_alt[p]), exp_v);
          end
        end
      end
      for (int p = 0; p < int'(L); p++) begin
        int m;
        m = (xmode == 1 && (k % 7) < 3) ? 1 + ((k / 7) % 2) : 0;
        xs_csa[k * int'(L) + p] = (k < int'(NB)) ? rnd_w(m) : 0;
        x_csa[p] = W'(xs_csa[k * int'(L) + p]);
        xs_rca[k * int'(L) + p] = (k < int'(NB)) ? rnd_w(m) : 0;
        x_rca[p] = W'(xs_rca[k * int'(L) + p]);
        xs_alt[k * int'(L) + p] = (k < int'(NB)) ? rnd_w(m) : 0;
        x_alt[p] = W'(xs_alt[k * int'(L) + p]);
      end
    end
  endtask

  initial begin
    foreach (x_csa[p]) x_csa[p] = '0;
    foreach (x_rca[p]) x_rca[p] = '0;
    foreach (x_alt[p]) x_alt[p] = '0;
    // run 1: random coefficients, random samples with extreme bursts
    set_coefs(0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(1);
    // run 2: extreme coefficients after a reset in the middle of activity
    set_coefs(1);
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    run(1);
    // run 3: random coefficients, uniform samples
    set_coefs(0);
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (20 * NB) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
