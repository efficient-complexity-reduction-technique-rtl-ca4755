// tb_add_tree -- self-checking testbench of the multi-operand adder.
//
// Ripple-carry and carry-save instances with 2, 3, 5 and 7 operands and
// various subtraction masks get the same random operands (plus all-ones and
// most-negative corner words); each sum is compared with the signed sum
// computed by the testbench, reduced modulo 2^W.
module tb_add_tree;
  import ffa_pkg::*;

  localparam int unsigned W = 12;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] ops [7];
  logic [W-1:0] s_r2, s_r5, s_c3, s_c5, s_c7, s_c2;

  localparam logic [15:0] SUB2 = 16'h0002;
  localparam logic [15:0] SUB3 = 16'h0006;
  localparam logic [15:0] SUB5 = 16'h0016;
  localparam logic [15:0] SUB7 = 16'h0056;

  add_tree #(.NOPS(2), .W(W), .SUB(SUB2), .ARCH(ADD_RCA)) dut_r2 (.ops(ops[0:1]), .sum(s_r2));
  add_tree #(.NOPS(2), .W(W), .SUB(16'h0), .ARCH(ADD_CSA)) dut_c2 (.ops(ops[0:1]), .sum(s_c2));
  add_tree #(.NOPS(5), .W(W), .SUB(SUB5), .ARCH(ADD_RCA)) dut_r5 (.ops(ops[0:4]), .sum(s_r5));
  add_tree #(.NOPS(3), .W(W), .SUB(SUB3), .ARCH(ADD_CSA)) dut_c3 (.ops(ops[0:2]), .sum(s_c3));
  add_tree #(.NOPS(5), .W(W), .SUB(SUB5), .ARCH(ADD_CSA)) dut_c5 (.ops(ops[0:4]), .sum(s_c5));
  add_tree #(.NOPS(7), .W(W), .SUB(SUB7), .ARCH(ADD_CSA)) dut_c7 (.ops(ops[0:6]), .sum(s_c7));

  function automatic logic [W-1:0] ref_sum(input int n, input logic [15:0] sub);
    longint acc = 0;
    for (int i = 0; i < n; i++) begin
      if (sub[i]) acc -= longint'($signed(ops[i]));
      else        acc += longint'($signed(ops[i]));
    end
    return W'(acc);
  endfunction

  task automatic check(input string name, input logic [W-1:0] got, input logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", name, $signed(got), $signed(exp_v));
    end
  endtask

  initial begin
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < 7; i++) begin
        case (t % 5)
          0:       ops[i] = '1;
          1:       ops[i] = {1'b1, {(W-1){1'b0}}};
          default: ops[i] = W'($urandom);
        endcase
      end
      #1;
      check("r2", s_r2, ref_sum(2, SUB2));
      check("c2", s_c2, ref_sum(2, 16'h0));
      check("r5", s_r5, ref_sum(5, SUB5));
      check("c3", s_c3, ref_sum(3, SUB3));
      check("c5", s_c5, ref_sum(5, SUB5));
      check("c7", s_c7, ref_sum(7, SUB7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
