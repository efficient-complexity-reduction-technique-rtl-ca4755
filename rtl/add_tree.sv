// add_tree -- multi-operand adder used for the pre- and post-processing
// additions of the fast-FIR structures.
//
// sum = ops[0] +/- ops[1] +/- ... +/- ops[NOPS-1], the sign of operand i
// being '-' where bit i of SUB is set (operand 0 is always added). All
// operands and the result are W-bit two's complement words; the sum wraps
// modulo 2^W, so callers size W for the largest value they expect.
//
// ARCH selects the implementation, the two adder styles the filters are
// characterised with:
//   ADD_RCA  a chain of NOPS-1 ripple-carry adders (rca_adder); a subtracted
//            operand is inverted and its +1 is the carry-in of its adder.
//   ADD_CSA  a chain of NOPS-2 3:2 carry-save compressors followed by one
//            ripple-carry adder. A subtracted operand is inverted; its +1 is
//            placed in the free least significant bit of the carry word of a
//            compressor, or in the carry-in of the final adder.
// With NOPS = 2 both styles reduce to one ripple-carry adder/subtractor.
// Purely combinational.
//
// Ripple-carry and carry-save adders are the published adder styles; the
// chain arrangement and the handling of subtraction are this design's own.
module add_tree
  import ffa_pkg::*;
#(
  parameter int unsigned   NOPS = 3,
  parameter int unsigned   W    = 16,
  parameter logic [15:0]   SUB  = '0,
  parameter adder_arch_e   ARCH = ADD_CSA
) (
  input  logic [W-1:0] ops [NOPS],
  output logic [W-1:0] sum
);

  // At most 16 operands (width of SUB); operand 0 cannot be subtracted.
  if (NOPS < 2 || NOPS > 16) begin : g_bad_nops
    $error("add_tree: NOPS must be 2..16");
  end
  if (SUB[0]) begin : g_bad_sub
    $error("add_tree: operand 0 cannot be subtracted");
  end

  if (ARCH == ADD_RCA || NOPS == 2) begin : g_rca
    logic [W-1:0] acc [NOPS];
    assign acc[0] = ops[0];
    for (genvar i = 1; i < int'(NOPS); i++) begin : g_stage
      logic unused_cout;
      rca_adder #(.W(W)) u_add (
        .a   (acc[i-1]),
        .b   (ops[i]),
        .cin (1'b0),
        .sub (SUB[i]),
        .s   (acc[i]),
        .cout(unused_cout)
      );
    end
    assign sum = acc[NOPS-1];
  end else begin : g_csa
    logic [W-1:0] s_vec;      // carry-save sum word after the last compressor
    logic [W-1:0] c_vec;      // carry-save carry word after the last compressor
    logic         unused_cout;
    logic [W-1:0] opx [NOPS]; // operands with subtracted ones inverted

    always_comb begin
      for (int i = 0; i < int'(NOPS); i++) begin
        opx[i] = SUB[i] ? ~ops[i] : ops[i];
      end
    end

    always_comb begin
      logic [W-1:0] s_n, c_n;
      // first compressor: operands 0, 1, 2; +1 of operand 1 in the carry LSB
      s_vec = opx[0] ^ opx[1] ^ opx[2];
      c_vec = ((opx[0] & opx[1]) | (opx[0] & opx[2]) | (opx[1] & opx[2])) << 1;
      c_vec[0] = SUB[1];
      // one more compressor per remaining operand
      for (int i = 3; i < int'(NOPS); i++) begin
        s_n = s_vec ^ c_vec ^ opx[i];
        c_n = ((s_vec & c_vec) | (s_vec & opx[i]) | (c_vec & opx[i])) << 1;
        c_n[0] = SUB[i];
        s_vec = s_n;
        c_vec = c_n;
      end
    end

    // carry-propagate adder closes the chain; +1 of operand 2 is its carry-in
    rca_adder #(.W(W)) u_cpa (
      .a   (s_vec),
      .b   (c_vec),
      .cin (SUB[2]),
      .sub (1'b0),
      .s   (sum),
      .cout(unused_cout)
    );
  end

endmodule
