// rca_adder -- W-bit ripple-carry adder / subtractor.
//
// s = a + (sub ? ~b : b) + (sub | cin), i.e. a+b+cin, or a-b when sub=1
// (two's complement: the operand is inverted and the +1 enters as carry-in,
// in which case cin is ignored). The carry ripples bit by bit through a chain
// of full adders (sum = a^b^c, carry = majority(a,b,c)), the adder the
// filters' ripple-carry variant is built from. Purely combinational; the
// result wraps modulo 2^W and cout is the carry out of the top bit.
//
// A textbook ripple-carry adder; the subtract input is this design's own.
module rca_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] b_eff;
  logic         carry;

  assign b_eff = sub ? ~b : b;

  always_comb begin
    carry = sub | cin;
    for (int i = 0; i < int'(W); i++) begin
      s[i]  = a[i] ^ b_eff[i] ^ carry;
      carry = (a[i] & b_eff[i]) | (carry & (a[i] ^ b_eff[i]));
    end
    cout = carry;
  end

endmodule
