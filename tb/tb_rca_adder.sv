// tb_rca_adder -- self-checking testbench of the ripple-carry adder/subtractor.
//
// A 5-bit instance is checked exhaustively (all a, b, cin, sub), a 16-bit one
// with random operands. Expected sum and carry-out come from the integer
// operators: a+b+cin for addition, a+~b+1 (carry set when a >= b unsigned)
// for subtraction.
module tb_rca_adder;

  int checks = 0;
  int failures = 0;

  logic [4:0]  a5, b5, s5;
  logic        cin5, sub5, co5;
  logic [15:0] a16, b16, s16;
  logic        cin16, sub16, co16;

  rca_adder #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(cin5),  .sub(sub5),  .s(s5),  .cout(co5));
  rca_adder #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin16), .sub(sub16), .s(s16), .cout(co16));

  function automatic logic [16:0] ref_add(input int w, input logic [15:0] a, input logic [15:0] b,
                                          input logic cin, input logic sub);
    logic [16:0] r;
    logic [15:0] mask;
    mask = 16'((32'd1 << w) - 1);
    if (sub) r = {1'b0, a & mask} + {1'b0, ~b & mask} + 17'd1;
    else     r = {1'b0, a & mask} + {1'b0, b & mask} + 17'(cin);
    // carry out is bit w
    return (r & 17'((32'd1 << w) - 1)) | (17'(r[w]) << 16);
  endfunction

  initial begin
    logic [16:0] e;
    for (int i = 0; i < 4 * 32 * 32; i++) begin
      {sub5, cin5, a5, b5} = 12'(i);
      #1;
      e = ref_add(5, 16'(a5), 16'(b5), cin5, sub5);
      checks++;
      if (s5 !== e[4:0] || co5 !== e[16]) begin
        failures++;
        if (failures < 10) $display("FAIL w5 a=%0d b=%0d cin=%0d sub=%0d s=%0d co=%0d", a5, b5, cin5, sub5, s5, co5);
      end
    end
    for (int i = 0; i < 5000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); cin16 = 1'($urandom); sub16 = 1'($urandom);
      if (i < 4) begin a16 = 16'hFFFF; b16 = (i < 2) ? 16'h0001 : 16'hFFFF; end
      #1;
      e = ref_add(16, a16, b16, cin16, sub16);
      checks++;
      if (s16 !== e[15:0] || co16 !== e[16]) begin
        failures++;
        if (failures < 10) $display("FAIL w16 a=%h b=%h cin=%0d sub=%0d s=%h co=%0d", a16, b16, cin16, sub16, s16, co16);
      end
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
