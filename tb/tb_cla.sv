// tb_cla: self-checking test of the carry-lookahead adder.
// Two instances, 16 bits (whole 4-bit groups) and 13 bits (a partial last
// group), get corner cases and random operands with both carry-in values;
// sum and carry-out are compared with the integer sum a + b + cin.
module tb_cla;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic [12:0] a13, b13, s13;
  logic        cin, co16, co13;

  cla #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(co16));
  cla #(.W(13)) dut13 (.a(a13), .b(b13), .cin(cin), .s(s13), .cout(co13));

  task automatic check(input logic [15:0] a, input logic [15:0] b, input logic c);
    logic [16:0] e16;
    logic [13:0] e13;
    a16 = a; b16 = b; cin = c;
    a13 = a[12:0]; b13 = b[12:0];
    #1;
    e16 = 17'(a) + 17'(b) + 17'(c);
    e13 = 14'(a[12:0]) + 14'(b[12:0]) + 14'(c);
    checks += 2;
    if ({co16, s16} !== e16) begin
      failures++;
      $display("FAIL W16 %h+%h+%0d = %h, expected %h", a, b, c, {co16, s16}, e16);
    end
    if ({co13, s13} !== e13) begin
      failures++;
      $display("FAIL W13 %h+%h+%0d = %h, expected %h", a[12:0], b[12:0], c, {co13, s13}, e13);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000, 16'h0000, 0);
    check(16'hffff, 16'h0000, 1);
    check(16'hffff, 16'hffff, 1);
    check(16'h8000, 16'h8000, 0);
    check(16'h0fff, 16'h0001, 0);
    check(16'h00ff, 16'hff01, 0);
    for (int i = 0; i < 16; i++) check(16'hffff >> i, 16'h1, 0);
    for (int i = 0; i < 4000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
