// tb_booth_encoder: exhaustive test of the radix-4 Booth recoder.
// For every 8-bit and every 7-bit multiplier it checks that each digit is a
// legal code (never both magnitudes, no negative zero) and that
// sum_j digit_j * 4^j equals the signed multiplier value. It also checks the
// digits of -25 = 100111, the example multiplier, against -2, +2, -1.
module tb_booth_encoder;
  import rfir_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0] y8;
  logic [6:0] y7;
  logic [5:0] y6;
  booth_dig_t d8 [4];
  booth_dig_t d7 [4];
  booth_dig_t d6 [3];

  booth_encoder #(.WY(8)) dut8 (.y(y8), .dig(d8));
  booth_encoder #(.WY(7)) dut7 (.y(y7), .dig(d7));
  booth_encoder #(.WY(6)) dut6 (.y(y6), .dig(d6));

  function automatic int dval(booth_dig_t d);
    int v;
    v = d.two ? 2 : d.one ? 1 : 0;
    return d.neg ? -v : v;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      int s8, s7;
      y8 = 8'(v);
      y7 = 7'(v);
      #1;
      s8 = 0;
      for (int j = 0; j < 4; j++) begin
        chk(!(d8[j].one && d8[j].two), "8-bit digit has both magnitudes");
        chk(!(d8[j].neg && !d8[j].one && !d8[j].two), "8-bit negative zero");
        s8 += dval(d8[j]) * (4 ** j);
      end
      chk(s8 == v, $sformatf("8-bit recode of %0d gives %0d", v, s8));
      if (v >= -64 && v < 64) begin
        s7 = 0;
        for (int j = 0; j < 4; j++) s7 += dval(d7[j]) * (4 ** j);
        chk(s7 == v, $sformatf("7-bit recode of %0d gives %0d", v, s7));
      end
    end
    // worked example: multiplier 100111 = -25 -> digits (LSB first) -1, +2, -2
    y6 = 6'b100111;
    #1;
    chk(dval(d6[0]) == -1 && dval(d6[1]) == 2 && dval(d6[2]) == -2,
        $sformatf("example digits %0d %0d %0d", dval(d6[2]), dval(d6[1]), dval(d6[0])));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
