// tb_booth_decoder: test of the Booth partial-product generator.
// The testbench recodes the multiplier itself (from the recoding table) and
// drives the digits, then checks every row: row_j plus its correction bit
// must equal digit_j * x * 4^j modulo 2^16, and all rows together must add
// up to x * y. Exhaustive over 8-bit x and y.
module tb_booth_decoder;
  import rfir_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  x;
  booth_dig_t  dig [4];
  logic [15:0] pp  [5];

  booth_decoder #(.WX(8), .WY(8)) dut (.x(x), .dig(dig), .pp(pp));

  function automatic int recode(logic [2:0] t);
    case (t)
      3'b000, 3'b111: return 0;
      3'b001, 3'b010: return 1;
      3'b011:         return 2;
      3'b100:         return -2;
      default:        return -1;   // 101, 110
    endcase
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int yv = -128; yv < 128; yv++) begin
      logic [8:0] ye;
      int dv [4];
      ye = {8'(yv), 1'b0};
      for (int j = 0; j < 4; j++) begin
        dv[j] = recode(ye[2*j +: 3]);
        dig[j].neg = dv[j] < 0;
        dig[j].two = (dv[j] == 2) || (dv[j] == -2);
        dig[j].one = (dv[j] == 1) || (dv[j] == -1);
      end
      for (int xv = -128; xv < 128; xv++) begin
        logic [15:0] tot;
        x = 8'(xv);
        #1;
        tot = '0;
        for (int j = 0; j < 4; j++) begin
          logic [15:0] want, got;
          want = 16'(dv[j] * xv * (4 ** j));
          got  = pp[j] + (pp[4][2*j] ? 16'(1 << (2*j)) : 16'd0);
          checks++;
          if (got !== want) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d y=%0d row %0d: %h want %h", xv, yv, j, got, want);
          end
        end
        for (int r = 0; r < 5; r++) tot += pp[r];
        checks++;
        if (tot !== 16'(xv * yv)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d sum %h", xv, yv, tot);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
