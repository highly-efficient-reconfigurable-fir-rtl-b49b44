// tb_wallace_tree: random test of the carry-save reduction tree.
// Two instances (5 rows of 16 bits, the multiplier's case, and 9 rows of
// 12 bits, three layers) get random and all-ones rows; sum + carry must equal
// the sum of the rows modulo 2^W.
module tb_wallace_tree;
  int checks = 0, failures = 0;

  logic [15:0] ra [5];
  logic [15:0] sa, ca;
  logic [11:0] rb [9];
  logic [11:0] sb, cb;

  wallace_tree #(.ROWS(5), .W(16)) dut_a (.rows(ra), .sum(sa), .carry(ca));
  wallace_tree #(.ROWS(9), .W(12)) dut_b (.rows(rb), .sum(sb), .carry(cb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [15:0] ea;
      logic [11:0] eb;
      ea = '0;
      eb = '0;
      for (int r = 0; r < 5; r++) begin
        ra[r] = (t == 0) ? 16'hffff : 16'($urandom);
        ea += ra[r];
      end
      for (int r = 0; r < 9; r++) begin
        rb[r] = (t == 0) ? 12'hfff : 12'($urandom);
        eb += rb[r];
      end
      #1;
      checks += 2;
      if (16'(sa + ca) !== ea) begin
        failures++;
        $display("FAIL 5x16: %h + %h != %h", sa, ca, ea);
      end
      if (12'(sb + cb) !== eb) begin
        failures++;
        $display("FAIL 9x12: %h + %h != %h", sb, cb, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
