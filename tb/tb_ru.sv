// tb_ru: test of the register unit (L = 4, 8-bit samples).
// Random sample blocks are streamed one per clock, with x_blk[l] = x(kL-l);
// one clock after block k the rows must be rows[l][i] = x(kL-l-i), taken from
// the sample history the testbench keeps (zero before the first block).
module tb_ru;
  localparam int L = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] x_blk [L];
  logic [7:0] rows  [L][L];
  logic [7:0] samp  [int];   // sample index -> value

  ru dut (.clk(clk), .rst_n(rst_n), .x_blk(x_blk), .rows(rows));

  function automatic logic [7:0] xs(int s);
    return samp.exists(s) ? samp[s] : 8'd0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < L; l++) x_blk[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 1; k <= 200; k++) begin
      for (int l = 0; l < L; l++) begin
        x_blk[l] = 8'($urandom);
        samp[k*L - l] = x_blk[l];
      end
      @(negedge clk);
      for (int l = 0; l < L; l++)
        for (int i = 0; i < L; i++) begin
          checks++;
          if (rows[l][i] !== xs(k*L - l - i)) begin
            failures++;
            if (failures < 10) $display("FAIL k=%0d rows[%0d][%0d]=%h expected %h",
                                        k, l, i, rows[l][i], xs(k*L - l - i));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
