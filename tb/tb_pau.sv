// tb_pau: test of the pipelined adder unit (L = 4, M = 16, 22 bits).
// Random partial inner products r[j][l] are applied every clock; the output y
// must equal sum_j r[j][l] applied M-1-j clocks earlier (zero before reset
// release), computed from the history the testbench keeps.
module tb_pau;
  localparam int L = 4, M = 16, AW = 22;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [AW-1:0] r [M][L];
  logic [AW-1:0] y [L];
  logic [AW-1:0] hist [0:299][M][L];

  pau dut (.clk(clk), .rst_n(rst_n), .r(r), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < M; j++) for (int l = 0; l < L; l++) r[j][l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int j = 0; j < M; j++)
        for (int l = 0; l < L; l++) begin
          r[j][l] = AW'($urandom);
          hist[t][j][l] = r[j][l];
        end
      #1;
      for (int l = 0; l < L; l++) begin
        logic [AW-1:0] e;
        e = '0;
        for (int j = 0; j < M; j++)
          if (t - (M - 1 - j) >= 0) e += hist[t-(M-1-j)][j][l];
        checks++;
        if (y[l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d y[%0d]=%h expected %h", t, l, y[l], e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
