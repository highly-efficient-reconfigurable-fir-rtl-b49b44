// tb_ipc: test of the inner-product cell (L = 4, 8-bit operands, 22-bit sum).
// Random rows and weight vectors, including all-extreme ones, are applied one
// per clock; 3 clocks later r must equal sum_i coef[i] * row[i] computed in
// the testbench.
module tb_ipc;
  localparam int L = 4, AW = 22, LAT = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]    coef [L];
  logic [7:0]    row  [L];
  logic [AW-1:0] r;
  logic [AW-1:0] exp_q [$];

  ipc dut (.clk(clk), .rst_n(rst_n), .coef(coef), .row(row), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < L; i++) begin coef[i] = 0; row[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000 + LAT; t++) begin
      if (t >= LAT) begin
        logic [AW-1:0] e;
        e = exp_q.pop_front();
        checks++;
        if (r !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d r=%0d expected %0d", t, $signed(r), $signed(e));
        end
      end
      if (t < 2000) begin
        int acc;
        acc = 0;
        for (int i = 0; i < L; i++) begin
          coef[i] = (t < 4) ? ((t & 1) ? 8'h80 : 8'h7f) : 8'($urandom);
          row[i]  = (t < 4) ? ((t & 2) ? 8'h80 : 8'h7f) : 8'($urandom);
          acc += int'($signed(coef[i])) * int'($signed(row[i]));
        end
        exp_q.push_back(AW'(acc));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
