// tb_ipu: test of the inner-product unit (L = 4).
// Random sample rows and a random weight vector are applied one per clock;
// 3 clocks later every r[l] must equal the inner product of row l with the
// weight vector.
module tb_ipu;
  localparam int L = 4, AW = 22, LAT = 3;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]    coef [L];
  logic [7:0]    rows [L][L];
  logic [AW-1:0] r    [L];
  logic [AW-1:0] exp_q [$];

  ipu dut (.clk(clk), .rst_n(rst_n), .coef(coef), .rows(rows), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < L; i++) begin
      coef[i] = 0;
      for (int l = 0; l < L; l++) rows[l][i] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000 + LAT; t++) begin
      if (t >= LAT) begin
        for (int l = 0; l < L; l++) begin
          logic [AW-1:0] e;
          e = exp_q.pop_front();
          checks++;
          if (r[l] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d r[%0d]=%0d expected %0d", t, l, $signed(r[l]), $signed(e));
          end
        end
      end
      if (t < 1000) begin
        for (int i = 0; i < L; i++) coef[i] = 8'($urandom);
        for (int l = 0; l < L; l++) begin
          int acc;
        acc = 0;
          for (int i = 0; i < L; i++) begin
            rows[l][i] = 8'($urandom);
            acc += int'($signed(coef[i])) * int'($signed(rows[l][i]));
          end
          exp_q.push_back(AW'(acc));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
