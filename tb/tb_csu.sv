// tb_csu: test of the coefficient storage unit at its default size
// (4 channels of 64 coefficients, L = 4).
// All channels are loaded with random coefficients through the write port;
// then channels are selected in random order and, one clock after each
// selection, all M x L outputs must equal h(mL + i) of that channel. A
// rewrite of one coefficient must show on the next selection.
module tb_csu;
  localparam int L = 4, N = 64, NC = 4, M = N / L;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] ch_sel, wr_ch;
  logic       we;
  logic [5:0] wr_idx;
  logic [7:0] wr_data;
  logic [7:0] coef [M][L];
  logic [7:0] model [NC][N];

  csu dut (.clk(clk), .rst_n(rst_n), .ch_sel(ch_sel), .we(we), .wr_ch(wr_ch),
           .wr_idx(wr_idx), .wr_data(wr_data), .coef(coef));

  task automatic check_set(input int ch);
    for (int m = 0; m < M; m++)
      for (int i = 0; i < L; i++) begin
        checks++;
        if (coef[m][i] !== model[ch][m*L+i]) begin
          failures++;
          if (failures < 10) $display("FAIL ch %0d coef[%0d][%0d]=%h expected %h",
                                      ch, m, i, coef[m][i], model[ch][m*L+i]);
        end
      end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ch_sel = 0; we = 0; wr_ch = 0; wr_idx = 0; wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++)
      for (int n = 0; n < N; n++) begin
        model[c][n] = 8'($urandom);
        we = 1; wr_ch = 2'(c); wr_idx = 6'(n); wr_data = model[c][n];
        @(negedge clk);
      end
    we = 0;
    @(negedge clk);
    for (int t = 0; t < 40; t++) begin
      int c;
      c = $urandom_range(NC - 1);
      ch_sel = 2'(c);
      @(negedge clk);
      check_set(c);
    end
    // rewrite one coefficient of channel 2 and read it back
    we = 1; wr_ch = 2; wr_idx = 6'd37; wr_data = ~model[2][37];
    model[2][37] = ~model[2][37];
    ch_sel = 1;
    @(negedge clk);
    we = 0; ch_sel = 2;
    @(negedge clk);
    check_set(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
