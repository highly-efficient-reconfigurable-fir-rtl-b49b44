// tb_booth_mult: test of the 3-stage pipelined Booth multiplier.
// An 8x8 instance is fed a new operand pair every clock for all 65536 pairs;
// each product must appear exactly 3 clocks after its operands (checked
// against the product computed in the testbench, and one clock earlier must
// not already show it for a changed pair). A 6x6 instance checks the worked
// example -21 * -25 = 525.
module tb_booth_mult;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]  x, y;
  logic [15:0] p;
  logic [5:0]  x6, y6;
  logic [11:0] p6;

  booth_mult #(.WX(8), .WY(8)) dut  (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .p(p));
  booth_mult #(.WX(6), .WY(6)) dut6 (.clk(clk), .rst_n(rst_n), .x(x6), .y(y6), .p(p6));

  localparam int LAT = 3;
  logic [15:0] exp_q [$];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; y = 0; x6 = 0; y6 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (p !== 16'd0) begin
      failures++;
      $display("FAIL product not cleared by reset");
    end
    // stream of all pairs, one per clock
    for (int t = 0; t < 65536 + LAT; t++) begin
      if (t >= LAT) begin
        logic [15:0] e;
        e = exp_q.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d p=%h expected %h", t, p, e);
        end
      end
      if (t < 65536) begin
        x = 8'(t);
        y = 8'(t >> 8);
        exp_q.push_back(16'(int'($signed(x)) * int'($signed(y))));
      end
      @(negedge clk);
    end
    // worked example and latency: result must not be there after 2 clocks
    x6 = 6'b101011; y6 = 6'b100111;
    @(negedge clk);
    x6 = 0; y6 = 0;
    @(negedge clk);
    checks++;
    if (p6 === 12'd525) begin
      failures++;
      $display("FAIL product visible after 2 clocks");
    end
    @(negedge clk);
    checks++;
    if (p6 !== 12'd525) begin
      failures++;
      $display("FAIL -21 * -25 = %0d", $signed(p6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
