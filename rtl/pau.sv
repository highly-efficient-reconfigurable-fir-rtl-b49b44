// pau: pipelined adder unit of the transpose-form block FIR filter.
//
// Adds the partial inner products of the M inner-product units into a block
// of L outputs. Each of the L lanes is a transpose-form delay line: r[0][l]
// enters a delay register, and at every following stage j = 1..M-1 the
// registered running sum is added to r[j][l] by a carry-lookahead adder; all
// but the last sum are registered again. So
//   y[l](k) = sum_{j=0}^{M-1} r[j][l](k - (M-1-j)).
// The last adder drives y without a register, as in the filter's design.
// Asynchronous active-low reset clears the delay registers.
module pau #(
  parameter int unsigned L     = 4,
  parameter int unsigned M     = 16,
  parameter int unsigned ACC_W = 22
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ACC_W-1:0] r [M][L],
  output logic [ACC_W-1:0] y [L]
);

  // g_stage[j].s: sum leaving stage j (stage 0 is r[0] itself);
  // g_stage[j].d: delay register in front of the adders of stage j >= 1.
  for (genvar j = 0; j < M; j++) begin : g_stage
    logic [ACC_W-1:0] s [L];
    if (j == 0) begin : g_first
      assign s = r[0];
    end else begin : g_add
      logic [ACC_W-1:0] d [L];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int unsigned l = 0; l < L; l++) d[l] <= '0;
        end else begin
          d <= g_stage[j-1].s;
        end
      end
      for (genvar l = 0; l < L; l++) begin : g_lane
        logic unused_cout;
        cla #(.W(ACC_W)) u_add (
          .a(d[l]), .b(r[j][l]), .cin(1'b0), .s(s[l]), .cout(unused_cout)
        );
      end
    end
  end

  assign y = g_stage[M-1].s;

endmodule
