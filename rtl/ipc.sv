// ipc: inner-product cell of the block FIR filter.
//
// Computes the L-point inner product of one row of samples with one short
// weight vector: r = sum_i coef[i] * row[i], where row[i] = x(kL - l - i) and
// coef[i] = h(mL + i). It holds L pipelined modified Booth multipliers (sample
// as multiplicand, coefficient as Booth-recoded multiplier) and a binary tree
// of carry-lookahead adders, as the filter's design prescribes. Products are
// sign-extended to ACC_W bits before the tree; when L is not a power of two
// the tree is padded with zeros. The tree is combinational, so r follows the
// inputs after the 3-clock multiplier latency.
module ipc #(
  parameter int unsigned L      = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [COEF_W-1:0] coef [L],
  input  logic [DATA_W-1:0] row  [L],
  output logic [ACC_W-1:0]  r
);

  localparam int unsigned PW  = DATA_W + COEF_W;
  localparam int unsigned LV  = (L > 1) ? $clog2(L) : 0;  // adder tree levels
  localparam int unsigned LP  = 1 << LV;                  // padded leaf count

  logic [PW-1:0] prod [L];

  for (genvar i = 0; i < L; i++) begin : g_mul
    booth_mult #(.WX(DATA_W), .WY(COEF_W)) u_mul (
      .clk(clk), .rst_n(rst_n), .x(row[i]), .y(coef[i]), .p(prod[i])
    );
  end

  // One generate block per adder-tree level; level 0 holds the sign-extended
  // products, level LV the inner product.
  for (genvar v = 0; v <= LV; v++) begin : g_lvl
    localparam int unsigned NN = LP >> v;
    logic [ACC_W-1:0] node [NN];
    if (v == 0) begin : g_leaf
      for (genvar j = 0; j < NN; j++) begin : g_ext
        if (j < L) begin : g_p
          assign node[j] = {{(ACC_W - PW){prod[j][PW-1]}}, prod[j]};
        end else begin : g_z
          assign node[j] = '0;
        end
      end
    end else begin : g_sum
      for (genvar j = 0; j < NN; j++) begin : g_add
        logic unused_cout;
        cla #(.W(ACC_W)) u_add (
          .a(g_lvl[v-1].node[2*j]), .b(g_lvl[v-1].node[2*j+1]), .cin(1'b0),
          .s(node[j]), .cout(unused_cout)
        );
      end
    end
  end

  assign r = g_lvl[LV].node[0];

endmodule
