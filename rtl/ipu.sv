// ipu: inner-product unit of the block FIR filter.
//
// L inner-product cells share one weight vector c_m = [h(mL) .. h(mL+L-1)];
// cell l receives row l of S_k, so the unit delivers the L partial inner
// products r[l] = sum_i h(mL+i) * x(kL-l-i) of one block in parallel, 3 clocks
// (the multiplier latency) after its inputs. Structure as in the filter's
// design.
module ipu #(
  parameter int unsigned L      = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned COEF_W = 8,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [COEF_W-1:0] coef [L],
  input  logic [DATA_W-1:0] rows [L][L],
  output logic [ACC_W-1:0]  r    [L]
);

  for (genvar l = 0; l < L; l++) begin : g_ipc
    ipc #(.L(L), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_ipc (
      .clk(clk), .rst_n(rst_n), .coef(coef), .row(rows[l]), .r(r[l])
    );
  end

endmodule
