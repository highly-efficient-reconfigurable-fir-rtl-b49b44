// rfir_top: reconfigurable transpose-form block FIR filter with pipelined
// modified Booth multipliers.
//
// Every clock the filter takes a block of L input samples,
// x_blk[l] = x(kL - l), and delivers a block of L outputs,
// y_blk[l] = y(kL - l) = sum_{n=0}^{N-1} h(n) x(kL - l - n).
// Writing n = mL + i splits the filter into M = N/L short weight vectors
// c_m = [h(mL) .. h(mL+L-1)]; the block output is then
// y_k = sum_m r_{k-m}(c_m), where r_k(c_m) is the L-row inner product of
// block k with c_m. Datapath (as in the filter's design):
//   - csu: stores NUM_CH channel filters and delivers the one picked by ch_sel;
//   - ru: registers the block and forms the L overlapping sample rows S_k;
//   - M ipu instances: IPU-(j+1) gets c_{M-1-j} and computes r^j for all rows
//     with L x L Booth multipliers and CLA adder trees;
//   - pau: transpose-form delay lines that delay r^j by M-1-j blocks and add
//     them, so c_m's product reaches the output m blocks late, as the
//     equation needs.
// Timing: ch_sel applies to the block presented in the same clock; y_blk for
// that block appears LATENCY = 5 clocks later (1 RU register, 3 multiplier
// stages, 1 output register), and out_valid is in_valid delayed by the same
// amount. There is no stall: a block is consumed every clock. After a channel
// switch the next M-1 output blocks mix both filters, because each product
// uses the coefficients active when its input block entered.
// Word lengths, the number of channels, the write port of the coefficient
// store, the output register, in_valid/out_valid and the asynchronous
// active-low reset are this design's choices; outputs are full precision.
module rfir_top
  import rfir_pkg::*;
#(
  parameter int unsigned L      = DEF_L,
  parameter int unsigned N      = DEF_N,
  parameter int unsigned NUM_CH = DEF_NUM_CH,
  parameter int unsigned DATA_W = DEF_DATA_W,
  parameter int unsigned COEF_W = DEF_COEF_W,
  localparam int unsigned M       = N / L,
  localparam int unsigned ACC_W   = DATA_W + COEF_W + $clog2(N),
  localparam int unsigned CH_W    = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned IDX_W   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned LATENCY = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] x_blk [L],
  input  logic              in_valid,
  input  logic [CH_W-1:0]   ch_sel,
  input  logic              coef_we,
  input  logic [CH_W-1:0]   coef_ch,
  input  logic [IDX_W-1:0]  coef_idx,
  input  logic [COEF_W-1:0] coef_data,
  output logic [ACC_W-1:0]  y_blk [L],
  output logic              out_valid
);

  // N must be a multiple of L for the block formulation
  if (N % L != 0) begin : g_bad_size
    $error("rfir_top: N must be a multiple of L");
  end

  logic [COEF_W-1:0] coef [M][L];
  logic [DATA_W-1:0] rows [L][L];
  logic [ACC_W-1:0]  r    [M][L];
  logic [ACC_W-1:0]  y    [L];

  csu #(.L(L), .N(N), .NUM_CH(NUM_CH), .COEF_W(COEF_W)) u_csu (
    .clk(clk), .rst_n(rst_n), .ch_sel(ch_sel),
    .we(coef_we), .wr_ch(coef_ch), .wr_idx(coef_idx), .wr_data(coef_data),
    .coef(coef)
  );

  ru #(.L(L), .DATA_W(DATA_W)) u_ru (
    .clk(clk), .rst_n(rst_n), .x_blk(x_blk), .rows(rows)
  );

  for (genvar j = 0; j < M; j++) begin : g_ipu
    ipu #(.L(L), .DATA_W(DATA_W), .COEF_W(COEF_W), .ACC_W(ACC_W)) u_ipu (
      .clk(clk), .rst_n(rst_n), .coef(coef[M-1-j]), .rows(rows), .r(r[j])
    );
  end

  pau #(.L(L), .M(M), .ACC_W(ACC_W)) u_pau (
    .clk(clk), .rst_n(rst_n), .r(r), .y(y)
  );

  // Output register and valid pipeline
  logic [LATENCY-1:0] vpipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned l = 0; l < L; l++) y_blk[l] <= '0;
      vpipe <= '0;
    end else begin
      y_blk <= y;
      vpipe <= {vpipe[LATENCY-2:0], in_valid};
    end
  end

  assign out_valid = vpipe[LATENCY-1];

endmodule
