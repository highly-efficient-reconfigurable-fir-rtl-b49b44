// csu: coefficient storage unit of the reconfigurable block FIR filter.
//
// Holds the N coefficients h(0..N-1) of each of NUM_CH channel filters and
// delivers the complete coefficient set of the channel selected by ch_sel one
// clock later, as M = N/L short weight vectors: coef[m][i] = h(mL + i).
// Reading a whole channel filter in one clock follows the filter's design; the
// store is a register array with a write port (we, wr_ch, wr_idx, wr_data) so
// that the channel filters can be loaded, where the original keeps them in ROM
// lookup tables whose contents are not given. The number of channels is this
// design's choice. A write and a read of the same entry in one clock return
// the old value. Asynchronous active-low reset clears the store and the output.
module csu #(
  parameter int unsigned L      = 4,
  parameter int unsigned N      = 64,
  parameter int unsigned NUM_CH = 4,
  parameter int unsigned COEF_W = 8,
  localparam int unsigned M     = N / L,
  localparam int unsigned CH_W  = (NUM_CH > 1) ? $clog2(NUM_CH) : 1,
  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CH_W-1:0]   ch_sel,
  input  logic              we,
  input  logic [CH_W-1:0]   wr_ch,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic [COEF_W-1:0] wr_data,
  output logic [COEF_W-1:0] coef [M][L]
);

  logic [COEF_W-1:0] mem [NUM_CH][N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < NUM_CH; c++)
        for (int unsigned n = 0; n < N; n++) mem[c][n] <= '0;
    end else if (we && (32'(wr_ch) < NUM_CH) && (32'(wr_idx) < N)) begin
      mem[wr_ch][wr_idx] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned m = 0; m < M; m++)
        for (int unsigned i = 0; i < L; i++) coef[m][i] <= '0;
    end else begin
      for (int unsigned m = 0; m < M; m++)
        for (int unsigned i = 0; i < L; i++)
          coef[m][i] <= (32'(ch_sel) < NUM_CH) ? mem[ch_sel][m*L+i] : '0;
    end
  end

endmodule
