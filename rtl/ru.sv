// ru: register unit of the block FIR filter.
//
// Receives the input block x_blk[l] = x(kL - l), l = 0..L-1, registers it, and
// keeps the first L-1 samples x(kL-L), x(kL-L-1), ..., x(kL-2L+2) of the
// previous block in L-1 delay registers. From these 2L-1 samples it forms the
// L overlapping rows of S_k:
//   rows[l][i] = x(kL - l - i),  l, i = 0..L-1,
// which every inner-product unit receives. The delay registers and the row
// wiring follow the filter's design; the extra register on the incoming block
// is this design's choice and aligns the samples with the registered
// coefficient store, so rows for block k appear one clock after x_blk.
// Asynchronous active-low reset clears the sample history to zero.
module ru #(
  parameter int unsigned L      = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] x_blk [L],
  output logic [DATA_W-1:0] rows  [L][L]
);

  logic [DATA_W-1:0] cur  [L];        // x(kL - l)
  logic [DATA_W-1:0] prev [L];        // x((k-1)L - l), only l < L-1 used

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned l = 0; l < L; l++) begin
        cur[l]  <= '0;
        prev[l] <= '0;
      end
    end else begin
      cur <= x_blk;
      for (int unsigned l = 0; l + 1 < L; l++) prev[l] <= cur[l];
      prev[L-1] <= '0;
    end
  end

  // Samples x(kL - s) for s = 0..2L-2.
  logic [DATA_W-1:0] hist [2*L-1];

  always_comb begin
    for (int unsigned s = 0; s < L; s++) hist[s] = cur[s];
    for (int unsigned s = L; s < 2*L-1; s++) hist[s] = prev[s-L];
    for (int unsigned l = 0; l < L; l++)
      for (int unsigned i = 0; i < L; i++) rows[l][i] = hist[l+i];
  end

endmodule
