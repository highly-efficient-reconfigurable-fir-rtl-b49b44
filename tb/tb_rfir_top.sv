// tb_rfir_top: end-to-end test of the filter at its default parameters
// (L = 4, N = 64, 4 channel filters, 8-bit samples and coefficients).
// All channel filters are loaded through the coefficient write port, then
// NBLK random sample blocks are streamed one per clock while the channel is
// switched, single coefficients are rewritten on the running channel,
// in_valid is dropped now and then and extreme samples (-128, +127 against
// -128 coefficients) are sent. Every output block is compared, 5 clocks after
// its input block, with the convolution computed by the testbench, including
// the mixing of two filters in the M-1 blocks after a switch: each tap group
// m contributes with the coefficients that were in force for block k-m.
// Each of these events is counted and must have happened at least once.
module tb_rfir_top;
  import rfir_pkg::*;
  localparam int L = DEF_L, N = DEF_N, NUM_CH = DEF_NUM_CH, NBLK = 400;
  int checks, failures;
  int n_switch, n_mixed, n_live_write, n_gap, n_extreme, n_valid_out;
  bit done;

  localparam int M = N / L;
  localparam int AW = 8 + 8 + $clog2(N);
  localparam int CW = (NUM_CH > 1) ? $clog2(NUM_CH) : 1;
  localparam int IW = $clog2(N);
  localparam int LAT = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0]    x_blk [L];
  logic          in_valid;
  logic [CW-1:0] ch_sel;
  logic          coef_we;
  logic [CW-1:0] coef_ch;
  logic [IW-1:0] coef_idx;
  logic [7:0]    coef_data;
  logic [AW-1:0] y_blk [L];
  logic          out_valid;

  rfir_top dut (
    .clk(clk), .rst_n(rst_n), .x_blk(x_blk), .in_valid(in_valid), .ch_sel(ch_sel),
    .coef_we(coef_we), .coef_ch(coef_ch), .coef_idx(coef_idx), .coef_data(coef_data),
    .y_blk(y_blk), .out_valid(out_valid)
  );

  // Reference model state
  int cf   [NUM_CH][N];     // coefficient store as the testbench wrote it
  int used [NBLK][N];       // coefficient set in force for each block
  int samp [NBLK*L];        // x(s) for s = 0 .. NBLK*L-1 (block k holds kL-l shifted by L-1)
  bit vld  [NBLK];
  int chh  [NBLK];

  // x(kL - l) for block k is kept at samp[k*L + (L-1-l)] so that
  // sample index s = kL - l maps to samp[s + L - 1]; negative -> zero.
  function automatic int xs(int s);
    return (s + L - 1 >= 0) ? samp[s + L - 1] : 0;
  endfunction

  function automatic int expect_y(int k, int l);
    int acc;
    acc = 0;
    for (int m = 0; m < M; m++)
      if (k - m >= 0)
        for (int i = 0; i < L; i++)
          acc += used[k-m][m*L+i] * xs(k*L - l - m*L - i);
    return acc;
  endfunction

  initial begin
    #(10 * (NBLK + 4 * N * NUM_CH + 200));
    failures++;
    $display("watchdog expired");
    done = 1;
  end

  initial begin
    done = 0;
    checks = 0; failures = 0;
    n_switch = 0; n_mixed = 0; n_live_write = 0; n_gap = 0; n_extreme = 0; n_valid_out = 0;
    for (int l = 0; l < L; l++) x_blk[l] = 0;
    in_valid = 0; ch_sel = 0; coef_we = 0; coef_ch = 0; coef_idx = 0; coef_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load every channel filter through the write port
    for (int c = 0; c < NUM_CH; c++)
      for (int n = 0; n < N; n++) begin
        cf[c][n] = (c == 0 && n < L) ? -128 : int'($signed(8'($urandom)));
        coef_we = 1; coef_ch = CW'(c); coef_idx = IW'(n); coef_data = 8'(cf[c][n]);
        @(negedge clk);
      end
    coef_we = 0;
    @(negedge clk);
    // stream NBLK blocks, one per clock, and check the output LAT clocks later
    for (int t = 0; t < NBLK + LAT; t++) begin
      if (t >= LAT) begin
        int k;
        k = t - LAT;
        checks++;
        if (out_valid !== vld[k]) begin
          failures++;
          $display("FAIL block %0d out_valid=%0d expected %0d", k, out_valid, vld[k]);
        end
        if (out_valid) n_valid_out++;
        for (int l = 0; l < L; l++) begin
          logic [AW-1:0] e;
          e = AW'(expect_y(k, l));
          checks++;
          if (y_blk[l] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL block %0d y[%0d]=%0d expected %0d",
                                        k, l, $signed(y_blk[l]), $signed(e));
          end
        end
        // an output block mixes filters when the blocks it covers used different channels
        if (k >= M - 1) begin
          bit mix;
          mix = 0;
          for (int m = 1; m < M; m++) if (chh[k-m] != chh[k]) mix = 1;
          if (mix) n_mixed++;
        end
      end
      if (t < NBLK) begin
        int k;
        k = t;
        // channel: hold for a while, then switch
        if (k > 0 && (k % (2 * M + 3)) == 0) begin
          ch_sel = CW'((int'(ch_sel) + 1 + $urandom_range(NUM_CH - 2)) % NUM_CH);
          n_switch++;
        end
        chh[k] = int'(ch_sel);
        for (int n = 0; n < N; n++) used[k][n] = cf[ch_sel][n];
        // occasionally rewrite a coefficient of the running channel
        coef_we = 0;
        if (k % 37 == 20) begin
          int n;
          n = $urandom_range(N - 1);
          cf[ch_sel][n] = int'($signed(8'($urandom)));
          coef_we = 1; coef_ch = ch_sel; coef_idx = IW'(n); coef_data = 8'(cf[ch_sel][n]);
          n_live_write++;
        end
        // samples: extreme values in a few blocks, random otherwise
        for (int l = 0; l < L; l++) begin
          x_blk[l] = (k % 50 == 7) ? 8'h80 : (k % 50 == 8) ? 8'h7f : 8'($urandom);
          samp[k*L + (L-1-l)] = int'($signed(x_blk[l]));
        end
        if (k % 50 == 7) n_extreme++;
        in_valid = (k % 23) != 11;
        if (!in_valid) n_gap++;
        vld[k] = in_valid;
      end else begin
        in_valid = 0;
        coef_we = 0;
      end
      @(negedge clk);
    end
    // every mechanism must have happened at least once
    checks += 6;
    if (n_switch == 0)     begin failures++; $display("FAIL no channel switch"); end
    if (n_mixed == 0)      begin failures++; $display("FAIL no mixed output block"); end
    if (n_live_write == 0) begin failures++; $display("FAIL no coefficient rewrite"); end
    if (n_gap == 0)        begin failures++; $display("FAIL no in_valid gap"); end
    if (n_extreme == 0)    begin failures++; $display("FAIL no extreme block"); end
    if (n_valid_out == 0)  begin failures++; $display("FAIL no valid output"); end
    $display("L=%0d N=%0d: %0d blocks, %0d channel switches, %0d mixed output blocks, %0d live coefficient writes, %0d valid gaps, %0d extreme blocks, %0d valid outputs",
             L, N, NBLK, n_switch, n_mixed, n_live_write, n_gap, n_extreme, n_valid_out);
    done = 1;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
