// tb_rfir_sizes: end-to-end runs of the filter at other block sizes and
// filter lengths: L = 4, N = 32 and L = 8, N = 32 (L = 4, N = 64 is the
// default, run by tb_rfir_top). L = 8, N = 64 is left out to keep the build
// time of this testbench short. Each configuration runs in its own rfir_env,
// which checks every output block against a reference convolution; the
// results are summed.
module tb_rfir_sizes;
  bit done_a, done_b;
  int ca, fa, cb, fb;

  rfir_env #(.L(4), .N(32), .NBLK(200)) env_l4_n32 (.done(done_a), .checks(ca), .failures(fa));
  rfir_env #(.L(8), .N(32), .NBLK(200)) env_l8_n32 (.done(done_b), .checks(cb), .failures(fb));

  initial begin
    wait (done_a && done_b);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb, fa + fb);
    $finish;
  end
endmodule
