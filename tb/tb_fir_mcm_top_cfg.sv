// tb_fir_mcm_top_cfg: checks the block FIR filter in several configurations
// at once, each with an asymmetric coefficient set (see fir_cfg_harness):
//   N = 16, L = 4 (the default sizes), N = 8, L = 2, N = 24, L = 8,
//   N = 5, L = 1 (one sample per clock, a plain transpose-form filter) and
//   N = 4, L = 4 (a single coefficient vector, M = 1).
// Passes when every harness has checked all of its outputs without a
// mismatch and every configuration saw idle clocks.
module tb_fir_mcm_top_cfg;
  localparam int NCFG = 5;
  logic clk = 0;
  logic done [NCFG];
  int   c [NCFG], f [NCFG], g [NCFG];

  always #5 clk = ~clk;

  fir_cfg_harness #(.N(16), .L(4), .SEED(3))  h0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .gaps(g[0]));
  fir_cfg_harness #(.N(8),  .L(2), .SEED(7))  h1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .gaps(g[1]));
  fir_cfg_harness #(.N(24), .L(8), .SEED(11)) h2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .gaps(g[2]));
  fir_cfg_harness #(.N(5),  .L(1), .SEED(19)) h3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .gaps(g[3]));
  fir_cfg_harness #(.N(4),  .L(4), .SEED(23)) h4 (.clk, .done(done[4]), .checks(c[4]), .failures(f[4]), .gaps(g[4]));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < NCFG; i++) begin
      $display("configuration %0d: checks=%0d failures=%0d gaps=%0d", i, c[i], f[i], g[i]);
      checks += c[i] + 1;
      failures += f[i];
      if (g[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
