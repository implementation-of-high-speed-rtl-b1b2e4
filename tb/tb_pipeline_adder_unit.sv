// tb_pipeline_adder_unit: self-checking testbench of the pipeline adder unit.
//
// Feeds random inner-product vectors r^m_k with random gaps and keeps every
// accepted set. One clock after block k is accepted it checks
// y[l] = sum_m r^m_{k-m}[l] (terms before the first block count as zero)
// and that y_valid follows r_valid by exactly one clock.
module tb_pipeline_adder_unit;
  localparam int L  = fir_pkg::BLOCK_L;
  localparam int M  = fir_pkg::N_TAPS / fir_pkg::BLOCK_L;
  localparam int RW = fir_pkg::X_W + fir_pkg::H_W + $clog2(L);
  localparam int YW = RW + $clog2(M);
  localparam int NBLK = 500;

  logic                 clk = 0, rst_n = 0, r_valid = 0;
  logic signed [RW-1:0] r [M][L];
  logic                 y_valid;
  logic signed [YW-1:0] y [L];
  int checks = 0, failures = 0, gaps = 0;
  longint hist [$][M][L];

  pipeline_adder_unit dut (.clk, .rst_n, .r_valid, .r, .y_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) r[m][l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK;) begin
      @(negedge clk);
      r_valid = ($urandom_range(3) != 0);
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++)
          r[m][l] = (b % 50 == 7) ? {1'b1, {(RW-1){1'b0}}} : RW'($urandom);
      if (r_valid) begin
        longint v [M][L];
        for (int m = 0; m < M; m++) for (int l = 0; l < L; l++) v[m][l] = longint'(r[m][l]);
        hist.push_back(v);
        b++;
      end else if (hist.size() > 0) gaps++;
      @(posedge clk);
      #1;
      checks++;
      if (y_valid !== r_valid) begin
        failures++;
        $display("y_valid %0b after r_valid %0b", y_valid, r_valid);
      end
      if (r_valid) begin
        int k;
        k = hist.size() - 1;
        for (int l = 0; l < L; l++) begin
          longint e;
          e = 0;
          for (int m = 0; m < M; m++) if (k - m >= 0) e += hist[k-m][m][l];
          checks++;
          if (longint'(y[l]) != e) begin
            failures++;
            if (failures < 10) $display("block %0d y[%0d]=%0d want %0d", k, l, y[l], e);
          end
        end
      end
    end
    checks++;
    if (gaps == 0) begin
      failures++;
      $display("no gap was exercised");
    end
    $display("gaps exercised: %0d", gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
