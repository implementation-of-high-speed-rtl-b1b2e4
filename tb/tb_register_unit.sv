// tb_register_unit: self-checking testbench of the input register unit.
//
// Feeds random blocks with random gaps (in_valid low) and keeps its own list
// of every accepted sample. One clock after each accepted block it checks
// that s[i] equals x(kL-L+1+i), with zero for samples before the first
// block, and that s_valid follows in_valid by exactly one clock. It also
// checks that a gap leaves the samples unchanged.
module tb_register_unit;
  localparam int L  = fir_pkg::BLOCK_L;
  localparam int XW = fir_pkg::X_W;
  localparam int NBLK = 400;

  logic                 clk = 0, rst_n = 0, in_valid = 0;
  logic signed [XW-1:0] x_blk [L];
  logic                 s_valid;
  logic signed [XW-1:0] s [2*L-1];
  int checks = 0, failures = 0, gaps = 0;
  int hist [$];  // all accepted samples, in order

  register_unit dut (.clk, .rst_n, .in_valid, .x_blk, .s_valid, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample(int n);
    return (n < 0) ? 0 : hist[n];
  endfunction

  initial begin
    foreach (x_blk[i]) x_blk[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK;) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) begin
        in_valid = 0;
        foreach (x_blk[i]) x_blk[i] = XW'($urandom);  // must be ignored
      end else begin
        in_valid = 1;
        foreach (x_blk[i]) begin
          x_blk[i] = XW'($urandom);
          hist.push_back(int'(x_blk[i]));
        end
        b++;
      end
      @(posedge clk);
      #1;
      checks++;
      if (s_valid !== in_valid) begin
        failures++;
        $display("s_valid %0b after in_valid %0b", s_valid, in_valid);
      end
      if (!in_valid && hist.size() > 0) gaps++;
      if (hist.size() > 0) begin
        int k0;
        k0 = hist.size() - L;  // index of x(kL) of the latest accepted block
        for (int i = 0; i < 2*L-1; i++) begin
          checks++;
          if (int'(s[i]) != sample(k0 - (L-1) + i)) begin
            failures++;
            if (failures < 10) $display("s[%0d]=%0d want %0d", i, s[i], sample(k0 - (L-1) + i));
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
