// tb_fir_mcm_top: end-to-end self-checking testbench of the block FIR filter,
// run with every parameter of the top at its default.
//
// The testbench builds a sample stream, feeds it L samples per clock with
// random idle clocks in between, and compares every output sample with the
// direct-form convolution y(n) = sum_i h(i) x(n-i) that it computes itself
// from the coefficient set. It checks that each output block leaves exactly
// two clocks after its input block. The stream holds, in turn: single
// impulses landing in every lane of a block (the output must be the
// coefficient set itself), a most-negative impulse, random samples, the
// worst-case pattern that drives an output to its largest magnitude, and a
// long run of the most negative sample. Then the filter is reset and a second
// random stream checks that the reset cleared the sample history.
//
// It counts how often each behaviour happened and fails if one never did:
// idle clocks (gaps), samples reaching across a block boundary into the next
// output block, the full-scale output, impulse responses, and the reset.
module tb_fir_mcm_top;
  localparam int N  = fir_pkg::N_TAPS;
  localparam int L  = fir_pkg::BLOCK_L;
  localparam int XW = fir_pkg::X_W;
  localparam int HW = fir_pkg::H_W;
  localparam int YW = XW + HW + $clog2(N);

  logic                 clk = 0, rst_n = 0, in_valid = 0;
  logic signed [XW-1:0] x_in [L];
  logic                 out_valid;
  logic signed [YW-1:0] y_out [L];

  fir_mcm_top dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_gaps = 0, n_cross = 0, n_full = 0, n_impulse = 0, n_reset = 0, n_blocks = 0;
  int     stream [$];   // samples still to send
  int     hist [$];     // samples accepted since the last reset
  longint exp_q [$];    // expected output samples, oldest first
  longint full_scale;   // largest possible |y|
  logic   prev_valid;   // in_valid of the previous clock

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y(int n);
    longint acc;
    acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += longint'(fir_pkg::H_DEFAULT[i]) * hist[n-i];
    return acc;
  endfunction

  // Output sample n uses samples of an earlier block with a non-zero value.
  function automatic bit crosses(int n);
    for (int i = (n % L) + 1; i < N; i++)
      if (n - i >= 0 && hist[n-i] != 0 && fir_pkg::H_DEFAULT[i] != 0) return 1;
    return 0;
  endfunction

  // One clock: offer a block (or idle), then check the output two clocks on.
  task automatic step(bit offer);
    @(negedge clk);
    in_valid = offer && stream.size() >= L;
    for (int i = 0; i < L; i++)
      x_in[i] = in_valid ? XW'(stream[i]) : XW'($urandom);
    if (in_valid) begin
      for (int i = 0; i < L; i++) begin
        hist.push_back(stream.pop_front());
        exp_q.push_back(ref_y(hist.size() - 1));
        if (crosses(hist.size() - 1)) n_cross++;
      end
      n_blocks++;
    end else if (offer == 0 && hist.size() > 0) n_gaps++;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid !== prev_valid) begin
      failures++;
      $display("out_valid=%0b but input valid two clocks earlier was %0b", out_valid, prev_valid);
    end
    if (out_valid && exp_q.size() >= L) begin
      for (int l = 0; l < L; l++) begin
        longint e;
        e = exp_q.pop_front();
        checks++;
        if ((e < 0 ? -e : e) == full_scale) n_full++;
        if (longint'(y_out[l]) != e) begin
          failures++;
          if (failures < 10) $display("y=%0d want %0d", y_out[l], e);
        end
      end
    end
    prev_valid = in_valid;
  endtask

  task automatic run_stream();
    while (stream.size() >= L) step($urandom_range(4) != 0);
    repeat (3) step(0);
  endtask

  initial begin
    longint pos, neg;
    pos = 0; neg = 0;
    for (int i = 0; i < N; i++) begin
      if (fir_pkg::H_DEFAULT[i] > 0) pos += fir_pkg::H_DEFAULT[i];
      else neg -= fir_pkg::H_DEFAULT[i];
    end
    full_scale = (pos > neg) ? 128 * pos + 127 * neg : 128 * neg + 127 * pos;
    prev_valid = 0;
    foreach (x_in[i]) x_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Impulses at offsets 0..L-1 within a block; check the response exactly.
    for (int q = 0; q < L; q++) begin
      for (int z = 0; z < q; z++) stream.push_back(0);
      stream.push_back(1);
      for (int z = 0; z < 2*N + L - 1 - q; z++) stream.push_back(0);
    end
    stream.push_back(-128);
    for (int z = 0; z < 2*N - 1; z++) stream.push_back(0);
    begin
      int base;
      base = hist.size();
      run_stream();
      // Impulse response: each impulse at index t gives y(t+i) = h(i).
      for (int t = base; t < hist.size(); t++) if (hist[t] == 1 || hist[t] == -128) begin
        bit ok;
        ok = 1;
        for (int i = 0; i < N; i++)
          if (ref_y(t + i) != longint'(hist[t]) * fir_pkg::H_DEFAULT[i]) ok = 0;
        checks++;
        if (!ok) failures++; else n_impulse++;
      end
    end

    // Random samples, the full-scale pattern, a long most-negative run.
    for (int z = 0; z < 2000; z++) stream.push_back(int'($signed(XW'($urandom))));
    for (int rep = 0; rep < 4; rep++) begin
      for (int q = 0; q < N; q++) begin
        int h;
        h = fir_pkg::H_DEFAULT[N-1-q];
        if (pos > neg) stream.push_back(h > 0 ? -128 : (h < 0 ? 127 : 0));
        else           stream.push_back(h < 0 ? -128 : (h > 0 ? 127 : 0));
      end
      for (int z = 0; z < rep + 1; z++) stream.push_back(0);
    end
    for (int z = 0; z < 40; z++) stream.push_back(-128);
    while (stream.size() % L != 0) stream.push_back(0);
    run_stream();

    // Reset with history in the filter, then a fresh random stream.
    rst_n = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (out_valid) begin
      failures++;
      $display("out_valid high during reset");
    end
    rst_n = 1;
    n_reset++;
    hist.delete();
    exp_q.delete();
    prev_valid = 0;
    for (int z = 0; z < 400; z++) stream.push_back(int'($signed(XW'($urandom))));
    run_stream();

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d expected outputs never appeared", exp_q.size());
    end
    $display("blocks=%0d gaps=%0d cross_block=%0d full_scale=%0d impulses=%0d resets=%0d",
             n_blocks, n_gaps, n_cross, n_full, n_impulse, n_reset);
    if (n_gaps == 0)    begin failures++; $display("no idle clock exercised"); end
    if (n_cross == 0)   begin failures++; $display("no cross-block output exercised"); end
    if (n_full == 0)    begin failures++; $display("full-scale output never reached"); end
    if (n_impulse < L + 1) begin failures++; $display("impulse tests missing"); end
    if (n_reset == 0)   begin failures++; $display("reset not exercised"); end
    checks += 5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
