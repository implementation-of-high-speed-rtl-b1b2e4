// fir_cfg_harness: drives and checks one fir_mcm_top built with a given
// filter length N, block size L and an asymmetric coefficient set derived
// from SEED. Used by tb_fir_mcm_top_cfg to run several configurations side
// by side.
//
// The coefficient set is h(0) = -128 (the most negative constant) and
// h(i) = ((i * 37 + SEED) * 73 mod 256) - 128 for i > 0, so it has no
// symmetry that could hide a mix-up of coefficient order. The harness sends
// NS random samples (with extremes) in blocks of L, idles on random clocks,
// compares each output with a direct-form convolution and checks the
// two-clock latency. It raises done when all outputs have been checked.
module fir_cfg_harness #(
  parameter int N    = 16,
  parameter int L    = 4,
  parameter int SEED = 1,
  parameter int NS   = 1200
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   gaps
);
  localparam int XW = 8;
  localparam int HW = 8;
  localparam int YW = XW + HW + $clog2(N);
  typedef logic signed [HW-1:0] coef_arr_t [N];

  function automatic coef_arr_t make_coefs();
    coef_arr_t c;
    for (int i = 0; i < N; i++)
      c[i] = (i == 0) ? -8'sd128 : HW'((((i * 37 + SEED) * 73) % 256) - 128);
    return c;
  endfunction
  localparam coef_arr_t HC = make_coefs();

  logic                 rst_n = 0, in_valid = 0;
  logic signed [XW-1:0] x_in [L];
  logic                 out_valid;
  logic signed [YW-1:0] y_out [L];

  fir_mcm_top #(.N(N), .L(L), .XW(XW), .HW(HW), .H(HC)) dut (
    .clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out
  );

  int     hist [$];
  longint exp_q [$];
  logic   prev_valid = 0;

  function automatic longint ref_y(int n);
    longint acc;
    acc = 0;
    for (int i = 0; i < N; i++)
      if (n - i >= 0) acc += longint'(HC[i]) * hist[n-i];
    return acc;
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0; gaps = 0;
    foreach (x_in[i]) x_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int sent = 0; sent < NS + 3 * L;) begin
      @(negedge clk);
      in_valid = (sent < NS) && ($urandom_range(3) != 0);
      if (sent >= NS) sent += L;  // drain clocks
      else if (!in_valid) gaps++;
      for (int i = 0; i < L; i++) begin
        int v;
        case ($urandom_range(7))
          0:       v = -128;
          1:       v = 127;
          default: v = int'($signed(XW'($urandom)));
        endcase
        x_in[i] = XW'(v);
        if (in_valid) begin
          hist.push_back(v);
          exp_q.push_back(ref_y(hist.size() - 1));
        end
      end
      if (in_valid) sent += L;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== prev_valid) failures++;
      if (out_valid) begin
        for (int l = 0; l < L; l++) begin
          longint e;
          e = (exp_q.size() > 0) ? exp_q.pop_front() : 0;
          checks++;
          if (longint'(y_out[l]) != e) begin
            failures++;
            if (failures < 5) $display("N=%0d L=%0d: y=%0d want %0d", N, L, y_out[l], e);
          end
        end
      end
      prev_valid = in_valid;
    end
    checks++;
    if (exp_q.size() != 0) failures++;
    done = 1;
  end
endmodule
