// fir_mcm_top: MCM-based block FIR filter with fixed coefficients.
//
// An N-tap FIR filter, y(n) = sum_{i=0}^{N-1} h(i) x(n-i), that takes a
// block of L samples per clock and returns a block of L outputs per clock.
// The computation is split, per block k, into M = N/L inner products of the
// block input matrix S_k^0 with the coefficient vectors c_m = {h(mL), ...,
// h(mL+L-1)}, and the block outputs are Y_k = sum_m S_{k-m}^0 . c_m, summed in
// transpose form.
//
// Because the coefficients are fixed, no coefficient store or general
// multipliers are needed: every distinct sample of S_k^0 feeds one multiple
// constant multiplier (MCM) that forms, by shifts and adds, its products with
// exactly the coefficients it meets in the matrix product. The datapath is
//   register_unit  -> 2L-1 mcm_units -> adder_network -> pipeline_adder_unit
// (S_k^0 samples)    (products)        (r^m_k, m<M)     (Y_k).
// Sample s[i] = x(kL-L+1+i) meets coefficient h(mL+j) in output lane
// l = j + i - (L-1), so its MCM gets the constants h(mL+j) for which that lane
// exists and zero (no hardware) for the rest.
//
// The structure follows the MCM-based block FIR architecture; the sizes
// (N = 16, L = 4, 8-bit samples and coefficients), the example coefficient
// set and the valid handshake are this design's choices. Outputs are full
// precision (XW + HW + clog2(N) bits), so nothing rounds or overflows.
//
// Interface: x_in[i] = x(kL+i) with in_valid; y_out[l] = y(kL+l) with
// out_valid. Timing: Y_k leaves two clocks after block k enters (one clock in
// the register unit, one in the pipeline adder unit); one block per clock, and
// clocks with in_valid low simply leave a gap in the output. Synchronous
// active-low reset clears the sample history and partial sums to zero.
// A concurrent assertion (a_latency) checks the two-clock valid timing.
module fir_mcm_top #(
  parameter int N  = fir_pkg::N_TAPS,
  parameter int L  = fir_pkg::BLOCK_L,
  parameter int XW = fir_pkg::X_W,
  parameter int HW = fir_pkg::H_W,
  parameter logic signed [HW-1:0] H [N] = fir_pkg::H_DEFAULT,
  localparam int M  = N / L,
  localparam int PW = XW + HW,
  localparam int RW = PW + $clog2(L),
  localparam int YW = PW + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x_in [L],
  output logic                 out_valid,
  output logic signed [YW-1:0] y_out [L]
);

  typedef logic signed [HW-1:0] coef_arr_t [N];

  // Constants needed by the MCM of distinct sample i: h(n) where lane
  // l = (n mod L) + i - (L-1) lies in 0 .. L-1, zero elsewhere.
  function automatic coef_arr_t mcm_consts(int i);
    coef_arr_t c;
    for (int n = 0; n < N; n++) begin
      int l;
      l = (n % L) + i - (L - 1);
      c[n] = (l >= 0 && l < L) ? H[n] : '0;
    end
    return c;
  endfunction

  logic                 s_valid;
  logic signed [XW-1:0] s [2*L-1];
  logic signed [PW-1:0] p [2*L-1][N];
  logic signed [RW-1:0] r [M][L];

  register_unit #(.L(L), .XW(XW)) u_ru (
    .clk, .rst_n, .in_valid, .x_blk(x_in), .s_valid, .s
  );

  for (genvar i = 0; i < 2*L-1; i++) begin : g_mcm
    mcm_unit #(.XW(XW), .HW(HW), .NT(N), .T(mcm_consts(i))) u_mcm (
      .x(s[i]), .p(p[i])
    );
  end

  adder_network #(.N(N), .L(L), .PW(PW)) u_an (.p, .r);

  pipeline_adder_unit #(.M(M), .L(L), .RW(RW), .YW(YW)) u_pau (
    .clk, .rst_n, .r_valid(s_valid), .r, .y_valid(out_valid), .y(y_out)
  );

  // Output timing rule: a block leaves exactly two clocks after it entered,
  // unless a reset fell in between.
  initial assert (N % L == 0) else $error("N must be a multiple of L");
  a_latency: assert property (@(posedge clk)
    out_valid == ($past(in_valid, 2) && $past(rst_n, 2) && $past(rst_n, 1)))
    else $error("out_valid does not follow in_valid by two clocks");

endmodule
