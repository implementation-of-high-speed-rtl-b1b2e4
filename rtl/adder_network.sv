// adder_network: adds the MCM product terms into the inner products of the
// block FIR filter.
//
// Input p[i][n] is the product of the distinct input sample s[i] =
// x(kL-L+1+i) with coefficient h(n) (only the products the network reads need
// to be valid). Output r[m][l] is element l of the inner-product vector
//   r^m_k = S_k^0 . c_m,   r[m][l] = sum_{j=0}^{L-1} S_k^0[l][j] * h(mL+j)
//                                  = sum_{j=0}^{L-1} p[l-j+L-1][mL+j],
// for 0 <= m < M = N/L and 0 <= l < L. These are the values the architecture
// names r_{l,m}; each is a sum of L products, so r is clog2(L) bits wider
// than a product.
//
// Timing: purely combinational.
module adder_network #(
  parameter int N  = fir_pkg::N_TAPS,
  parameter int L  = fir_pkg::BLOCK_L,
  parameter int PW = fir_pkg::X_W + fir_pkg::H_W,
  localparam int M  = N / L,
  localparam int RW = PW + $clog2(L)
) (
  input  logic signed [PW-1:0] p [2*L-1][N],
  output logic signed [RW-1:0] r [M][L]
);

  initial assert (N % L == 0) else $error("N must be a multiple of L");

  always_comb begin
    for (int m = 0; m < M; m++) begin
      for (int l = 0; l < L; l++) begin
        r[m][l] = '0;
        for (int j = 0; j < L; j++) r[m][l] = r[m][l] + RW'(p[l-j+L-1][m*L+j]);
      end
    end
  end

endmodule
