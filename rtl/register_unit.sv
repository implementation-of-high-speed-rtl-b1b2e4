// register_unit: input register unit (RU) of the block FIR filter.
//
// Each clock with in_valid high it accepts one block of L new samples,
// x_blk[i] = x(kL+i), and from the next clock on presents the 2L-1 distinct
// samples of the block input matrix S_k^0:
//   s[i] = x(kL-L+1+i),   i = 0 .. 2L-2,
// that is the L-1 newest samples of the previous block followed by the L
// samples of block k. S_k^0 is a Toeplitz matrix, S_k^0[l][j] = x(kL+l-j) =
// s[l-j+L-1], so these 2L-1 samples are all of it; the MCM stage needs one
// multiplier bank per distinct sample rather than one per matrix entry.
//
// That the RU turns one block per clock into S_k^0 follows the architecture;
// the valid handshake, registering the block and the synchronous active-low
// reset that clears the sample history to zero are this design's choices.
//
// Timing: s and s_valid are registered, one clock after x_blk and in_valid.
// When in_valid is low the unit holds its contents and s_valid is low.
module register_unit #(
  parameter int L  = fir_pkg::BLOCK_L,
  parameter int XW = fir_pkg::X_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x_blk [L],
  output logic                 s_valid,
  output logic signed [XW-1:0] s [2*L-1]
);

  logic signed [XW-1:0] cur  [L];  // block k
  logic signed [XW-1:0] prev [L];  // block k-1 (prev[0] is never read out)

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      for (int i = 0; i < L; i++) begin
        cur[i]  <= '0;
        prev[i] <= '0;
      end
    end else begin
      s_valid <= in_valid;
      if (in_valid) begin
        cur  <= x_blk;
        prev <= cur;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < L - 1; i++) s[i] = prev[i+1];
    for (int i = 0; i < L; i++)     s[L-1+i] = cur[i];
  end

endmodule
