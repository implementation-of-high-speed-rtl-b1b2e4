// pipeline_adder_unit: pipeline adder unit (PAU) of the block FIR filter.
//
// Adds the M inner-product vectors of successive blocks into the output block
//   Y_k = sum_{m=0}^{M-1} r^m_{k-m},
// in transpose form, as in Y(z) = [z^-1(...(z^-1 r^{M-1} + r^{M-2})...) + r^0]:
// a chain of M-1 register stages per output lane l, where stage m holds
// r^m + (stage m+1 of the previous block) and the last stage holds r^{M-1}.
// The filter's delay line thus sits after the multipliers, which is what lets
// one MCM serve all taps of a sample.
//
// The transpose-form recurrence follows the architecture. Registering the
// final sum (so Y_k leaves one clock after r_k arrives), the valid handshake
// and the synchronous active-low reset to zero are this design's choices.
// The chain advances only on clocks with r_valid high, so gaps in the input
// stream do not disturb the result. YW should be at least RW + clog2(M) for
// results without overflow; wider sums wrap in two's complement.
module pipeline_adder_unit #(
  parameter int M  = fir_pkg::N_TAPS / fir_pkg::BLOCK_L,
  parameter int L  = fir_pkg::BLOCK_L,
  parameter int RW = fir_pkg::X_W + fir_pkg::H_W + $clog2(fir_pkg::BLOCK_L),
  parameter int YW = RW + $clog2(M)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 r_valid,
  input  logic signed [RW-1:0] r [M][L],
  output logic                 y_valid,
  output logic signed [YW-1:0] y [L]
);

  // Stage z[m-1] (m = 1 .. M-1) of lane l holds the partial sum
  // r^m_{k} + r^{m+1}_{k-1} + ... + r^{M-1}_{k-M+1+m}.
  // M = 1 leaves no stage: the unit is then a registered pass of r^0.
  localparam int NZ = (M > 1) ? M - 1 : 1;
  logic signed [YW-1:0] z [NZ][L];

  for (genvar l = 0; l < L; l++) begin : g_lane
    for (genvar m = 1; m < M; m++) begin : g_stage
      logic signed [YW-1:0] nxt, acc;
      if (m + 1 < M) begin : g_mid  assign nxt = z[m][l]; end
      else           begin : g_last assign nxt = '0;      end
      always_ff @(posedge clk) begin
        if (!rst_n)       acc <= '0;
        else if (r_valid) acc <= YW'(r[m][l]) + nxt;
      end
      assign z[m-1][l] = acc;
    end
    if (M == 1) begin : g_nostage
      assign z[0][l] = '0;
    end

    always_ff @(posedge clk) begin
      if (!rst_n)       y[l] <= '0;
      else if (r_valid) y[l] <= YW'(r[0][l]) + z[0][l];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= r_valid;
  end

endmodule
