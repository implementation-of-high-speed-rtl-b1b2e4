// tb_adder_network: self-checking testbench of the adder network.
//
// Drives random product terms p[i][n] (full range, including the extremes)
// and compares every inner product r[m][l] with the sum over j of
// S[l][j] * h(mL+j) worked out by the testbench, where the product for matrix
// entry S[l][j] is the term of distinct sample i = l-j+L-1.
module tb_adder_network;
  localparam int N  = fir_pkg::N_TAPS;
  localparam int L  = fir_pkg::BLOCK_L;
  localparam int PW = fir_pkg::X_W + fir_pkg::H_W;
  localparam int M  = N / L;
  localparam int RW = PW + $clog2(L);

  logic signed [PW-1:0] p [2*L-1][N];
  logic signed [RW-1:0] r [M][L];
  int checks = 0, failures = 0;

  adder_network dut (.p, .r);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int i = 0; i < 2*L-1; i++)
        for (int n = 0; n < N; n++)
          case (it % 3)
            0: p[i][n] = PW'($urandom);
            1: p[i][n] = {1'b1, {(PW-1){1'b0}}};  // most negative
            default: p[i][n] = ($urandom_range(1) == 0) ? {1'b0, {(PW-1){1'b1}}} : PW'($urandom);
          endcase
      #1;
      for (int m = 0; m < M; m++)
        for (int l = 0; l < L; l++) begin
          longint e;
          e = 0;
          for (int j = 0; j < L; j++) e += longint'(p[l-j+L-1][m*L+j]);
          checks++;
          if (longint'(r[m][l]) != e) begin
            failures++;
            if (failures < 10) $display("r[%0d][%0d]=%0d want %0d", m, l, r[m][l], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
