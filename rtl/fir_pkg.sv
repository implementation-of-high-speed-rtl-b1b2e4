// fir_pkg: shared sizes, the default coefficient set and the elaboration-time
// helpers of the block FIR filter.
//
// The filter is a block (parallel) FIR filter of N taps that takes L input
// samples per clock and computes L outputs per clock. Its N coefficients are
// split into M = N/L coefficient vectors c_m = {h(mL), ..., h(mL+L-1)}.
// The split into register unit, MCM units, adder network and pipeline adder
// unit follows the MCM-based architecture this RTL implements. The
// numbers here (16 taps, block size 4, 8-bit samples and coefficients, the
// low-pass coefficient set) are this design's own choice: the architecture
// does not fix them.
//
// csd_digit() gives the canonical signed digit (CSD) recoding of a constant;
// the MCM units build their shift-add networks from it at elaboration time.
package fir_pkg;

  localparam int N_TAPS  = 16;  // filter length N (taps h(0)..h(N-1))
  localparam int BLOCK_L = 4;   // block size L: samples in and out per clock
  localparam int X_W     = 8;   // input sample width, two's complement
  localparam int H_W     = 8;   // coefficient width, two's complement

  typedef logic signed [H_W-1:0] coef_t;

  // Example coefficient set: a symmetric 16-tap low-pass of windowed-sinc
  // shape, scaled so that the largest tap is 127. Any other set of N signed
  // H_W-bit constants may be given to the top module instead.
  localparam coef_t H_DEFAULT [N_TAPS] = '{
    -8'sd3, -8'sd7, -8'sd6, 8'sd9, 8'sd35, 8'sd74, 8'sd110, 8'sd127,
    8'sd127, 8'sd110, 8'sd74, 8'sd35, 8'sd9, -8'sd6, -8'sd7, -8'sd3
  };

  // CSD digit (-1, 0 or +1) of constant c at bit position b. Recoding from
  // the least significant end: an odd remainder takes digit 2 - (c mod 4),
  // which leaves no two adjacent non-zero digits.
  function automatic int csd_digit(int c, int b);
    int v, d;
    v = c;
    d = 0;
    for (int i = 0; i <= b; i++) begin
      if ((v & 1) != 0) d = 2 - (v & 3);
      else              d = 0;
      v = (v - d) >>> 1;
    end
    return d;
  endfunction

  // Term of the shift-add network of constant c at bit position b after
  // horizontal subexpression sharing: CSD digit pairs d(b+2), d(b) that are
  // both non-zero (patterns 101, 10-1 and their negatives) are merged into one
  // term of weight +-5 or +-3 at position b, because 5x = 4x + x and
  // 3x = 4x - x are formed once per MCM and shared by all of its constants.
  // Pairs are taken greedily from the least significant digit upwards. The
  // result is 0, +-1, +-3 or +-5 (the multiple of x shifted left by b).
  function automatic int hterm(int c, int b);
    int i, d0, d2;
    i = 0;
    while (i <= b) begin
      d0 = csd_digit(c, i);
      d2 = csd_digit(c, i + 2);
      if (d0 != 0 && d2 != 0) begin
        if (i == b) return 4 * d2 + d0;
        if (i + 2 == b) return 0;  // digit consumed by the pair below it
        i = i + 3;                 // digit i+1 is zero in CSD
      end else begin
        if (i == b) return d0;
        i = i + 1;
      end
    end
    return 0;
  endfunction

  // Number of trailing zero bits of a non-zero constant (0 for zero).
  function automatic int trailing_zeros(int c);
    int v, n;
    v = c;
    n = 0;
    if (v == 0) return 0;
    while ((v & 1) == 0) begin
      v = v >>> 1;
      n++;
    end
    return n;
  endfunction

  // Odd fundamental of a constant: |c| with its trailing zeros removed.
  // Constants that share a fundamental differ only by a shift and a sign.
  function automatic int fundamental(int c);
    int a;
    a = (c < 0) ? -c : c;
    return a >>> trailing_zeros(a);
  endfunction

endpackage
