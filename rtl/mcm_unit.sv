// mcm_unit: multiple constant multiplier. Multiplies one signed sample x by
// NT fixed constants T[0..NT-1] at once, using only shifts, additions and
// subtractions: p[t] = x * T[t].
//
// How it works: common subexpressions are removed in two directions.
//  - Across constants ("vertical"): every constant is written as
//    sign * F * 2^s, where F is its odd fundamental. Constants that share a
//    fundamental (for example 9, -18 and 36) share one shift-add network;
//    the others differ only by wiring (the shift) and a negation.
//  - Within a constant ("horizontal"): each fundamental is built from its
//    canonical signed digit (CSD) recoding, and digit pairs two places apart
//    (patterns 101 and 10-1) become one shifted copy of 5x or 3x. These two
//    subexpressions are formed once (5x = 4x + x, 3x = 4x - x) and shared by
//    every constant of the unit. Remaining single digits add or subtract a
//    shifted copy of x.
// A fundamental of 1 costs no adder, a zero constant gives zero. All of this
// is decided at elaboration time from the parameter T (see fir_pkg::hterm).
//
// Building products by shift-add with horizontal and vertical subexpression
// sharing is what the architecture asks of its MCM blocks; the CSD recoding,
// the fixed pattern set {3, 5} with greedy pairing, and sharing by common odd
// fundamental are this design's own choices, not an optimal CSE search.
//
// The 3x and 5x terms are always formed; in a unit whose constants use only
// one of them, the other is left unread and removed by synthesis.
//
// Interface: x is XW bits, each p[t] is XW+HW bits, both two's complement.
// Timing: purely combinational.
module mcm_unit #(
  parameter int XW = fir_pkg::X_W,
  parameter int HW = fir_pkg::H_W,
  parameter int NT = fir_pkg::N_TAPS,
  parameter logic signed [HW-1:0] T [NT] = fir_pkg::H_DEFAULT
) (
  input  logic signed [XW-1:0]    x,
  output logic signed [XW+HW-1:0] p [NT]
);

  localparam int PW = XW + HW;
  localparam int IW = XW + HW + 2;  // headroom for CSD partial sums
  localparam int ND = HW + 1;       // CSD digit positions of an HW-bit constant

  // Index of the first constant whose odd fundamental equals that of T[t];
  // that constant owns the shared shift-add network.
  function automatic int owner(int t);
    for (int i = 0; i < t; i++)
      if (T[i] != 0 && fir_pkg::fundamental(int'(T[i])) == fir_pkg::fundamental(int'(T[t])))
        return i;
    return t;
  endfunction

  logic signed [IW-1:0] xe, x3, x5;
  logic signed [IW-1:0] fund [NT];  // x * fundamental, for owning constants

  assign xe = IW'(x);
  assign x3 = (xe <<< 2) - xe;      // shared subexpression 3x
  assign x5 = (xe <<< 2) + xe;      // shared subexpression 5x

  for (genvar t = 0; t < NT; t++) begin : g_const
    localparam int C  = int'(T[t]);
    localparam int F  = fir_pkg::fundamental(C);
    localparam int S  = fir_pkg::trailing_zeros(C);
    localparam int OW = owner(t);

    // Shift-add network for the fundamental, only where this constant owns it.
    if (C != 0 && OW == t) begin : g_net
      logic signed [IW-1:0] term [ND];
      for (genvar b = 0; b < ND; b++) begin : g_digit
        localparam int D = fir_pkg::hterm(F, b);
        if (D == 1)       begin : g_p1 assign term[b] =   xe <<< b;  end
        else if (D == -1) begin : g_m1 assign term[b] = -(xe <<< b); end
        else if (D == 3)  begin : g_p3 assign term[b] =   x3 <<< b;  end
        else if (D == -3) begin : g_m3 assign term[b] = -(x3 <<< b); end
        else if (D == 5)  begin : g_p5 assign term[b] =   x5 <<< b;  end
        else if (D == -5) begin : g_m5 assign term[b] = -(x5 <<< b); end
        else              begin : g_nil assign term[b] = '0;         end
      end
      logic signed [IW-1:0] sum;
      always_comb begin
        sum = '0;
        for (int b = 0; b < ND; b++) sum = sum + term[b];
      end
      assign fund[t] = sum;
    end else begin : g_shared
      assign fund[t] = '0;
    end

    // Product: the owner's fundamental, shifted and signed.
    if (C == 0) begin : g_zero
      assign p[t] = '0;
    end else begin : g_prod
      logic signed [IW-1:0] shifted;
      assign shifted = fund[OW] <<< S;
      assign p[t] = (C < 0) ? PW'(-shifted) : PW'(shifted);
    end
  end

endmodule
