// tb_mcm_unit: self-checking testbench of the multiple constant multiplier.
//
// Two instances: one with the default filter coefficients, one with a set
// chosen to exercise the corner cases of the shift-add construction (zero,
// the most negative constant, powers of two, constants that share an odd
// fundamental with either sign, constants with long CSD runs). Every 8-bit
// input value is applied and each product is compared with x * T[t] worked
// out by the testbench with an ordinary multiplication.
module tb_mcm_unit;
  localparam int XW = 8;
  localparam int HW = 8;
  localparam int NT = 16;
  localparam logic signed [HW-1:0] T_ALT [NT] = '{
    8'sd0, -8'sd128, 8'sd1, 8'sd2, -8'sd3, 8'sd6, 8'sd12, 8'sd96,
    8'sd127, -8'sd127, 8'sd85, -8'sd85, 8'sd64, 8'sd5, 8'sd10, -8'sd20
  };

  logic signed [XW-1:0]    x;
  logic signed [XW+HW-1:0] p_def [NT];
  logic signed [XW+HW-1:0] p_alt [NT];
  int checks = 0, failures = 0;

  mcm_unit dut_def (.x, .p(p_def));
  mcm_unit #(.XW(XW), .HW(HW), .NT(NT), .T(T_ALT)) dut_alt (.x, .p(p_alt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = XW'(v);
      #1;
      for (int t = 0; t < NT; t++) begin
        int e_def, e_alt;
        e_def = v * int'(fir_pkg::H_DEFAULT[t]);
        e_alt = v * int'(T_ALT[t]);
        checks += 2;
        if (int'(p_def[t]) != e_def) begin
          failures++;
          if (failures < 10) $display("default x=%0d t=%0d got %0d want %0d", v, t, p_def[t], e_def);
        end
        if (int'(p_alt[t]) != e_alt) begin
          failures++;
          if (failures < 10) $display("alt x=%0d t=%0d got %0d want %0d", v, t, p_alt[t], e_alt);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
