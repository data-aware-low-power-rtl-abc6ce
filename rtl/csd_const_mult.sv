// csd_const_mult: multiplier by a fixed coefficient in canonical signed digits.
//
// The coefficient COEF is recoded at elaboration time into canonical signed
// digit (CSD) form: digits in {-1, 0, +1}, no two adjacent digits non-zero.
// The product is then the sum of x shifted by the position of every +1 digit
// minus x shifted by the position of every -1 digit, so the hardware is only
// shifts and adders/subtractors, at most about CW/2 of them. The result is
// exact (full precision, OW bits); rounding is left to the caller.
// Combinational. |COEF| must be below 2^CW.
module csd_const_mult #(
  parameter int unsigned W    = 22,
  parameter int          COEF = 11585,  // cos(pi/4) with 14 fractional bits
  parameter int unsigned CW   = 15,     // digits considered (|COEF| < 2^CW)
  parameter int unsigned OW   = W + CW + 1
) (
  input  logic signed [W-1:0]  x,
  output logic signed [OW-1:0] y
);
  // CSD digits of COEF: bit i of POS (NEG) set means digit i is +1 (-1).
  function automatic logic [CW:0] csd_digits(int c, bit want_neg);
    logic [CW:0] dp, dn;
    longint v;
    bit neg_c;
    dp = '0;
    dn = '0;
    neg_c = (c < 0);
    v = neg_c ? -longint'(c) : longint'(c);
    for (int i = 0; i <= CW; i++) begin
      if (v % 2 != 0) begin
        if (v % 4 == 1) begin dp[i] = 1'b1; v = v - 1; end
        else            begin dn[i] = 1'b1; v = v + 1; end
      end
      v = v / 2;
    end
    if (neg_c) return want_neg ? dp : dn;
    return want_neg ? dn : dp;
  endfunction

  localparam logic [CW:0] DPOS = csd_digits(COEF, 1'b0);
  localparam logic [CW:0] DNEG = csd_digits(COEF, 1'b1);

  logic signed [OW-1:0] xe;
  logic signed [OW-1:0] part [CW+2];  // running sum over the digits

  assign xe      = OW'(x);  // sign extension
  assign part[0] = '0;

  for (genvar i = 0; i <= CW; i++) begin : g_digit
    if (DPOS[i]) begin : g_add
      assign part[i+1] = part[i] + (xe <<< i);
    end else if (DNEG[i]) begin : g_sub
      assign part[i+1] = part[i] - (xe <<< i);
    end else begin : g_skip
      assign part[i+1] = part[i];
    end
  end

  assign y = part[CW+1];

  // the recoding must reproduce the coefficient and be canonical
  initial begin
    assert (longint'(DPOS) - longint'(DNEG) == longint'(COEF))
      else $error("csd_const_mult: CSD recoding of %0d is wrong", COEF);
    assert (((DPOS | DNEG) & ((DPOS | DNEG) >> 1)) == '0)
      else $error("csd_const_mult: adjacent non-zero digits for %0d", COEF);
  end
endmodule
