// clb_fa: one full adder of a filter tap, the logic held by one CLB.
//
// Adds three bits: the partial-sum bit a, the carry b coming from the bit
// below, and the operand bit of a power-of-two term. The operand is chosen by
// two parameters, so the sign of the coefficient and the constant bits of a
// shifted operand cost no routing:
//   USE_DATA=1, INV=0 : operand = d          (positive term, data bit)
//   USE_DATA=1, INV=1 : operand = ~d         (negative term, inverted data bit)
//   USE_DATA=0, INV=0 : operand = 0 ("Low")  (bit vacated by a left shift)
//   USE_DATA=0, INV=1 : operand = 1 ("High") (vacated bit of a negated term)
// Absorbing the sign and the Low/High constants into the adder follows the
// document; the parameter encoding is this design's own. Purely
// combinational: the registers of a tap live in fir_tap.
module clb_fa #(
  parameter bit USE_DATA = 1'b1,
  parameter bit INV      = 1'b0
) (
  input  logic a,     // partial-sum bit
  input  logic b,     // carry from the next lower bit
  input  logic d,     // shifted data bit (ignored when USE_DATA = 0)
  output logic sum,
  output logic cout
);
  logic op;

  always_comb begin
    op   = USE_DATA ? (d ^ INV) : INV;
    sum  = a ^ b ^ op;
    cout = (a & b) | (a & op) | (b & op);
  end
endmodule
