// fir_tap: one tap of the transposed-form, carry-save FIR filter.
//
// The tap computes  {s_out,c_out} <= {s_in,c_in} + COEF * x  where COEF is the
// sum or difference of two powers of two. Each term is the input x, sign
// extended to ACC_W bits, shifted left by its power. Two rows of full adders
// (clb_fa) add the two terms to the incoming carry-save pair without carry
// propagation: row 1 adds term 1 to (s_in, c_in), row 2 adds term 2 to the
// sum and carry of row 1. The outputs of row 2 are registered, so the tap
// has one cycle of latency and its delay is two full adders whatever ACC_W is.
//
// Carry-save encoding: the word represented is (s + (c << 1)) mod 2^ACC_W,
// i.e. carry bit i weighs 2^(i+1); carry bit ACC_W-1 leaves the word and is
// dropped, which gives the wrap-around overflow behaviour.
// A negative term is formed as ~(x << k) + 1: the inversion and the 1s in the
// vacated low bits are handled inside clb_fa and the +1 enters as the carry
// input of bit 0 of that term's row, which otherwise has no carry to take.
//
// The two full-adder rows and the register per bit follow the document
// (its tap figure); the placement of the +1 on the free bit-0 carry inputs,
// the asynchronous active-low reset and the zero reset value are this
// design's choices.
module fir_tap
  import fir_pkg::*;
#(
  parameter int X_W    = 10,   // input sample width
  parameter int COEF_W = 10,   // coefficient width (two's complement)
  parameter int ACC_W  = 20,   // partial-sum width
  parameter int COEF   = 65    // coefficient, two signed powers of two at most
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [X_W-1:0]   x,      // sample, shared by all taps
  input  logic        [ACC_W-1:0] s_in,   // incoming partial sum, sum vector
  input  logic        [ACC_W-1:0] c_in,   // incoming partial sum, carry vector
  output logic        [ACC_W-1:0] s_out,  // registered partial sum
  output logic        [ACC_W-1:0] c_out
);
  localparam pot_coef_t PC = pot_decompose(longint'(COEF));

  if (!PC.valid) begin : g_chk_pot
    $error("fir_tap: coefficient %0d is not a sum of two signed powers of two", COEF);
  end
  if (COEF >= (1 <<< (COEF_W - 1)) || COEF < -(1 <<< (COEF_W - 1))) begin : g_chk_width
    $error("fir_tap: coefficient %0d does not fit in %0d bits", COEF, COEF_W);
  end
  if (PC.t1.en && int'(PC.t1.shift) >= ACC_W) begin : g_chk_shift
    $error("fir_tap: shift of coefficient %0d exceeds the accumulator", COEF);
  end

  // Sample sign-extended to the accumulator width.
  logic [ACC_W-1:0] xe;
  assign xe = ACC_W'(x);

  logic [ACC_W-1:0] sum1, cy1, sum2, cy2;

  for (genvar i = 0; i < ACC_W; i++) begin : g_bit
    // operand selection of the two rows at this bit position
    localparam bit DATA1 = PC.t1.en && (i >= int'(PC.t1.shift));
    localparam bit INV1  = PC.t1.en && PC.t1.neg;
    localparam bit DATA2 = PC.t2.en && (i >= int'(PC.t2.shift));
    localparam bit INV2  = PC.t2.en && PC.t2.neg;
    localparam int SRC1  = DATA1 ? i - int'(PC.t1.shift) : 0;
    localparam int SRC2  = DATA2 ? i - int'(PC.t2.shift) : 0;

    logic b1, b2;
    if (i == 0) begin : g_lsb
      assign b1 = INV1;   // +1 of a negated term 1
      assign b2 = INV2;   // +1 of a negated term 2
    end else begin : g_mid
      assign b1 = c_in[i-1];
      assign b2 = cy1[i-1];
    end

    clb_fa #(.USE_DATA(DATA1), .INV(INV1)) u_row1 (
      .a(s_in[i]), .b(b1), .d(xe[SRC1]), .sum(sum1[i]), .cout(cy1[i])
    );
    clb_fa #(.USE_DATA(DATA2), .INV(INV2)) u_row2 (
      .a(sum1[i]), .b(b2), .d(xe[SRC2]), .sum(sum2[i]), .cout(cy2[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out <= '0;
      c_out <= '0;
    end else begin
      s_out <= sum2;
      c_out <= cy2;
    end
  end
endmodule
