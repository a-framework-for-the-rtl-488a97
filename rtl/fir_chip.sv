// fir_chip: one FPGA partition of the cascaded FIR filter.
//
// A filter of NUM_TAPS taps h[0..NUM_TAPS-1] is built in transposed form:
// the input sample is broadcast to every tap and the partial sum travels,
// in carry-save form, from the tap holding h[NUM_TAPS-1] to the one holding
// h[0], whose register then holds y[n] = sum_k h[k] x[n-k]. One chip holds
// CHIP_TAPS consecutive taps of that chain, starting at chain position
// FIRST_POS (position p holds h[NUM_TAPS-1-p]).
//
// At its inputs the chip registers the sample and the incoming carry-save
// partial sum (input flip-flops of the I/O blocks); it passes the registered
// sample on at x_out and the partial sum of its last tap at s_out/c_out, so
// chips are cascaded by wiring outputs to inputs. Registering sample and
// partial sum alike keeps them aligned: each chip boundary only adds one
// cycle of latency. The first chip of a cascade gets zero at s_in/c_in.
//
// Timing: for a sample captured at x_in by clock edge t, the term of the
// chip's last tap appears at s_out/c_out after edge t+1, that of the tap
// CHIP_TAPS-1 positions earlier after edge t+CHIP_TAPS; an incoming partial
// sum captured at edge t leaves after edge t+CHIP_TAPS. One sample per clock. Splitting the taps over chips with the outputs of
// one chip fed to the next follows the document; the input registers and
// the reset are this design's choices.
module fir_chip #(
  parameter int X_W       = 10,
  parameter int COEF_W    = 10,
  parameter int ACC_W     = 20,
  parameter int NUM_TAPS  = 11,                  // taps of the whole filter
  parameter int TAPS [NUM_TAPS] = '{-30, 6, 24, 48, 65, 72, 65, 48, 24, 6, -30},
  parameter int FIRST_POS = 0,                   // first chain position held
  parameter int CHIP_TAPS = 11                   // taps held by this chip
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [X_W-1:0]   x_in,
  input  logic        [ACC_W-1:0] s_in,
  input  logic        [ACC_W-1:0] c_in,
  output logic signed [X_W-1:0]   x_out,
  output logic        [ACC_W-1:0] s_out,
  output logic        [ACC_W-1:0] c_out
);
  if (CHIP_TAPS < 1 || FIRST_POS < 0 || FIRST_POS + CHIP_TAPS > NUM_TAPS) begin : g_chk
    $error("fir_chip: taps %0d..%0d outside a %0d-tap filter",
           FIRST_POS, FIRST_POS + CHIP_TAPS - 1, NUM_TAPS);
  end

  logic signed [X_W-1:0]   x_q;
  logic        [ACC_W-1:0] s_q, c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      s_q <= '0;
      c_q <= '0;
    end else begin
      x_q <= x_in;
      s_q <= s_in;
      c_q <= c_in;
    end
  end

  // chain of partial sums: index j feeds tap j, index CHIP_TAPS is the output
  logic [ACC_W-1:0] s_chain [CHIP_TAPS+1];
  logic [ACC_W-1:0] c_chain [CHIP_TAPS+1];

  assign s_chain[0] = s_q;
  assign c_chain[0] = c_q;

  for (genvar j = 0; j < CHIP_TAPS; j++) begin : g_tap
    fir_tap #(
      .X_W   (X_W),
      .COEF_W(COEF_W),
      .ACC_W (ACC_W),
      .COEF  (TAPS[NUM_TAPS - 1 - (FIRST_POS + j)])
    ) u_tap (
      .clk  (clk),
      .rst_n(rst_n),
      .x    (x_q),
      .s_in (s_chain[j]),
      .c_in (c_chain[j]),
      .s_out(s_chain[j+1]),
      .c_out(c_chain[j+1])
    );
  end

  assign x_out = x_q;
  assign s_out = s_chain[CHIP_TAPS];
  assign c_out = c_chain[CHIP_TAPS];
endmodule
