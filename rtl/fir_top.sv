// fir_top: high-speed multiplier-less FIR filter, cascaded over FPGA chips.
//
// y[n] = sum_{k=0}^{NUM_TAPS-1} TAPS[k] * x[n-k], every coefficient being the
// sum or difference of two powers of two so that a tap is two rows of full
// adders and a register (fir_tap). The filter is in transposed form with a
// carry-save partial sum, so no carry ever ripples inside the filter and the
// clock rate does not depend on the number of taps or on the word width.
// The taps are split over chips as an FPGA implementation would place them:
// the first chip holds FIRST_CHIP_TAPS taps, every later one NEXT_CHIP_TAPS
// (fewer, as a later chip also has to take in the partial sum). A final
// carry-propagate adder (cs_final_adder) resolves the carry-save result.
//
// Interface: one sample x_in per clock, no handshake. y_s/y_c are the
// carry-save result at the last chip's output, y the resolved result,
// all wrapping modulo 2^ACC_W.
// Timing: a sample applied before edge t first shows in y_s/y_c after edge
// t + NUM_CHIPS and in y after edge t + NUM_CHIPS + 1 (latency NUM_CHIPS + 1
// cycles for y counted from the capturing edge).
// The default taps, widths and chip split are the document's; the final
// adder inside the design (the document leaves it off its chips) and the
// reset are this design's choices.
module fir_top #(
  parameter int X_W             = 10,
  parameter int COEF_W          = 10,
  parameter int ACC_W           = 20,
  parameter int NUM_TAPS        = 11,
  parameter int TAPS [NUM_TAPS] = '{-30, 6, 24, 48, 65, 72, 65, 48, 24, 6, -30},
  parameter int FIRST_CHIP_TAPS = 11,
  parameter int NEXT_CHIP_TAPS  = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [X_W-1:0]   x_in,
  output logic        [ACC_W-1:0] y_s,
  output logic        [ACC_W-1:0] y_c,
  output logic        [ACC_W-1:0] y
);
  localparam int NUM_CHIPS = (NUM_TAPS <= FIRST_CHIP_TAPS) ? 1 :
      1 + (NUM_TAPS - FIRST_CHIP_TAPS + NEXT_CHIP_TAPS - 1) / NEXT_CHIP_TAPS;

  // first chain position held by chip k
  function automatic int chip_first(int k);
    return (k == 0) ? 0 : FIRST_CHIP_TAPS + (k - 1) * NEXT_CHIP_TAPS;
  endfunction

  // number of taps held by chip k
  function automatic int chip_taps(int k);
    int room, left;
    room = (k == 0) ? FIRST_CHIP_TAPS : NEXT_CHIP_TAPS;
    left = NUM_TAPS - chip_first(k);
    return (left < room) ? left : room;
  endfunction

  logic signed [X_W-1:0]   x_link [NUM_CHIPS+1];
  logic        [ACC_W-1:0] s_link [NUM_CHIPS+1];
  logic        [ACC_W-1:0] c_link [NUM_CHIPS+1];

  assign x_link[0] = x_in;
  assign s_link[0] = '0;
  assign c_link[0] = '0;

  for (genvar k = 0; k < NUM_CHIPS; k++) begin : g_chip
    fir_chip #(
      .X_W      (X_W),
      .COEF_W   (COEF_W),
      .ACC_W    (ACC_W),
      .NUM_TAPS (NUM_TAPS),
      .TAPS     (TAPS),
      .FIRST_POS(chip_first(k)),
      .CHIP_TAPS(chip_taps(k))
    ) u_chip (
      .clk  (clk),
      .rst_n(rst_n),
      .x_in (x_link[k]),
      .s_in (s_link[k]),
      .c_in (c_link[k]),
      .x_out(x_link[k+1]),
      .s_out(s_link[k+1]),
      .c_out(c_link[k+1])
    );
  end

  assign y_s = s_link[NUM_CHIPS];
  assign y_c = c_link[NUM_CHIPS];

  cs_final_adder #(.W(ACC_W)) u_final (
    .clk  (clk),
    .rst_n(rst_n),
    .s    (y_s),
    .c    (y_c),
    .y    (y)
  );
endmodule
