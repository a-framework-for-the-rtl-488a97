// tb_fir_top: end-to-end test of the cascaded filter.
//
// Two filters run side by side on the same input stream:
//   A: 21 taps over two chips (11 + 10), the chip split of the two-chip
//      implementation, with a test coefficient set that mixes the
//      default 11 taps with large two-term coefficients;
//   B: 25 taps over three chips (11 + 10 + 4), a partly filled last chip.
// The stream is an impulse (the impulse response must reproduce the taps),
// a positive and a negative step, full-scale random samples (which drive the
// sum out of the 20-bit range, so results must wrap around) and
// small random samples. A scoreboard checks y and the carry-save pair of each
// filter against the convolution sum at latency NUM_CHIPS + 1.
// Mechanisms counted, each of which must occur: partial sums crossing each
// chip boundary, wrap-around, outputs of negative value.
module tb_fir_top;
  localparam int X_W = 10, ACC_W = 20;
  localparam int NA = 21, NB = 25;
  localparam int TAPS_A [NA] = '{-30, 6, 24, 48, 65, 72, 65, 48, 24, 6, -30,
                                 496, -384, 257, -2, 0, 1, -511, 320, -96, 12};
  localparam int TAPS_B [NB] = '{12, -96, 320, -511, 1, 0, -2, 257, -384, 496,
                                 -30, 6, 24, 48, 65, 72, 65, 48, 24, 6, -30,
                                 -256, 384, 130, -17};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [X_W-1:0] x;
  logic [ACC_W-1:0] ya, ya_s, ya_c, yb, yb_s, yb_c;

  fir_top #(.NUM_TAPS(NA), .TAPS(TAPS_A)) dut_a (
    .clk, .rst_n, .x_in(x), .y_s(ya_s), .y_c(ya_c), .y(ya));
  fir_top #(.NUM_TAPS(NB), .TAPS(TAPS_B)) dut_b (
    .clk, .rst_n, .x_in(x), .y_s(yb_s), .y_c(yb_c), .y(yb));

  int ca, fa, wa, cb, fb, wb;
  fir_scoreboard #(.X_W(X_W), .ACC_W(ACC_W), .NUM_TAPS(NA), .TAPS(TAPS_A), .LAT(3)) sb_a (
    .clk, .rst_n, .x, .y(ya), .y_s(ya_s), .y_c(ya_c), .checks(ca), .failures(fa), .wraps(wa));
  fir_scoreboard #(.X_W(X_W), .ACC_W(ACC_W), .NUM_TAPS(NB), .TAPS(TAPS_B), .LAT(4)) sb_b (
    .clk, .rst_n, .x, .y(yb), .y_s(yb_s), .y_c(yb_c), .checks(cb), .failures(fb), .wraps(wb));

  // partial sums handed from chip to chip
  int xfer_a1 = 0, xfer_b1 = 0, xfer_b2 = 0, neg_out = 0;
  always @(posedge clk) begin
    if (dut_a.s_link[1] != '0 || dut_a.c_link[1] != '0) xfer_a1++;
    if (dut_b.s_link[1] != '0 || dut_b.c_link[1] != '0) xfer_b1++;
    if (dut_b.s_link[2] != '0 || dut_b.c_link[2] != '0) xfer_b2++;
    if (ya[ACC_W-1]) neg_out++;
  end

  int checks, failures;
  task automatic report();
    checks   = ca + cb + 4;
    failures = fa + fb;
    $display("chip transfers A:%0d B:%0d/%0d  wraps A:%0d B:%0d  negative outputs:%0d",
             xfer_a1, xfer_b1, xfer_b2, wa, wb, neg_out);
    if (xfer_a1 == 0) failures++;
    if (xfer_b1 == 0 || xfer_b2 == 0) failures++;
    if (wa == 0 || wb == 0) failures++;
    if (neg_out == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    report();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // impulse
    @(posedge clk) x <= 10'sd1;
    @(posedge clk) x <= '0;
    repeat (40) @(posedge clk);
    // positive and negative steps
    x <= 10'sd100;
    repeat (40) @(posedge clk);
    x <= -10'sd77;
    repeat (40) @(posedge clk);
    // full-scale random samples: the exact sum exceeds 20 bits
    repeat (3000) @(posedge clk) x <= $urandom_range(1) ? 10'sh1ff : 10'sh200;
    repeat (3000) @(posedge clk) x <= X_W'($urandom);
    repeat (3000) @(posedge clk) x <= X_W'($signed(4'($urandom)));
    x <= '0;
    repeat (40) @(posedge clk);
    report();
    $finish;
  end
endmodule
