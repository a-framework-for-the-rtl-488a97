// tb_fir_chip: one chip holding positions 3..9 of a 12-tap filter, fed with
// random samples and a random incoming carry-save partial sum. The outputs
// must equal  Pin[n-8] + sum_j g_j x[n-8+j]  (wrapped to 20 bits), with g_j
// the coefficient of chain position 3+j, and x_out the sample one edge late.
// The expected values are computed from histories of the applied inputs.
module tb_fir_chip;
  localparam int X_W = 10, COEF_W = 10, ACC_W = 20;
  localparam int NT = 12;
  localparam int TAPS [NT] = '{-30, 6, 24, 48, 65, 72, -511, 496, 3, 0, -384, 1};
  localparam int FIRST = 3, CT = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [X_W-1:0] x_in, x_out;
  logic [ACC_W-1:0] s_in, c_in, s_out, c_out;

  fir_chip #(.X_W(X_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .NUM_TAPS(NT), .TAPS(TAPS),
             .FIRST_POS(FIRST), .CHIP_TAPS(CT)) dut (
    .clk, .rst_n, .x_in, .s_in, .c_in, .x_out, .s_out, .c_out
  );

  longint xh [$];   // xh[0]: sample captured at the latest edge
  longint ph [$];   // same for the incoming partial sum (s + 2c)

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive like a flip-flop, check with the pre-edge values
  always @(posedge clk) begin
    if (rst_n) begin
      longint e;
      logic [ACC_W-1:0] got;
      got = s_out + {c_out[ACC_W-2:0], 1'b0};
      // outputs now are those of the previous edge: ages are counted from it
      e = (ph.size() > CT) ? ph[CT] : 0;
      for (int j = 0; j < CT; j++) begin
        int age;
        age = CT - j;
        if (age < xh.size()) e += longint'(TAPS[NT - 1 - (FIRST + j)]) * xh[age];
      end
      checks++;
      if (got !== e[ACC_W-1:0]) begin
        failures++;
        if (failures < 10) $display("partial sum: got %h want %h", got, e[ACC_W-1:0]);
      end
      checks++;
      if (longint'(x_out) != ((xh.size() > 0) ? xh[0] : 0)) failures++;
      xh.push_front(longint'(x_in));
      ph.push_front(longint'(s_in) + 2 * longint'(c_in));
      if (xh.size() > 20) begin void'(xh.pop_back()); void'(ph.pop_back()); end
      x_in <= X_W'($urandom);
      s_in <= ACC_W'($urandom);
      c_in <= ACC_W'($urandom);
    end
  end

  initial begin
    x_in = '0; s_in = '0; c_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (1000) @(posedge clk);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
