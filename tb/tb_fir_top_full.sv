// tb_fir_top_full: the filter exactly as configured by default (11 taps
// -30 6 24 48 65 72 65 48 24 6 -30, 10-bit samples, 20-bit results, one
// chip). Measures the impulse response the way a frequency-response set-up
// would take it (an impulse, then zeros), checks it against the taps and
// checks the latency of y (one edge after capture for the single chip
// plus one for the final adder), then runs a step and random samples through
// the scoreboard.
module tb_fir_top_full;
  localparam int X_W = 10, ACC_W = 20, N = 11;
  localparam int TAPS [N] = '{-30, 6, 24, 48, 65, 72, 65, 48, 24, 6, -30};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [X_W-1:0] x;
  logic [ACC_W-1:0] y, y_s, y_c;

  fir_top dut (.clk, .rst_n, .x_in(x), .y_s, .y_c, .y);

  int cs, fs, ws;
  fir_scoreboard #(.X_W(X_W), .ACC_W(ACC_W), .NUM_TAPS(N), .TAPS(TAPS), .LAT(2)) sb (
    .clk, .rst_n, .x, .y, .y_s, .y_c, .checks(cs), .failures(fs), .wraps(ws));

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + cs, failures + fs);
    $finish;
  end

  initial begin
    int first;
    logic signed [ACC_W-1:0] resp [$];
    x = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk) x <= 10'sd1;           // captured at the next edge (edge 0)
    @(posedge clk) x <= '0;
    // record y after each edge, edge 0 being the one that captured the impulse
    for (int e = 0; e < N + 6; e++) begin
      #1 resp.push_back($signed(y));
      @(posedge clk);
    end
    first = -1;
    foreach (resp[i]) if (first < 0 && resp[i] != 0) first = i;
    checks++;
    if (first != 2) begin
      failures++;
      $display("impulse response starts after edge %0d, expected 2", first);
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (2 + k >= resp.size() || int'(resp[2 + k]) != TAPS[k]) begin
        failures++;
        $display("impulse response h[%0d] wrong", k);
      end
    end
    x <= 10'sd511;
    repeat (30) @(posedge clk);
    checks++;
    if ($signed(y) != 511 * 298) begin        // step reaches 511 * sum(taps)
      failures++;
      $display("step response %0d, expected %0d", $signed(y), 511 * 298);
    end
    repeat (5000) @(posedge clk) x <= X_W'($urandom);
    x <= '0;
    repeat (20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + cs, failures + fs);
    $finish;
  end
endmodule
