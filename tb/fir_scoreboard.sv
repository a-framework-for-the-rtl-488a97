// fir_scoreboard: reference model and checker for the FIR filter outputs.
//
// Sampled on every rising clock edge while rst_n is high, like a flip-flop:
// x is the sample the filter captures at this edge, y/y_s/y_c are the
// outputs left by the previous edge. The expected output is computed
// directly from the convolution sum y[n] = sum_k TAPS[k] x[n-k] in 64-bit
// arithmetic and then wrapped to ACC_W bits, independently of any carry-save
// arithmetic. y must show a sample LAT edges after it was captured, the
// carry-save pair (s + 2c) one edge earlier. It also counts how often the
// exact sum left the ACC_W-bit range (a wrap-around).
module fir_scoreboard #(
  parameter int X_W             = 10,
  parameter int ACC_W           = 20,
  parameter int NUM_TAPS        = 11,
  parameter int TAPS [NUM_TAPS] = '{-30, 6, 24, 48, 65, 72, 65, 48, 24, 6, -30},
  parameter int LAT             = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [X_W-1:0]   x,
  input  logic        [ACC_W-1:0] y,
  input  logic        [ACC_W-1:0] y_s,
  input  logic        [ACC_W-1:0] y_c,
  output int                      checks,
  output int                      failures,
  output int                      wraps
);
  longint hist[$];

  function automatic longint exact_at(int age);
    longint acc = 0;
    for (int k = 0; k < NUM_TAPS; k++)
      if (age + k < hist.size()) acc += longint'(TAPS[k]) * hist[age + k];
    return acc;
  endfunction

  function automatic logic [ACC_W-1:0] wrap(longint v);
    return v[ACC_W-1:0];
  endfunction

  initial begin
    checks = 0;
    failures = 0;
    wraps = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      longint e_y, e_cs;
      logic [ACC_W-1:0] cs;
      hist.push_front(longint'(x));
      if (hist.size() > NUM_TAPS + LAT + 2) void'(hist.pop_back());
      e_y  = exact_at(1 + LAT);   // sample captured LAT edges before the last one
      e_cs = exact_at(LAT);
      cs   = y_s + {y_c[ACC_W-2:0], 1'b0};
      checks += 2;
      if (y !== wrap(e_y)) begin
        failures++;
        if (failures < 10) $display("y mismatch: got %0d want %0d (exact %0d)",
                                    $signed(y), $signed(wrap(e_y)), e_y);
      end
      if (cs !== wrap(e_cs)) begin
        failures++;
        if (failures < 10) $display("carry-save mismatch: got %0d want %0d",
                                    $signed(cs), $signed(wrap(e_cs)));
      end
      if (e_cs >= (longint'(1) <<< (ACC_W - 1)) || e_cs < -(longint'(1) <<< (ACC_W - 1)))
        wraps++;
    end
  end
endmodule
