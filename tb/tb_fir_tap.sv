// tb_fir_tap: drives a bank of taps, each with a different coefficient
// (positive, negative, one or two power-of-two terms, zero, extremes of the
// 10-bit range), with random samples and random carry-save partial sums.
// Each tap must present (s_in + 2 c_in + COEF * x) mod 2^20, in carry-save
// form, exactly one clock after its inputs were applied and hold it until
// the next edge.
module tb_fir_tap;
  localparam int X_W = 10, COEF_W = 10, ACC_W = 20;
  localparam int NC = 16;
  localparam int COEFS [NC] = '{65, 72, -30, 6, 24, 48, 0, 1, -1, -512, 511, 496,
                                -384, 256, 3, -3};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [X_W-1:0] x;
  logic [ACC_W-1:0] s_in, c_in;
  logic [ACC_W-1:0] s_out [NC];
  logic [ACC_W-1:0] c_out [NC];

  for (genvar i = 0; i < NC; i++) begin : g_dut
    fir_tap #(.X_W(X_W), .COEF_W(COEF_W), .ACC_W(ACC_W), .COEF(COEFS[i])) dut (
      .clk, .rst_n, .x, .s_in, .c_in, .s_out(s_out[i]), .c_out(c_out[i])
    );
  end

  function automatic logic [ACC_W-1:0] expect_val(int i, logic signed [X_W-1:0] xv,
                                                   logic [ACC_W-1:0] sv, logic [ACC_W-1:0] cv);
    longint e;
    e = longint'(sv) + 2 * longint'(cv) + longint'(COEFS[i]) * longint'(xv);
    return e[ACC_W-1:0];
  endfunction

  function automatic logic [ACC_W-1:0] cs_val(int i);
    return s_out[i] + {c_out[i][ACC_W-2:0], 1'b0};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [ACC_W-1:0] exp_v [NC];
    x = '0; s_in = '0; c_in = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < NC; i++) begin
      checks++;
      if (s_out[i] !== '0 || c_out[i] !== '0) failures++;
    end
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      case (n)
        0: begin x = 10'sh1ff; s_in = '0; c_in = '0; end           // largest positive
        1: begin x = 10'sh200; s_in = '0; c_in = '0; end           // most negative
        2: begin x = -1;       s_in = '1; c_in = '1; end
        default: begin x = X_W'($urandom); s_in = ACC_W'($urandom); c_in = ACC_W'($urandom); end
      endcase
      for (int i = 0; i < NC; i++) exp_v[i] = expect_val(i, x, s_in, c_in);
      @(posedge clk); #1;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (cs_val(i) !== exp_v[i]) begin
          failures++;
          if (failures < 10)
            $display("coef %0d x=%0d: got %h want %h", COEFS[i], x, cs_val(i), exp_v[i]);
        end
      end
      // the result must stay put while the next inputs are applied
      @(negedge clk);
      x = X_W'($urandom); s_in = ACC_W'($urandom); c_in = ACC_W'($urandom);
      #1;
      for (int i = 0; i < NC; i++) begin
        checks++;
        if (cs_val(i) !== exp_v[i]) failures++;
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
