// tb_clb_fa: exhaustive test of the CLB full adder in its four operand
// modes (data, inverted data, Low, High). Expected sum and carry are the
// binary digits of a + b + operand.
module tb_clb_fa;
  int checks = 0, failures = 0;
  logic a, b, d;
  logic [3:0] sum, cout;

  clb_fa #(.USE_DATA(1'b1), .INV(1'b0)) u_pos  (.a, .b, .d, .sum(sum[0]), .cout(cout[0]));
  clb_fa #(.USE_DATA(1'b1), .INV(1'b1)) u_neg  (.a, .b, .d, .sum(sum[1]), .cout(cout[1]));
  clb_fa #(.USE_DATA(1'b0), .INV(1'b0)) u_low  (.a, .b, .d, .sum(sum[2]), .cout(cout[2]));
  clb_fa #(.USE_DATA(1'b0), .INV(1'b1)) u_high (.a, .b, .d, .sum(sum[3]), .cout(cout[3]));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int op [4];
      {a, b, d} = 3'(v);
      #1;
      op = '{int'(d), int'(!d), 0, 1};
      for (int m = 0; m < 4; m++) begin
        int tot;
        tot = int'(a) + int'(b) + op[m];
        checks++;
        if ({cout[m], sum[m]} !== 2'(tot)) begin
          failures++;
          $display("mode %0d a=%0d b=%0d d=%0d: got %0d%0d want %0d", m, a, b, d,
                   cout[m], sum[m], tot);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
