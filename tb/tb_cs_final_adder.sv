// tb_cs_final_adder: random and corner carry-save pairs; the registered
// output must equal (s + 2c) mod 2^W one clock after the pair is applied.
module tb_cs_final_adder;
  localparam int W = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] s, c, y;
  always #5 clk = ~clk;

  cs_final_adder #(.W(W)) dut (.clk, .rst_n, .s, .c, .y);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = '0; c = '0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (y !== '0) failures++;
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      longint e;
      @(negedge clk);
      case (i)
        0: begin s = '1; c = '1; end
        1: begin s = '1; c = '0; end
        2: begin s = 1; c = {1'b0, {(W-1){1'b1}}}; end
        default: begin s = W'($urandom); c = W'($urandom); end
      endcase
      e = longint'(s) + 2 * longint'(c);
      @(posedge clk); #1;
      checks++;
      if (y !== e[W-1:0]) begin
        failures++;
        $display("s=%h c=%h: got %h want %h", s, c, y, e[W-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
