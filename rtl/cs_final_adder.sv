// cs_final_adder: carry-propagate adder that resolves the carry-save output.
//
// The filter chips deliver their result as a sum vector s and a carry vector
// c whose bit i weighs 2^(i+1). This stage forms y = (s + (c << 1)) mod 2^W
// and registers it, one cycle of latency, one word per clock. The carry out
// of the top bit is dropped, so overflow wraps around; for the same reason
// c[W-1], which weighs 2^W, is not used.
// The document names this final stage and leaves it outside the chips of its
// main implementation; here it is a plain adder followed by a register,
// which is this design's choice.
module cs_final_adder #(
  parameter int W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] s,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);
  logic [W-1:0] c_sh;
  assign c_sh = {c[W-2:0], 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y <= '0;
    else        y <= s + c_sh;
  end
endmodule
