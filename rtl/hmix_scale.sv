// hmix_scale: one lane of the SCALE unit on the residual path.
//
// For the first set of psums of an MLP the word read from OBRAM is the INT8
// output o of the previous MLP; it is brought into the psum domain as
// (b * o) >>> c with an offline fixed-point multiplier b and right shift c.
// For later accumulations the word is already a 32-bit psum and passes
// unchanged (bypass = 1). The document gives the rescaling rule and that it
// applies only to the first set of psums; the bypass input and the single
// register stage (SCALE_LAT = 1) are this design's choices.
module hmix_scale
  import hmix_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bypass,
  input  logic signed [ACC_W-1:0] din,
  input  logic        [15:0]      b,
  input  logic        [5:0]       c,
  output logic signed [ACC_W-1:0] dout
);
  logic signed [24:0] prod;
  assign prod = $signed(din[DATA_W-1:0]) * $signed({1'b0, b});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      dout <= '0;
    else if (bypass) dout <= din;
    else             dout <= ACC_W'(prod >>> c);
  end
endmodule
