// hmix_requant: one lane of the REQUANT unit, wide integer to INT8.
//
// out = sat8((x * b) >>> c): the ratio of the input and output scales is
// expressed offline as an integer multiplier b and a shift c. The shift is
// an arithmetic right shift (a floor), which is what reduces a 32- or 64-bit
// value to INT8; the document writes the shift as a left shift in its
// equation and prose, and this design takes that as the same operation seen
// from the scale side. Saturation to [-128, 127] is this design's choice.
// Two pipeline stages: REQ_LAT = 2 cycles, one result per cycle.
module hmix_requant
  import hmix_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [WIDE_W-1:0] x,
  input  logic        [15:0]       b,
  input  logic        [5:0]        c,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out
);
  logic                     s1_v;
  logic signed [WIDE_W+16:0] s1_prod;
  logic        [5:0]        s1_c;
  logic signed [WIDE_W+16:0] shifted;

  assign shifted = s1_prod >>> s1_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_prod <= '0; s1_c <= '0;
      out_valid <= 1'b0; out <= '0;
    end else begin
      s1_v      <= in_valid;
      s1_prod   <= (WIDE_W+17)'(x) * $signed({1'b0, b});
      s1_c      <= c;
      out_valid <= s1_v;
      out       <= sat8(128'(shifted));
    end
  end
endmodule
