// hmix_gelu: one lane of the integer-only GELU unit (I-GELU).
//
// Computes, for an INT32 accumulator value q with offline constants:
//   a      = min(|q|, qclip)                      (clip of the erf argument)
//   L      = (a + qb)^2 + qc                      (second-order erf polynomial)
//   q_erf  = sign(q) * L
//   out    = q * (q_erf + q1)
// which is the quantized GELU of the document's Algorithm 1; the output scale
// S * S_erf / 2 is folded into the following REQUANT constants by the host.
// The polynomial and its constants (a = -0.2888, b = -1.769, c = 1 before
// scaling) come from the document; the three-stage pipeline and the 64-bit
// saturated output are this design's choices. Latency GELU_LAT = 3 cycles,
// one result per cycle; out_valid follows in_valid.
module hmix_gelu
  import hmix_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [ACC_W-1:0]  q,
  input  logic signed [31:0]       qb,
  input  logic signed [63:0]       qc,
  input  logic signed [63:0]       q1,
  input  logic        [31:0]       qclip,
  output logic                     out_valid,
  output logic signed [WIDE_W-1:0] out
);
  // Stage 1: sign, magnitude and clip.
  logic                    s1_v, s1_neg;
  logic signed [ACC_W-1:0] s1_q;
  logic        [32:0]      s1_a;
  // Stage 2: polynomial with sign applied.
  logic                    s2_v;
  logic signed [ACC_W-1:0] s2_q;
  logic signed [71:0]      s2_erf;

  logic        [32:0]      absq;
  logic signed [34:0]      t;
  logic signed [70:0]      poly;
  logic signed [72:0]      sum;
  logic signed [104:0]     prod;

  assign absq = q[ACC_W-1] ? 33'(-{q[ACC_W-1], q}) : 33'({1'b0, q});
  assign t    = $signed({2'b00, s1_a}) + 35'(qb);
  assign poly = 71'(t * t) + 71'(qc);
  assign sum  = 73'(s2_erf) + 73'(q1);
  assign prod = 105'(s2_q) * 105'(sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_neg <= 1'b0; s1_q <= '0; s1_a <= '0;
      s2_v <= 1'b0; s2_q <= '0; s2_erf <= '0;
      out_valid <= 1'b0; out <= '0;
    end else begin
      s1_v   <= in_valid;
      s1_neg <= q[ACC_W-1];
      s1_q   <= q;
      s1_a   <= (absq > 33'(qclip)) ? 33'(qclip) : absq;

      s2_v   <= s1_v;
      s2_q   <= s1_q;
      s2_erf <= s1_neg ? -72'(poly) : 72'(poly);

      out_valid <= s2_v;
      if (prod > 105'sh0_7FFF_FFFF_FFFF_FFFF)       out <= 64'sh7FFF_FFFF_FFFF_FFFF;
      else if (prod < -105'sh0_8000_0000_0000_0000) out <= 64'sh8000_0000_0000_0000;
      else                                          out <= prod[63:0];
    end
  end
endmodule
