// hmix_layernorm: one lane of the integer-only LayerNorm unit.
//
// Normalizes one row of CH INT8 values (one token, along the channel
// dimension) in two passes over the row:
//   pass 1 (ACC):  S1 = sum q, S2 = sum q^2, both in one pass;
//   SQRT:          sigma = isqrt(CH*S2 - S1^2), bit-serial, 32 cycles;
//   DIV:           recip = (2 << recip_sh) / sigma, restoring division,
//                  33 cycles, once per row (sigma = 0 gives the largest recip);
//   pass 2 (NORM): out = sat8(((CH*q - S1) * recip) >>> out_sh).
// This is the document's one-pass variance formula with a single reciprocal
// per row and a multiply in the second pass. The choice of a bit-serial
// square root and divider, the saturating output shift, and the absence of a
// learned gain and bias (the document does not use one) are this design's.
// Interface: start clears the lane and opens pass 1; the first CH in_valid
// beats are pass 1; stats_ready rises when the reciprocal is known; the next
// CH in_valid beats are pass 2 and give out_valid/out_q LN_LAT = 2 cycles
// after each input. The lane then returns to idle.
module hmix_layernorm
  import hmix_pkg::*;
#(
  parameter int unsigned CH = 768
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_q,
  input  logic        [4:0]        recip_sh,
  input  logic        [5:0]        out_sh,
  output logic                     stats_ready,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_q
);
  localparam int unsigned CW = $clog2(CH + 1);

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_SQRT, S_DIV, S_NORM} ln_state_e;
  ln_state_e state;

  logic        [CW-1:0] cnt;
  logic signed [39:0]   s1;
  logic        [47:0]   s2;
  // square root registers
  logic        [63:0]   op, res, one;
  // divider registers
  logic        [32:0]   dividend, quot;
  logic        [33:0]   rem;
  logic        [5:0]    step;
  logic        [31:0]   sigma;
  logic signed [33:0]   recip;
  // pass-2 pipeline
  logic                 p1_v;
  logic signed [79:0]   p1_prod;

  logic signed [47:0]   num;
  logic        [33:0]   rem_sh;
  logic signed [95:0]   d_full;

  assign num    = 48'(CH) * 48'(in_q) - 48'(s1);
  assign rem_sh = {rem[32:0], dividend[32]};
  assign d_full = 96'(CH) * $signed({48'd0, s2}) - 96'(s1) * 96'(s1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; cnt <= '0; s1 <= '0; s2 <= '0;
      op <= '0; res <= '0; one <= '0;
      dividend <= '0; quot <= '0; rem <= '0; step <= '0; sigma <= '0; recip <= '0;
      p1_v <= 1'b0; p1_prod <= '0; out_valid <= 1'b0; out_q <= '0;
    end else begin
      p1_v <= 1'b0;
      if (start) begin
        state <= S_ACC; cnt <= '0; s1 <= '0; s2 <= '0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ACC: if (in_valid) begin
            s1 <= s1 + 40'(in_q);
            s2 <= s2 + 48'(in_q * in_q);
            if (cnt == CW'(CH - 1)) begin
              state <= S_SQRT;
              cnt   <= '0;
            end else cnt <= cnt + 1'b1;
          end
          S_SQRT: begin
            if (cnt == '0) begin
              // first cycle: form the variance numerator
              op  <= d_full[63:0];
              res <= '0;
              one <= 64'h4000_0000_0000_0000;
              cnt <= cnt + 1'b1;
            end else if (one != '0) begin
              if (op >= res + one) begin
                op  <= op - (res + one);
                res <= (res >> 1) + one;
              end else begin
                res <= res >> 1;
              end
              one <= one >> 2;
            end else begin
              sigma    <= res[31:0];
              dividend <= 33'd2 << recip_sh;
              rem      <= '0;
              quot     <= '0;
              step     <= '0;
              state    <= S_DIV;
            end
          end
          S_DIV: begin
            if (sigma == '0) begin
              recip <= 34'sh1_FFFF_FFFF;
              state <= S_NORM;
              cnt   <= '0;
            end else if (step != 6'd33) begin
              if (rem_sh >= {2'b00, sigma}) begin
                rem  <= rem_sh - {2'b00, sigma};
                quot <= {quot[31:0], 1'b1};
              end else begin
                rem  <= rem_sh;
                quot <= {quot[31:0], 1'b0};
              end
              dividend <= dividend << 1;
              step     <= step + 1'b1;
            end else begin
              recip <= $signed({1'b0, quot});
              state <= S_NORM;
              cnt   <= '0;
            end
          end
          S_NORM: if (in_valid) begin
            p1_v    <= 1'b1;
            p1_prod <= 80'(num) * 80'(recip);
            if (cnt == CW'(CH - 1)) begin
              state <= S_IDLE;
              cnt   <= '0;
            end else cnt <= cnt + 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
      out_valid <= p1_v;
      if (p1_v) out_q <= sat8(128'(p1_prod >>> out_sh));
    end
  end

  assign stats_ready = (state == S_NORM);
endmodule
