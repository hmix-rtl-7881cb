// hmix_pe: one processing element of the HMix systolic array.
//
// Holds an INT8 weight register (flows top to bottom), an INT8 input register
// (flows left to right) and an INT32 psum register, with one multiplier and
// one adder whose second operand is chosen by a mux, as in the document's
// PE drawing. Three behaviours share this datapath:
//   OS accumulate  (is_mode=0, drain=0): psum <= psum + w*i, i shifts right.
//   OS drain       (is_mode=0, drain=1): psum <= psum of left neighbour; this
//                  shifts the finished outputs out of the row ("cyan" path).
//                  The input register keeps shifting, which is how the GELU
//                  results are loaded back into the array ("red" path).
//   IS             (is_mode=1): input register holds its stationary value and
//                  psum <= left psum + w*i, so partial sums flow right.
// The weight register loads w_in every cycle in all modes. Reset clears all
// three registers (reset behaviour is this design's choice).
module hmix_pe
  import hmix_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  pe_ctrl_t                 ctrl,
  input  logic signed [DATA_W-1:0] w_in,   // from the PE above
  input  logic signed [DATA_W-1:0] i_in,   // from the PE on the left
  input  logic signed [ACC_W-1:0]  p_in,   // psum from the PE on the left
  output logic signed [DATA_W-1:0] w_out,
  output logic signed [DATA_W-1:0] i_out,
  output logic signed [ACC_W-1:0]  p_out
);
  logic signed [DATA_W-1:0]   w_q, i_q;
  logic signed [ACC_W-1:0]    psum_q;
  logic signed [2*DATA_W-1:0] prod;
  logic signed [ACC_W-1:0]    addend;

  assign prod   = w_q * i_q;
  // Mux in front of the adder: own psum (OS) or left neighbour's psum (IS).
  assign addend = ctrl.is_mode ? p_in : psum_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q    <= '0;
      i_q    <= '0;
      psum_q <= '0;
    end else begin
      w_q <= w_in;
      if (!ctrl.is_mode) i_q <= i_in;
      if (!ctrl.is_mode && ctrl.drain) psum_q <= p_in;
      else                             psum_q <= addend + ACC_W'(prod);
    end
  end

  assign w_out = w_q;
  assign i_out = i_q;
  assign p_out = psum_q;
endmodule
