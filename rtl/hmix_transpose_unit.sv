// hmix_transpose_unit: the "stall-free" transpose unit (TU) of HMix.
//
// N lanes enter (one per BRAM bank or per systolic-array row) and N lanes
// leave through one register stage per lane, so the unit costs one cycle of
// latency and N registers. With permute=1 (token mixing), output lane r takes
// input lane (phase - r) mod N, where phase counts cycles since the cycle in
// which sync was high (phase 0 in that cycle). Because the banks are read with
// one address line delayed by one cycle per bank, this rotation is all it
// takes to turn bank-ordered data into row-ordered data and back; the same
// mapping works in both directions, so one module serves at the IBRAM output,
// the OBRAM input and the OBRAM output. With permute=0 (channel mixing, and
// LayerNorm) lane r passes to lane r. The rotation rule follows the document's
// permutation table; the sync/phase counter is this design's own choice.
module hmix_transpose_unit
  import hmix_pkg::*;
#(
  parameter int unsigned LANES = N,
  parameter int unsigned W     = DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         permute,   // 1: TM permutation, 0: identity
  input  logic         sync,      // this cycle is phase 0
  input  logic [W-1:0] din  [LANES],
  output logic [W-1:0] dout [LANES]
);
  localparam int unsigned PW = (LANES > 1) ? $clog2(LANES) : 1;

  logic [PW-1:0] phase_q, phase;
  logic [W-1:0]  dout_q [LANES];

  assign phase = sync ? '0 : phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= '0;
    else        phase_q <= PW'((int'(phase) + 1) % LANES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < LANES; r++) dout_q[r] <= '0;
    end else begin
      for (int r = 0; r < LANES; r++) begin
        if (permute) dout_q[r] <= din[(int'(phase) - r + LANES) % LANES];
        else         dout_q[r] <= din[r];
      end
    end
  end

  assign dout = dout_q;
endmodule
