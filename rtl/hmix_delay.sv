// hmix_delay: a W-bit shift register of DEPTH stages (DEPTH >= 1), reset to
// zero. Used to delay address/valid words so that writes line up with the
// pipeline latency of the datapath feeding them.
// The document only implies these alignment delays; the register chain is
// this design's own way of matching the datapath latency.
module hmix_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      q[0] <= din;
      for (int i = 1; i < DEPTH; i++) q[i] <= q[i-1];
    end
  end

  assign dout = q[DEPTH-1];
endmodule
