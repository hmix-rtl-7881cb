// hmix_systolic_array: N x N grid of hmix_pe forming the HMix compute core.
//
// Weights enter at the top of each column, inputs and psums at the left of
// each row; the psum of the last column of each row is the row output. The
// array itself adds no skew: callers present row r and column c data r and c
// cycles late (the staggered BRAM banks do this). Timing, with data presented
// at the edges in cycle t:
//   * w_top[c] at t reaches the PE in row r in its register at t+1+r;
//   * i_left[r] at t reaches column c at t+1+c;
//   * IS: p_left[r] presented in cycle t comes out of p_right[r] in cycle t+N,
//     with the N products of that row added.
//   * OS drain: p_right[r] shows the column N-1, N-2, ... psums in successive
//     drain cycles.
// One control word is broadcast to all PEs.
module hmix_systolic_array
  import hmix_pkg::*;
#(
  parameter int unsigned ROWS = N,
  parameter int unsigned COLS = N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  pe_ctrl_t                 ctrl,
  input  logic signed [DATA_W-1:0] w_top  [COLS],
  input  logic signed [DATA_W-1:0] i_left [ROWS],
  input  logic signed [ACC_W-1:0]  p_left [ROWS],
  output logic signed [ACC_W-1:0]  p_right[ROWS]
);
  // Inter-PE nets: w_net[r][c] is the weight into PE(r,c), and so on.
  logic signed [DATA_W-1:0] w_net [ROWS+1][COLS];
  logic signed [DATA_W-1:0] i_net [ROWS][COLS+1];
  logic signed [ACC_W-1:0]  p_net [ROWS][COLS+1];

  for (genvar c = 0; c < COLS; c++) begin : g_top
    assign w_net[0][c] = w_top[c];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign i_net[r][0] = i_left[r];
    assign p_net[r][0] = p_left[r];
    assign p_right[r]  = p_net[r][COLS];
    for (genvar c = 0; c < COLS; c++) begin : g_col
      hmix_pe u_pe (
        .clk   (clk),
        .rst_n (rst_n),
        .ctrl  (ctrl),
        .w_in  (w_net[r][c]),
        .i_in  (i_net[r][c]),
        .p_in  (p_net[r][c]),
        .w_out (w_net[r+1][c]),
        .i_out (i_net[r][c+1]),
        .p_out (p_net[r][c+1])
      );
    end
  end
endmodule
