// tb_hmix_systolic_array: the full 16 x 16 array through one two-layer MLP
// tile, driven with the skewed schedule the banked memories produce:
//   OS: H = X * W1 (X: 16 x K, W1: K x 16), checked as the psums are drained
//       out of the right edge (column 15 first);
//   while draining, G (random) is shifted into the input registers;
//   IS: out = Pin + G * W2 (W2: 16 x M), checked at the right edge N cycles
//       after each psum enters at the left edge.
// The OS/drain/IS sequence follows the document's dataflow; the operand skew
// produced here by the bench is what the staggered banks supply in the top.
module tb_hmix_systolic_array;
  import hmix_pkg::*;
  localparam int NR = 16, K = 24, M = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  pe_ctrl_t ctrl;
  logic signed [7:0]  w_top [NR], i_left [NR];
  logic signed [31:0] p_left [NR], p_right [NR];

  hmix_systolic_array #(.ROWS(NR), .COLS(NR)) dut (.*);

  int X [NR][K], W1 [K][NR], H [NR][NR], G [NR][NR], W2 [NR][M], PIN [NR][M];

  function automatic int r8();
    return int'($urandom_range(255)) - 128;
  endfunction

  initial begin
    ctrl = '0;
    for (int i = 0; i < NR; i++) begin w_top[i] = '0; i_left[i] = '0; p_left[i] = '0; end
    for (int r = 0; r < NR; r++) for (int k = 0; k < K; k++) X[r][k] = r8();
    for (int k = 0; k < K; k++) for (int c = 0; c < NR; c++) W1[k][c] = r8();
    for (int r = 0; r < NR; r++) for (int c = 0; c < NR; c++) begin
      H[r][c] = 0;
      for (int k = 0; k < K; k++) H[r][c] += X[r][k] * W1[k][c];
      G[r][c] = r8();
    end
    for (int c = 0; c < NR; c++) for (int j = 0; j < M; j++) W2[c][j] = r8();
    for (int r = 0; r < NR; r++) for (int j = 0; j < M; j++) PIN[r][j] = int'($urandom_range(2000000)) - 1000000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- OS stream ----
    for (int n = 0; n < K + 2 * NR + 1; n++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) i_left[r] = (n - r >= 0 && n - r < K) ? 8'(X[r][n - r]) : '0;
      for (int c = 0; c < NR; c++) w_top[c]  = (n - c >= 0 && n - c < K) ? 8'(W1[n - c][c]) : '0;
    end
    // ---- drain and hidden load ----
    for (int d = 0; d < NR; d++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (p_right[r] !== 32'(H[r][NR - 1 - d])) begin
          failures++;
          if (failures < 10) $display("FAIL OS row %0d col %0d got %0d exp %0d", r, NR - 1 - d, p_right[r], H[r][NR - 1 - d]);
        end
        i_left[r] = 8'(G[r][NR - 1 - d]);
      end
      for (int c = 0; c < NR; c++) w_top[c] = '0;
      ctrl.drain = 1'b1;
    end
    // ---- IS stream ----
    for (int n = 0; n < M + 2 * NR + 2; n++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        int j;
        j = n - r - 1 - NR;                 // output that must be visible now
        if (j >= 0 && j < M) begin
          int e;
          e = PIN[r][j];
          for (int c = 0; c < NR; c++) e += G[r][c] * W2[c][j];
          checks++;
          if (p_right[r] !== 32'(e)) begin
            failures++;
            if (failures < 10) $display("FAIL IS row %0d out %0d got %0d exp %0d", r, j, p_right[r], e);
          end
        end
      end
      ctrl.drain = 1'b0; ctrl.is_mode = 1'b1;
      for (int c = 0; c < NR; c++) w_top[c]  = (n - c >= 0 && n - c < M) ? 8'(W2[c][n - c]) : '0;
      for (int r = 0; r < NR; r++) p_left[r] = (n - r - 1 >= 0 && n - r - 1 < M) ? 32'(PIN[r][n - r - 1]) : '0;
      for (int r = 0; r < NR; r++) i_left[r] = 8'($urandom);   // must be ignored in IS
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cyc < 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
