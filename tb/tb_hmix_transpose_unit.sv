// tb_hmix_transpose_unit: feeds the unit with bank-staggered data as the
// BRAM banks deliver it (bank k at cycle t holds address t-k) and checks the
// document's permutation rule: after the unit, lane r holds address r of bank
// (t - r), i.e. one column of the stored matrix per cycle, one cycle later.
// Done for the 4-lane example of the document and for 16 lanes, plus the
// identity (channel-mixing) mode.
// The register stage and sync input it relies on are this design's own.
module tb_hmix_transpose_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // tag = {valid, bank[7:0], addr[7:0]}
  logic        permute, sync;
  logic [16:0] din4 [4], dout4 [4];
  logic [16:0] din16 [16], dout16 [16];

  hmix_transpose_unit #(.LANES(4),  .W(17)) u4  (.clk, .rst_n, .permute, .sync, .din(din4),  .dout(dout4));
  hmix_transpose_unit #(.LANES(16), .W(17)) u16 (.clk, .rst_n, .permute, .sync, .din(din16), .dout(dout16));

  task automatic run(int blocks, bit perm);
    for (int t = 0; t < blocks * 16 + 16; t++) begin
      @(negedge clk);
      permute = perm;
      sync    = (t == 0);
      for (int k = 0; k < 16; k++) begin
        int a;
        a = t - k;                               // staggered address of bank k
        din16[k] = (a >= 0 && a < blocks * 16) ? {1'b1, 8'(k), 8'(a)} : '0;
        if (k < 4) begin
          a = t - k;
          din4[k] = (a >= 0 && a < 4) ? {1'b1, 8'(k), 8'(a)} : '0;
        end
      end
      @(posedge clk); #1;
      for (int r = 0; r < 16; r++) begin
        if (dout16[r][16]) begin
          checks++;
          if (perm) begin
            // lane r: address within the block must be r, bank must be (t - r) mod 16
            if (int'(dout16[r][7:0]) % 16 != r || int'(dout16[r][15:8]) != (t - r + 256) % 16) begin
              failures++;
              $display("FAIL16 t=%0d lane %0d got B%0dA%0d", t, r, dout16[r][15:8], dout16[r][7:0]);
            end
          end else if (int'(dout16[r][15:8]) != r) begin
            failures++;
            $display("FAIL16 identity lane %0d got bank %0d", r, dout16[r][15:8]);
          end
        end
      end
      if (perm) for (int r = 0; r < 4; r++) begin
        // Document table, cycle t+1: lane r holds B(t-r) A(r) when valid.
        if (t - r >= 0 && t - r < 4) begin
          checks++;
          if (dout4[r] !== {1'b1, 8'(t - r), 8'(r)}) begin
            failures++;
            $display("FAIL4 cycle %0d R%0d got B%0dA%0d", t + 1, r + 1, dout4[r][15:8], dout4[r][7:0]);
          end
        end
      end
    end
  endtask

  initial begin
    permute = 1'b0; sync = 1'b0;
    for (int k = 0; k < 16; k++) din16[k] = '0;
    for (int k = 0; k < 4; k++) din4[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(3, 1'b1);
    run(2, 1'b0);
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
