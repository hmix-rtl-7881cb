// tb_hmix_banked_mem: fills a 4-bank memory through the host port, then
// checks that one staggered read address gives bank k its word k+1 cycles
// later (zero and not valid elsewhere), that a staggered write lands in bank
// k k cycles after the address, and host reads of all banks at one address.
// The bank stagger it checks is the document's; the host-port priority it
// checks is this design's own choice.
module tb_hmix_banked_mem;
  localparam int NB = 4, W = 16, DEPTH = 64, AW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          rd_en, wr_en, h_re;
  logic [AW-1:0] rd_addr, wr_addr, h_addr;
  logic [NB-1:0] h_we_mask;
  logic [W-1:0]  rdata [NB], wdata [NB], h_wdata [NB];
  logic          rvalid [NB];

  hmix_banked_mem #(.NB(NB), .W(W), .DEPTH(DEPTH)) dut (.*);

  logic [W-1:0] model [NB][DEPTH];

  function automatic logic [W-1:0] pat(int k, int a, int s);
    return W'(k * 4096 + a * 37 + s);
  endfunction

  initial begin
    rd_en = 0; wr_en = 0; h_re = 0; rd_addr = '0; wr_addr = '0; h_addr = '0; h_we_mask = '0;
    for (int k = 0; k < NB; k++) begin wdata[k] = '0; h_wdata[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // host fill, all banks at once
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      h_we_mask = '1; h_addr = AW'(a);
      for (int k = 0; k < NB; k++) begin h_wdata[k] = pat(k, a, 0); model[k][a] = pat(k, a, 0); end
    end
    @(negedge clk); h_we_mask = '0;
    // staggered read of addresses 10..19
    for (int t = 0; t < 10 + NB + 1; t++) begin
      @(negedge clk);
      rd_en = (t < 10); rd_addr = AW'(10 + t);
      @(posedge clk); #1;
      for (int k = 0; k < NB; k++) begin
        int a;
        a = t - k;                       // data visible now was issued at t-k
        checks++;
        if (a >= 0 && a < 10) begin
          if (!rvalid[k] || rdata[k] !== model[k][10 + a]) begin
            failures++; $display("FAIL read t=%0d bank %0d got %h exp %h", t, k, rdata[k], model[k][10 + a]);
          end
        end else if (rvalid[k] || rdata[k] !== '0) begin
          failures++; $display("FAIL idle bank %0d t=%0d not zero", k, t);
        end
      end
    end
    // staggered write of addresses 30..37, bank k data presented k cycles late
    for (int t = 0; t < 8 + NB; t++) begin
      @(negedge clk);
      rd_en = 1'b0;
      wr_en = (t < 8); wr_addr = AW'(30 + t);
      for (int k = 0; k < NB; k++) begin
        int a;
        a = t - k;
        wdata[k] = (a >= 0 && a < 8) ? pat(k, 30 + a, 5) : W'(16'hdead);
        if (a >= 0 && a < 8) model[k][30 + a] = pat(k, 30 + a, 5);
      end
    end
    @(negedge clk); wr_en = 1'b0;
    repeat (NB) @(negedge clk);
    // host read back of everything
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); h_re = 1'b1; h_addr = AW'(a);
      @(posedge clk); #1;
      for (int k = 0; k < NB; k++) begin
        checks++;
        if (rdata[k] !== model[k][a]) begin
          failures++; if (failures < 10) $display("FAIL host read bank %0d addr %0d got %h exp %h", k, a, rdata[k], model[k][a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cyc < 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
