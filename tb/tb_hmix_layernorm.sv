// tb_hmix_layernorm: runs rows of 32 random INT8 values (plus a constant
// row, whose deviation is zero) through one LayerNorm lane, feeding pass 1,
// waiting for stats_ready, feeding pass 2, and compares each output with the
// integer formula evaluated here (floor square root found by search). The
// pass-2 latency of LN_LAT = 2 cycles is checked too.
// The reference follows the document's one-pass statistics and scaled
// reciprocal; the square-root and division circuits, the output shift and
// the latencies are this design's own.
module tb_hmix_layernorm;
  import hmix_pkg::*;
  typedef logic signed [127:0] big_t;
  localparam int CH = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic start, in_valid, stats_ready, out_valid;
  logic signed [7:0] in_q, out_q;
  logic [4:0] recip_sh;
  logic [5:0] out_sh;

  hmix_layernorm #(.CH(CH)) dut (.*);

  int row [CH];
  int expq [$];
  int lat_seen [$];

  function automatic longint isqrt_ref(longint d);
    longint s;
    s = 0;
    while ((s + 1) * (s + 1) <= d) s++;
    return s;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = expq.pop_front();
    checks++;
    if (int'(out_q) != e) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d exp %0d", out_q, e);
    end
  end

  task automatic do_row(bit constant);
    longint s1, s2, d, sg, rc;
    s1 = 0; s2 = 0;
    for (int c = 0; c < CH; c++) begin
      row[c] = constant ? 17 : int'($urandom_range(255)) - 128;
      s1 += row[c]; s2 += row[c] * row[c];
    end
    d  = CH * s2 - s1 * s1;
    sg = isqrt_ref(d);
    rc = (sg == 0) ? 64'h1_FFFF_FFFF : ((longint'(2) << recip_sh) / sg);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    for (int c = 0; c < CH; c++) begin
      @(negedge clk); in_valid = ($urandom_range(3) != 0); in_q = 8'(row[c]);
      if (!in_valid) begin c--; end
    end
    @(negedge clk); in_valid = 1'b0;
    while (!stats_ready) @(negedge clk);
    for (int c = 0; c < CH; c++) begin
      big_t v;
      v = (big_t'(CH * row[c] - s1) * big_t'(rc)) >>> out_sh;
      expq.push_back(v > 127 ? 127 : (v < -128 ? -128 : int'(v)));
    end
    for (int c = 0; c < CH; c++) begin
      int t0;
      in_valid = 1'b1; in_q = 8'(row[c]);
      t0 = cyc;
      @(negedge clk);
      in_valid = 1'b0;
      // out_valid must rise exactly LN_LAT cycles after the input beat
      repeat (LN_LAT - 1) begin
        checks++;
        if (out_valid) begin failures++; $display("FAIL early output"); end
        @(negedge clk);
      end
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no output after %0d cycles", LN_LAT); end
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    start = 1'b0; in_valid = 1'b0; in_q = '0; recip_sh = 5'd20; out_sh = 6'd16;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      recip_sh = 5'(16 + n % 6); out_sh = 6'(12 + n % 6);
      do_row(n == 7);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cyc < 50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
