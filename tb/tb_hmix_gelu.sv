// tb_hmix_gelu: random accumulator values (small, near the clip limit and
// full range) through one I-GELU lane; each output is compared with the
// algorithm evaluated here in 128-bit integers, GELU_LAT = 3 cycles after its
// input, with out_valid following in_valid.
// The reference follows the document's integer GELU steps; the 64-bit
// saturation and the 3-cycle latency it checks are this design's choices.
module tb_hmix_gelu;
  import hmix_pkg::*;
  typedef logic signed [127:0] big_t;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid, out_valid;
  logic signed [31:0] q, qb;
  logic signed [63:0] qc, q1, out;
  logic [31:0] qclip;

  hmix_gelu dut (.*);

  function automatic big_t ref_gelu(int x);
    big_t a, t, l, e, o;
    a = (x < 0) ? -big_t'(x) : big_t'(x);
    if (a > big_t'(qclip)) a = big_t'(qclip);
    t = a + big_t'(qb);
    l = t * t + big_t'(qc);
    e = (x < 0) ? -l : l;
    o = big_t'(x) * (e + big_t'(q1));
    if (o > big_t'(64'sh7FFF_FFFF_FFFF_FFFF)) o = big_t'(64'sh7FFF_FFFF_FFFF_FFFF);
    if (o < big_t'(64'sh8000_0000_0000_0000)) o = big_t'(64'sh8000_0000_0000_0000);
    return o;
  endfunction

  int   qhist [$];
  logic vhist [$];

  always @(posedge clk) if (rst_n) begin
    qhist.push_back(q); vhist.push_back(in_valid);
    if (qhist.size() >= GELU_LAT) begin
      int   qq;
      logic vv;
      qq = qhist.pop_front(); vv = vhist.pop_front();
      #1;
      checks++;
      if (out_valid !== vv || (vv && out !== 64'(ref_gelu(qq)))) begin
        failures++;
        if (failures < 10) $display("FAIL q=%0d got %0d exp %0d v %0b/%0b", qq, out, 64'(ref_gelu(qq)), out_valid, vv);
      end
    end
  end

  initial begin
    in_valid = 1'b0; q = '0;
    qb = -1769; qclip = 1769; qc = -3000000; q1 = 3200000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      case (n % 3)
        0: q = int'($urandom_range(4000)) - 2000;
        1: q = int'($urandom_range(200000)) - 100000;
        default: q = int'($urandom);
      endcase
      if (n == 1500) begin
        // constants are static during a run: drain the pipeline, then change
        in_valid = 1'b0;
        repeat (GELU_LAT + 1) @(negedge clk);
        qb = -300; qclip = 300; qc = -45000; q1 = 50000;
      end
    end
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cyc < 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
