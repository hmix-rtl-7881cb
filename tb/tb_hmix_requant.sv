// tb_hmix_requant: random wide inputs and (b, c) pairs; each INT8 output is
// compared with sat8((x * b) >> c) computed here, REQ_LAT = 2 cycles later.
// Multiply-then-shift follows the document; the right shift, saturation and
// 2-cycle latency are this design's choices.
module tb_hmix_requant;
  import hmix_pkg::*;
  typedef logic signed [127:0] big_t;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid, out_valid;
  logic signed [63:0] x;
  logic [15:0] b;
  logic [5:0]  c;
  logic signed [7:0] out;

  hmix_requant dut (.*);

  function automatic int ref_rq(longint xx, int bb, int cc);
    big_t v;
    v = (big_t'(xx) * big_t'(bb)) >>> cc;
    if (v > 127) return 127;
    if (v < -128) return -128;
    return int'(v);
  endfunction

  longint xh [$];
  int     bh [$], ch [$];
  logic   vh [$];

  always @(posedge clk) if (rst_n) begin
    xh.push_back(x); bh.push_back(b); ch.push_back(c); vh.push_back(in_valid);
    if (xh.size() >= REQ_LAT) begin
      longint xx; int bb, cc; logic vv;
      xx = xh.pop_front(); bb = bh.pop_front(); cc = ch.pop_front(); vv = vh.pop_front();
      #1;
      checks++;
      if (out_valid !== vv || int'(out) != ref_rq(xx, bb, cc)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d b=%0d c=%0d got %0d exp %0d", xx, bb, cc, out, ref_rq(xx, bb, cc));
      end
    end
  end

  initial begin
    in_valid = 1'b0; x = '0; b = '0; c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(1) == 1);
      b = 16'($urandom);
      c = 6'($urandom_range(40));
      case (n % 3)
        0: x = longint'($urandom_range(20000)) - 10000;
        1: x = longint'(int'($urandom));
        default: x = {$urandom, $urandom};
      endcase
    end
    repeat (4) @(negedge clk);
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
