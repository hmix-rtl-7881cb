// tb_hmix_scale: checks the residual rescaling (b * o) >> c of the INT8 word
// and the psum bypass, one cycle after the input, with random data.
// The rescaling of the first psum set follows the document; the bypass
// select, the right shift and the 1-cycle latency are this design's choices.
module tb_hmix_scale;
  import hmix_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic bypass;
  logic signed [31:0] din, dout;
  logic [15:0] b;
  logic [5:0]  c;

  hmix_scale dut (.*);

  initial begin
    bypass = 1'b0; din = '0; b = '0; c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      int expv;
      @(negedge clk);
      bypass = ($urandom_range(3) == 0);
      b = 16'($urandom);
      c = 6'($urandom_range(20));
      din = bypass ? int'($urandom) : int'($urandom_range(255)) - 128;
      if (bypass) expv = din;
      else        expv = int'((longint'(din) * longint'(b)) >>> c);
      @(posedge clk); #1;
      checks++;
      if (dout !== 32'(expv)) begin
        failures++;
        if (failures < 10) $display("FAIL din=%0d b=%0d c=%0d byp=%0b got %0d exp %0d", din, b, c, bypass, dout, expv);
      end
    end
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
