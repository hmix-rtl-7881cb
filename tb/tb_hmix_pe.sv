// tb_hmix_pe: checks one processing element in its three behaviours (OS
// accumulate, OS drain/shift, IS psum forwarding) against a cycle model of
// the registers kept in the bench, with random operands.
// The three behaviours follow the document's PE; register reset and the
// exact cycle of each transfer are this design's own.
module tb_hmix_pe;
  import hmix_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  pe_ctrl_t ctrl;
  logic signed [7:0]  w_in, i_in, w_out, i_out;
  logic signed [31:0] p_in, p_out;
  int checks = 0, failures = 0, cyc = 0;

  hmix_pe dut (.*);

  // bench model of the PE registers
  int mw, mi, mp;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    ctrl = '0; w_in = '0; i_in = '0; p_in = '0;
    mw = 0; mi = 0; mp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      int sel;
      @(negedge clk);
      sel = n / 200;               // 0: OS accumulate, 1: mixed OS/drain, 2: IS
      ctrl.is_mode = (sel == 2);
      ctrl.drain   = (sel == 1) && ($urandom_range(1) == 1);
      w_in = 8'($urandom); i_in = 8'($urandom); p_in = 32'($urandom_range(100000)) - 50000;
      // model update at the coming edge
      if (ctrl.is_mode)    mp = p_in + mw * mi;
      else if (ctrl.drain) mp = p_in;
      else                 mp = mp + mw * mi;
      if (!ctrl.is_mode) mi = i_in;
      mw = w_in;
      @(posedge clk); #1;
      checks++;
      if (p_out !== 32'(mp) || w_out !== 8'(mw) || i_out !== 8'(mi)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d p %0d/%0d w %0d/%0d i %0d/%0d", n, p_out, mp, w_out, mw, i_out, mi);
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
