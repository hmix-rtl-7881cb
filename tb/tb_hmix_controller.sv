// tb_hmix_controller: runs the sequencer alone (32 tokens, 32 channels,
// hidden 32 for both MLPs) for a token-mixing and then a channel-mixing MLP,
// with the LayerNorm lanes modelled by a delayed ready and the weight tiles
// acknowledged by the bench. It checks, against address formulas written
// here, every IBRAM read of the OS streams (token-mixing layout (s/16)*C +
// g*16 + s%16, channel-mixing layout g*C + s), the LayerNorm read order, the
// IBRAM and OBRAM write addresses (the read addresses delayed by the
// datapath latency), the WBRAM half used by each tile, the SCALE/bypass and
// final-REQUANT selection per tile, that streams never pause, and the number
// of phases and tile handshakes.
// The single staggered address per memory follows the document; the loop order,
// the address layout and the latencies checked here are this design's own.
module tb_hmix_controller;
  import hmix_pkg::*;
  localparam int T = 32, C = 32, HT = 32, HC = 32, NG = 2, NT = 2;
  localparam int IB_AW = 6, WB_AW = 7, WHALF = 64;
  localparam int LN_DLY = MEM_LAT + TU_LAT + LN_LAT;
  localparam int IS_DLY = MEM_LAT + TU_LAT + SCALE_LAT + N + REQ_LAT + TU_LAT;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic start, w_tile_loaded, w_tile_consumed, busy, done;
  mix_mode_e mode;
  logic ln_ready_all, ln_start, ln_active;
  logic ib_rd_en, ib_wr_en, ob_rd_en, ob_wr_en, wb_rd_en;
  logic [IB_AW-1:0] ib_rd_addr, ib_wr_addr, ob_rd_addr, ob_wr_addr;
  logic [WB_AW-1:0] wb_rd_addr;
  logic tm, tu_ib_sync, tu_obo_sync, tu_obi_sync;
  pe_ctrl_t pe_ctrl;
  logic gelu_valid, sa_in_hidden, rq_hidden, out_final, scale_bypass;

  hmix_controller #(.TOKENS(T), .CHANNELS(C), .TM_HIDDEN(HT), .CM_HIDDEN(HC)) dut (.*);

  bit cur_tm;
  int os_phase = 0, is_phase = 0, ln_reads = 0, os_idx = 0, is_idx = 0, consumed = 0, dones = 0;
  int ln_wait = 0;
  logic prev_ib_rd = 0, prev_wb_is = 0;
  logic [IB_AW:0] ob_hist [$], ib_hist [$];

  function automatic int act(bit t, int g, int s);
    return t ? (s / 16) * C + g * 16 + (s % 16) : g * C + s;
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL [%0d] %s", cyc, msg); end
  endtask

  // LayerNorm lanes: ready some cycles after pass 1 ended.
  always @(posedge clk) begin
    if (!ln_active || ln_start) ln_wait <= 0;
    else if (!ob_rd_en || ln_wait > 0) ln_wait <= ln_wait + 1;
  end
  assign ln_ready_all = (ln_wait > 40);

  always @(posedge clk) if (rst_n) begin
    int g, h;
    // OS stream: contiguous, formula addresses, WBRAM half of the tile
    if (ib_rd_en) begin
      g = os_phase % NG; h = os_phase / NG;
      chk(int'(ib_rd_addr) == act(cur_tm, g, os_idx), $sformatf("OS addr %0d exp %0d", ib_rd_addr, act(cur_tm, g, os_idx)));
      chk(wb_rd_en && int'(wb_rd_addr) == (h % 2) * WHALF + os_idx, "OS weight address");
      os_idx <= os_idx + 1;
    end else if (prev_ib_rd) begin
      chk(os_idx == (cur_tm ? T : C), $sformatf("OS stream length %0d", os_idx));
      os_phase <= os_phase + 1; os_idx <= 0;
    end
    prev_ib_rd <= ib_rd_en;
    // IS stream
    if (pe_ctrl.is_mode && wb_rd_en) begin
      g = is_phase % NG; h = is_phase / NG;
      chk(ob_rd_en && int'(ob_rd_addr) == act(cur_tm, g, is_idx), "IS psum read address");
      chk(int'(wb_rd_addr) == (h % 2) * WHALF + (cur_tm ? T : C) + is_idx, "IS weight address");
      chk(scale_bypass == (h != 0), "SCALE/bypass select");
      chk(out_final == (h == NT - 1), "final REQUANT select");
      is_idx <= is_idx + 1;
    end else if (prev_wb_is) begin
      is_phase <= is_phase + 1; is_idx <= 0;
    end
    prev_wb_is <= pe_ctrl.is_mode && wb_rd_en;
    // LayerNorm reads are row-major per token group
    if (ln_active && ob_rd_en) begin
      chk(int'(ob_rd_addr) == ln_reads % (2 * C) % C + (ln_reads / (2 * C)) * C, "LN read address");
      ln_reads <= ln_reads + 1;
    end
    // write addresses trail the read addresses by the datapath latency
    ob_hist.push_back({ob_rd_en && pe_ctrl.is_mode, ob_rd_addr});
    ib_hist.push_back({ob_rd_en && int'(dut.state) == 3, ob_rd_addr});  // pass 2
    if (ob_hist.size() > IS_DLY) begin
      logic [IB_AW:0] e;
      e = ob_hist.pop_front();
      if (e[IB_AW] || ob_wr_en) chk({ob_wr_en, ob_wr_addr} == e, "OBRAM write address/latency");
    end
    if (ib_hist.size() > LN_DLY) begin
      logic [IB_AW:0] e;
      e = ib_hist.pop_front();
      if (e[IB_AW] || ib_wr_en) chk({ib_wr_en, ib_wr_addr} == e, "IBRAM write address/latency");
    end
    if (w_tile_consumed) consumed <= consumed + 1;
    if (done) dones <= dones + 1;
  end

  task automatic run(bit t);
    cur_tm = t;
    @(negedge clk);
    mode = t ? MIX_TM : MIX_CM; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int h = 0; h < NT; h++) begin
      repeat (5) @(negedge clk);
      w_tile_loaded = 1'b1;
      @(negedge clk);
      w_tile_loaded = 1'b0;
    end
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    os_phase = 0; is_phase = 0; ln_reads = 0;
  endtask

  initial begin
    start = 1'b0; w_tile_loaded = 1'b0; mode = MIX_TM;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1'b1);
    chk(consumed == NT, "tiles consumed after TM");
    run(1'b0);
    chk(consumed == 2 * NT, "tiles consumed after CM");
    chk(dones == 2, "done pulses");
    chk(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    while (cyc < 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
