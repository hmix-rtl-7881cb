// hmix_top: HMix, an accelerator for quantized (INT8 x INT8 -> INT32)
// MLP-Mixer inference built around one 16 x 16 systolic array.
//
// One start runs one MLP of a mixer layer (token mixing, mode = MIX_TM, or
// channel mixing, mode = MIX_CM) on the activation held in OBRAM:
//   OBRAM -> TU -> LayerNorm -> IBRAM -> TU -> systolic array (OS, layer 1)
//   -> GELU -> REQUANT -> back into the array's input registers
//   -> systolic array (IS, layer 2) with OBRAM -> TU -> SCALE as the incoming
//   psum -> (REQUANT on the last tile) -> TU -> OBRAM.
// The residual addition is folded into the first psum, so OBRAM holds the
// previous output, then the running 32-bit psums, then the new INT8 output;
// a full mixer layer is a TM run followed by a CM run. The activation is
// stored token-major: token p lives in bank p mod 16 at address
// (p/16)*CHANNELS + channel, held as a sign-extended INT8 in a 32-bit word.
// The three transpose units reorder lanes during token mixing so that the
// same single-address, bank-staggered reads also deliver columns.
//
// Host side (the CPU/DRAM are outside this design):
//   * ob_h_*: load the input activation and read results (OBRAM, no stagger,
//     read data one cycle after ob_h_re). Rows of padding tokens
//     (TOKENS..P_PAD-1) must be loaded as zero.
//   * wb_*: write one 16-byte word into all WBRAM banks. Tile h of an MLP goes
//     to half h%2 (base 0 or WHALF): first-layer column n of the tile in bank
//     n at base + k (k over the K inputs), second-layer row n of the tile in
//     bank n at base + K + j (j over the outputs), K = CHANNELS (CM) or P_PAD
//     (TM), padded weights zero. Pulse w_tile_loaded after each tile; a
//     tile's half is free again after w_tile_consumed. Load after start.
//   * qp: offline quantization constants, held stable during a run.
// Interface and memory layout are this design's choices; the dataflow, the
// units and their sizes follow the document.
module hmix_top
  import hmix_pkg::*;
#(
  parameter int unsigned TOKENS    = 196,
  parameter int unsigned CHANNELS  = 768,
  parameter int unsigned TM_HIDDEN = 384,
  parameter int unsigned CM_HIDDEN = 3072,
  parameter int unsigned P_PAD     = ((TOKENS + N - 1) / N) * N,
  parameter int unsigned IB_DEPTH  = (P_PAD / N) * CHANNELS,
  parameter int unsigned WHALF     = (CHANNELS > P_PAD) ? 2 * CHANNELS : 2 * P_PAD,
  parameter int unsigned IB_AW     = $clog2(IB_DEPTH),
  parameter int unsigned WB_AW     = $clog2(2 * WHALF)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  mix_mode_e                mode,
  input  qparams_t                 qp,
  output logic                     busy,
  output logic                     done,
  // weight loading
  input  logic                     wb_we,
  input  logic [WB_AW-1:0]         wb_addr,
  input  logic signed [DATA_W-1:0] wb_wdata [N],
  input  logic                     w_tile_loaded,
  output logic                     w_tile_consumed,
  // activation access
  input  logic                     ob_h_re,
  input  logic [N-1:0]             ob_h_we_mask,
  input  logic [IB_AW-1:0]         ob_h_addr,
  input  logic signed [ACC_W-1:0]  ob_h_wdata [N],
  output logic signed [ACC_W-1:0]  ob_h_rdata [N]
);
  // ---------------- controller ----------------
  logic             ln_ready_all, ln_start, ln_active;
  logic             ib_rd_en, ib_wr_en, ob_rd_en, ob_wr_en, wb_rd_en;
  logic [IB_AW-1:0] ib_rd_addr, ib_wr_addr, ob_rd_addr, ob_wr_addr;
  logic [WB_AW-1:0] wb_rd_addr;
  logic             tm, tu_ib_sync, tu_obo_sync, tu_obi_sync;
  pe_ctrl_t         pe_ctrl;
  logic             gelu_valid, sa_in_hidden, rq_hidden, out_final, scale_bypass;

  hmix_controller #(
    .TOKENS(TOKENS), .CHANNELS(CHANNELS), .TM_HIDDEN(TM_HIDDEN), .CM_HIDDEN(CM_HIDDEN)
  ) u_ctrl (
    .clk, .rst_n, .start, .mode, .w_tile_loaded, .w_tile_consumed, .busy, .done,
    .ln_ready_all, .ln_start, .ln_active,
    .ib_rd_en, .ib_rd_addr, .ib_wr_en, .ib_wr_addr,
    .ob_rd_en, .ob_rd_addr, .ob_wr_en, .ob_wr_addr,
    .wb_rd_en, .wb_rd_addr,
    .tm, .tu_ib_sync, .tu_obo_sync, .tu_obi_sync, .pe_ctrl, .gelu_valid,
    .sa_in_hidden, .rq_hidden, .out_final, .scale_bypass
  );

  // ---------------- memories ----------------
  logic [DATA_W-1:0] ib_rdata [N], ib_wdata [N], ib_zero [N];
  logic              ib_rvalid [N];
  logic [ACC_W-1:0]  ob_rdata [N], ob_wdata [N], ob_hw [N];
  logic              ob_rvalid [N];
  logic [DATA_W-1:0] wb_rdata [N], wb_hw [N], wb_zero [N];
  logic              wb_rvalid [N];

  for (genvar k = 0; k < N; k++) begin : g_cast
    assign ib_zero[k]    = '0;
    assign wb_zero[k]    = '0;
    assign wb_hw[k]      = wb_wdata[k];
    assign ob_hw[k]      = ob_h_wdata[k];
    assign ob_h_rdata[k] = ob_rdata[k];
  end

  hmix_banked_mem #(.NB(N), .W(DATA_W), .DEPTH(IB_DEPTH)) u_ibram (
    .clk, .rst_n,
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rdata(ib_rdata), .rvalid(ib_rvalid),
    .wr_en(ib_wr_en), .wr_addr(ib_wr_addr), .wdata(ib_wdata),
    .h_re(1'b0), .h_we_mask('0), .h_addr('0), .h_wdata(ib_zero)
  );

  hmix_banked_mem #(.NB(N), .W(ACC_W), .DEPTH(IB_DEPTH)) u_obram (
    .clk, .rst_n,
    .rd_en(ob_rd_en), .rd_addr(ob_rd_addr), .rdata(ob_rdata), .rvalid(ob_rvalid),
    .wr_en(ob_wr_en), .wr_addr(ob_wr_addr), .wdata(ob_wdata),
    .h_re(ob_h_re), .h_we_mask(ob_h_we_mask), .h_addr(ob_h_addr), .h_wdata(ob_hw)
  );

  hmix_banked_mem #(.NB(N), .W(DATA_W), .DEPTH(2 * WHALF)) u_wbram (
    .clk, .rst_n,
    .rd_en(wb_rd_en), .rd_addr(wb_rd_addr), .rdata(wb_rdata), .rvalid(wb_rvalid),
    .wr_en(1'b0), .wr_addr('0), .wdata(wb_zero),
    .h_re(1'b0), .h_we_mask({N{wb_we}}), .h_addr(wb_addr), .h_wdata(wb_hw)
  );

  // ---------------- transpose units ----------------
  logic [DATA_W-1:0] tu_ib_out [N];
  logic [ACC_W-1:0]  tu_obo_out [N], tu_obi_in [N];

  hmix_transpose_unit #(.LANES(N), .W(DATA_W)) u_tu_ib (
    .clk, .rst_n, .permute(tm), .sync(tu_ib_sync), .din(ib_rdata), .dout(tu_ib_out));

  hmix_transpose_unit #(.LANES(N), .W(ACC_W)) u_tu_obo (
    .clk, .rst_n, .permute(tm && !ln_active), .sync(tu_obo_sync), .din(ob_rdata),
    .dout(tu_obo_out));

  hmix_transpose_unit #(.LANES(N), .W(ACC_W)) u_tu_obi (
    .clk, .rst_n, .permute(tm), .sync(tu_obi_sync), .din(tu_obi_in), .dout(ob_wdata));

  // ---------------- LayerNorm lanes ----------------
  logic [N-1:0] ln_ready;
  logic         ln_valid_q [N];
  assign ln_ready_all = &ln_ready;

  for (genvar r = 0; r < N; r++) begin : g_ln
    logic ln_out_valid;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) ln_valid_q[r] <= 1'b0;
      else        ln_valid_q[r] <= ob_rvalid[r] && ln_active;
    end
    hmix_layernorm #(.CH(CHANNELS)) u_ln (
      .clk, .rst_n, .start(ln_start), .in_valid(ln_valid_q[r]),
      .in_q(tu_obo_out[r][DATA_W-1:0]), .recip_sh(qp.ln_recip_sh), .out_sh(qp.ln_out_sh),
      .stats_ready(ln_ready[r]), .out_valid(ln_out_valid), .out_q(ib_wdata[r]));
  end

  // ---------------- systolic array ----------------
  logic signed [DATA_W-1:0] w_top [N], i_left [N], hid [N];
  logic signed [ACC_W-1:0]  p_left [N], p_right [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int c = 0; c < N; c++) w_top[c] <= '0;
    else        for (int c = 0; c < N; c++) w_top[c] <= wb_rdata[c];
  end

  for (genvar r = 0; r < N; r++) begin : g_edge
    assign i_left[r] = sa_in_hidden ? hid[r] : tu_ib_out[r];
  end

  hmix_systolic_array #(.ROWS(N), .COLS(N)) u_sa (
    .clk, .rst_n, .ctrl(pe_ctrl), .w_top, .i_left, .p_left, .p_right);

  // ---------------- row-output units: GELU, REQUANT, SCALE ----------------
  for (genvar r = 0; r < N; r++) begin : g_lane
    logic                     g_valid, rq_valid;
    logic signed [WIDE_W-1:0] g_out, rq_in;
    logic signed [ACC_W-1:0]  raw_d [REQ_LAT];

    hmix_gelu u_gelu (
      .clk, .rst_n, .in_valid(gelu_valid), .q(p_right[r]),
      .qb(qp.gelu_qb), .qc(qp.gelu_qc), .q1(qp.gelu_q1), .qclip(qp.gelu_qclip),
      .out_valid(g_valid), .out(g_out));

    assign rq_in = rq_hidden ? g_out : WIDE_W'(p_right[r]);

    hmix_requant u_rq (
      .clk, .rst_n, .in_valid(rq_hidden ? g_valid : 1'b1), .x(rq_in),
      .b(rq_hidden ? qp.rq_hid_b : qp.rq_out_b), .c(rq_hidden ? qp.rq_hid_c : qp.rq_out_c),
      .out_valid(rq_valid), .out(hid[r]));

    // Non-final tiles write the raw psum, delayed to match REQUANT.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) for (int i = 0; i < REQ_LAT; i++) raw_d[i] <= '0;
      else begin
        raw_d[0] <= p_right[r];
        for (int i = 1; i < REQ_LAT; i++) raw_d[i] <= raw_d[i-1];
      end
    end
    assign tu_obi_in[r] = out_final ? ACC_W'(hid[r]) : raw_d[REQ_LAT-1];

    hmix_scale u_scale (
      .clk, .rst_n, .bypass(scale_bypass), .din(tu_obo_out[r]),
      .b(qp.sc_b), .c(qp.sc_c), .dout(p_left[r]));
  end
endmodule
