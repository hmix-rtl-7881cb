// Shared body of the end-to-end HMix testbenches. The including module
// declares localparams TOKENS, CHANNELS, TM_HIDDEN, CM_HIDDEN, LAYERS and
// MAX_CYCLES, the size-dependent shifts RQ_HID_C and RQ_OUT_C and the
// residual multiplier SC_B, then instantiates hmix_top as "dut" on the signals below.
//
// The bench loads a random INT8 activation into OBRAM and runs LAYERS mixer
// layers, each a token-mixing MLP followed by a channel-mixing MLP on the
// result left in OBRAM by the previous one. It streams every weight tile in while the previous one is being used,
// and after every layer compares the OBRAM contents with a reference model written here
// directly from the integer algorithms (LayerNorm, I-GELU, REQUANT, SCALE,
// residual). It also counts how often each mechanism of the design was
// exercised and fails if one never was.
// The reference model follows the document's arithmetic; padding, layout,
// constants and the mechanism counters are this design's own.

localparam int unsigned NN    = hmix_pkg::N;
localparam int unsigned PP    = ((TOKENS + NN - 1) / NN) * NN;
localparam int unsigned WH    = (CHANNELS > PP) ? 2 * CHANNELS : 2 * PP;
localparam int unsigned AWI   = $clog2((PP / NN) * CHANNELS);
localparam int unsigned AWW   = $clog2(2 * WH);

logic clk = 1'b0;
logic rst_n = 1'b0;
always #5 clk = ~clk;

logic                      start = 1'b0;
hmix_pkg::mix_mode_e       mode = hmix_pkg::MIX_TM;
hmix_pkg::qparams_t        qp;
logic                      busy, done;
logic                      wb_we = 1'b0;
logic [AWW-1:0]            wb_addr = '0;
logic signed [7:0]         wb_wdata [NN];
logic                      w_tile_loaded = 1'b0;
logic                      w_tile_consumed;
logic                      ob_h_re = 1'b0;
logic [NN-1:0]             ob_h_we_mask = '0;
logic [AWI-1:0]            ob_h_addr = '0;
logic signed [31:0]        ob_h_wdata [NN];
logic signed [31:0]        ob_h_rdata [NN];

int checks = 0, failures = 0;
longint cycles = 0;
always @(posedge clk) cycles <= cycles + 1;

// ---------------- reference model ----------------
typedef logic signed [127:0] big_t;
int X   [PP][CHANNELS];     // activation, INT8 values
int LNY [PP][CHANNELS];     // LayerNorm output
int W1t [][];               // per MLP: [K][HID]
int W2t [][];               // per MLP: [HID][K]

function automatic int sat8i(big_t v);
  if (v > 127) return 127;
  if (v < -128) return -128;
  return int'(v);
endfunction

function automatic longint isqrt_ref(longint d);
  longint s;
  if (d <= 0) return 0;
  s = longint'($sqrt(real'(d)));
  while (s * s > d) s--;
  while ((s + 1) * (s + 1) <= d) s++;
  return s;
endfunction

function automatic big_t gelu_ref(int q);
  big_t a, t, l, e, o;
  a = (q < 0) ? -big_t'(q) : big_t'(q);
  if (a > big_t'(qp.gelu_qclip)) a = big_t'(qp.gelu_qclip);
  t = a + big_t'(qp.gelu_qb);
  l = t * t + big_t'(qp.gelu_qc);
  e = (q < 0) ? -l : l;
  o = big_t'(q) * (e + big_t'(qp.gelu_q1));
  if (o > big_t'(64'sh7FFF_FFFF_FFFF_FFFF)) o = big_t'(64'sh7FFF_FFFF_FFFF_FFFF);
  if (o < big_t'(64'sh8000_0000_0000_0000)) o = big_t'(64'sh8000_0000_0000_0000);
  return o;
endfunction

function automatic int requant_ref(big_t x, int b, int c);
  return sat8i((x * big_t'(b)) >>> c);
endfunction

function automatic int scale_ref(int o);
  big_t v;
  v = (big_t'(o) * big_t'(qp.sc_b)) >>> qp.sc_c;
  return int'(v[31:0]);
endfunction

task automatic ref_layernorm();
  for (int p = 0; p < PP; p++) begin
    longint s1, s2, d, sg, rc;
    s1 = 0; s2 = 0;
    for (int c = 0; c < CHANNELS; c++) begin s1 += X[p][c]; s2 += X[p][c] * X[p][c]; end
    d  = longint'(CHANNELS) * s2 - s1 * s1;
    sg = isqrt_ref(d);
    rc = (sg == 0) ? 64'h1_FFFF_FFFF : ((longint'(2) << qp.ln_recip_sh) / sg);
    for (int c = 0; c < CHANNELS; c++)
      LNY[p][c] = sat8i((big_t'(longint'(CHANNELS) * X[p][c] - s1) * big_t'(rc)) >>> qp.ln_out_sh);
  end
endtask

// One MLP on the reference activation. tm selects token mixing.
task automatic ref_mlp(bit tm, int hid);
  int rows, kk, h_sat;
  int a [][];
  int ps [][];
  h_sat = 0;
  rows = tm ? CHANNELS : PP;
  kk   = tm ? PP : CHANNELS;
  ref_layernorm();
  a  = new[rows];
  ps = new[rows];
  foreach (a[r]) begin
    a[r]  = new[kk];
    ps[r] = new[kk];
    for (int k = 0; k < kk; k++) begin
      a[r][k]  = tm ? LNY[k][r] : LNY[r][k];
      ps[r][k] = scale_ref(tm ? X[k][r] : X[r][k]);
    end
  end
  for (int r = 0; r < rows; r++) begin
    int g [];
    g = new[hid];
    for (int n = 0; n < hid; n++) begin
      int acc;
      acc = 0;
      for (int k = 0; k < kk; k++) acc += a[r][k] * W1t[k][n];
      g[n] = requant_ref(gelu_ref(acc), qp.rq_hid_b, qp.rq_hid_c);
      if (g[n] == 127 || g[n] == -128) h_sat++;
    end
    for (int j = 0; j < kk; j++) begin
      int acc;
      acc = ps[r][j];
      for (int n = 0; n < hid; n++) acc += g[n] * W2t[n][j];
      ps[r][j] = requant_ref(big_t'(acc), qp.rq_out_b, qp.rq_out_c);
    end
  end
  for (int r = 0; r < rows; r++)
    for (int k = 0; k < kk; k++)
      if (tm) X[k][r] = ps[r][k]; else X[r][k] = ps[r][k];
  $display("%s MLP: %0d of %0d hidden values saturated", tm ? "TM" : "CM", h_sat, rows * hid);
  checks++;
  if (4 * h_sat > rows * hid) begin failures++; $display("FAIL: hidden layer degenerate"); end
endtask

function automatic int rnd_w();
  return int'($urandom_range(15)) - 8;
endfunction

// Random weights for one MLP; padding tokens get zero weights.
task automatic make_weights(bit tm, int hid);
  int kk;
  kk  = tm ? PP : CHANNELS;
  W1t = new[kk];
  W2t = new[hid];
  foreach (W1t[k]) begin
    W1t[k] = new[hid];
    foreach (W1t[k][n]) W1t[k][n] = (tm && k >= TOKENS) ? 0 : rnd_w();
  end
  foreach (W2t[n]) begin
    W2t[n] = new[kk];
    foreach (W2t[n][j]) W2t[n][j] = (tm && j >= TOKENS) ? 0 : rnd_w();
  end
endtask

// ---------------- mechanism counters ----------------
int n_consumed = 0;
int m_permute = 0, m_drain = 0, m_os_to_is = 0, m_scale = 0, m_bypass = 0;
int m_final = 0, m_ln_pass2 = 0, m_load_overlap = 0, m_stall = 0;
int os_len = 0;
int prev_state = 0;
// Controller state encoding (order of its state enum).
localparam int ST_OS = 5, ST_DRAIN = 6, ST_IS = 7;

always @(posedge clk) begin
  if (w_tile_consumed) n_consumed <= n_consumed + 1;
  if (rst_n) begin
    int st;
    st = int'(dut.u_ctrl.state);
    if (dut.u_ctrl.tm && dut.tu_ib_sync) m_permute <= m_permute + 1;
    if (dut.pe_ctrl.drain) m_drain <= m_drain + 1;
    if (prev_state == ST_DRAIN && st == ST_IS) m_os_to_is <= m_os_to_is + 1;
    if (dut.ob_wr_en && !dut.scale_bypass && st == ST_IS) m_scale <= m_scale + 1;
    if (dut.ob_wr_en && dut.scale_bypass && !dut.out_final) m_bypass <= m_bypass + 1;
    if (dut.ob_wr_en && dut.out_final) m_final <= m_final + 1;
    if (dut.ib_wr_en) m_ln_pass2 <= m_ln_pass2 + 1;
    if (wb_we && (st == ST_OS || st == ST_IS)) m_load_overlap <= m_load_overlap + 1;
    // Stall check: an OS stream must issue one address every cycle.
    if (st == ST_OS) begin
      os_len <= os_len + 1;
      if (dut.u_ctrl.issuing && !dut.ib_rd_en) m_stall <= m_stall + 1;
    end else if (prev_state == ST_OS) begin
      checks++;
      if (os_len != int'(dut.u_ctrl.len_k) + 2 * NN + 2) begin
        failures++;
        $display("FAIL: OS phase took %0d cycles, expected %0d", os_len, int'(dut.u_ctrl.len_k) + 2 * NN + 2);
      end
      os_len <= 0;
    end
    prev_state <= st;
  end
end

// ---------------- host tasks ----------------
task automatic load_activation();
  for (int p = 0; p < PP; p++)
    for (int c = 0; c < CHANNELS; c++) begin
      @(negedge clk);
      ob_h_we_mask = '0;
      ob_h_we_mask[p % NN] = 1'b1;
      ob_h_addr = AWI'((p / NN) * CHANNELS + c);
      for (int k = 0; k < NN; k++) ob_h_wdata[k] = X[p][c];
    end
  @(negedge clk);
  ob_h_we_mask = '0;
endtask

task automatic load_tile(bit tm, int h);
  int kk, base;
  kk   = tm ? PP : CHANNELS;
  base = (h % 2) * WH;
  for (int k = 0; k < kk; k++) begin
    @(negedge clk);
    wb_we = 1'b1; wb_addr = AWW'(base + k);
    for (int n = 0; n < NN; n++) wb_wdata[n] = 8'(W1t[k][h * NN + n]);
  end
  for (int j = 0; j < kk; j++) begin
    @(negedge clk);
    wb_we = 1'b1; wb_addr = AWW'(base + kk + j);
    for (int n = 0; n < NN; n++) wb_wdata[n] = 8'(W2t[h * NN + n][j]);
  end
  @(negedge clk);
  wb_we = 1'b0;
  w_tile_loaded = 1'b1;
  @(negedge clk);
  w_tile_loaded = 1'b0;
endtask

task automatic run_mlp(bit tm, int hid);
  int base_consumed;
  make_weights(tm, hid);
  @(negedge clk);
  mode  = tm ? hmix_pkg::MIX_TM : hmix_pkg::MIX_CM;
  start = 1'b1;
  @(negedge clk);
  start = 1'b0;
  base_consumed = n_consumed;
  for (int h = 0; h < hid / NN; h++) begin
    // Half h%2 is free once tile h-2 has been consumed.
    while (h >= 2 && n_consumed - base_consumed < h - 1) @(negedge clk);
    load_tile(tm, h);
  end
  while (!done) @(negedge clk);
  ref_mlp(tm, hid);
endtask

task automatic compare_obram(string tag);
  int bad, n_sat, n_zero;
  bad = 0; n_sat = 0; n_zero = 0;
  // The constants must keep the outputs spread over the INT8 range, or the
  // comparison would say little: count saturated and zero outputs.
  for (int p = 0; p < TOKENS; p++)
    for (int c = 0; c < CHANNELS; c++) begin
      if (X[p][c] == 127 || X[p][c] == -128) n_sat++;
      if (X[p][c] == 0) n_zero++;
    end
  $display("%s: %0d of %0d outputs saturated, %0d zero", tag, n_sat, TOKENS * CHANNELS, n_zero);
  checks++;
  if (4 * n_sat > TOKENS * CHANNELS || 4 * n_zero > TOKENS * CHANNELS) begin
    failures++; $display("FAIL %s: outputs degenerate", tag);
  end
  for (int a = 0; a < (PP / NN) * CHANNELS; a++) begin
    @(negedge clk);
    ob_h_re = 1'b1; ob_h_addr = AWI'(a);
    @(negedge clk);
    ob_h_re = 1'b0;
    for (int k = 0; k < NN; k++) begin
      int p, c;
      p = (a / CHANNELS) * NN + k;
      c = a % CHANNELS;
      checks++;
      if (ob_h_rdata[k] !== 32'(X[p][c])) begin
        failures++;
        if (bad < 10) $display("FAIL %s: token %0d channel %0d got %0d expected %0d",
                               tag, p, c, ob_h_rdata[k], X[p][c]);
        bad++;
      end
    end
  end
endtask

task automatic check_mech(string name, int n);
  checks++;
  $display("mechanism %-28s %0d", name, n);
  if (n == 0) begin failures++; $display("FAIL: mechanism %s never exercised", name); end
endtask

initial begin
  for (int k = 0; k < NN; k++) begin wb_wdata[k] = '0; ob_h_wdata[k] = '0; end
  qp = '0;
  qp.gelu_qb = -300; qp.gelu_qclip = 300; qp.gelu_qc = -45000; qp.gelu_q1 = 50000;
  qp.rq_hid_b = 3;  qp.rq_hid_c = 6'(RQ_HID_C);
  qp.rq_out_b = 1;  qp.rq_out_c = 6'(RQ_OUT_C);
  qp.sc_b = 16'(SC_B); qp.sc_c = 2;
  qp.ln_recip_sh = 20; qp.ln_out_sh = 16;
  for (int p = 0; p < PP; p++)
    for (int c = 0; c < CHANNELS; c++)
      X[p][c] = (p < TOKENS) ? int'($urandom_range(60)) - 30 : 0;
  repeat (3) @(negedge clk);
  rst_n = 1'b1;
  load_activation();
  for (int l = 0; l < LAYERS; l++) begin
    run_mlp(1'b1, TM_HIDDEN);
    run_mlp(1'b0, CM_HIDDEN);
    compare_obram($sformatf("mixer layer %0d", l));
  end
  check_mech("TU permutation (TM)", m_permute);
  check_mech("OS drain shifts", m_drain);
  check_mech("OS to IS switches", m_os_to_is);
  check_mech("residual SCALE writes", m_scale);
  check_mech("psum bypass writes", m_bypass);
  check_mech("final REQUANT writes", m_final);
  check_mech("LayerNorm writes", m_ln_pass2);
  check_mech("weight load overlap cycles", m_load_overlap);
  checks++;
  if (m_stall != 0) begin failures++; $display("FAIL: %0d stalled OS cycles", m_stall); end
  $display("cycles %0d", cycles);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

initial begin
  while (cycles < MAX_CYCLES) @(posedge clk);
  failures++;
  $display("FAIL: watchdog after %0d cycles", cycles);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
