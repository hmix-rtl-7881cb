// hmix_controller: sequencer and address generation unit (AGU) of HMix.
//
// Runs one MLP of a mixer layer (token mixing or channel mixing) on the data
// in OBRAM and leaves the result, residual included, in OBRAM as INT8:
//   1. LayerNorm, per group of N tokens: read the group's rows from OBRAM
//      (pass 1), wait for every lane's reciprocal, read them again (pass 2)
//      and write the normalized rows into IBRAM.
//   2. For each hidden tile h of N hidden units (outer loop, so one weight
//      tile is reused for every row group), and each row group g:
//      OS    - stream K input elements of N rows from IBRAM (through the TU
//              when token mixing) against the N first-layer weight columns;
//      DRAIN - shift the N x N results out through GELU and REQUANT and
//              straight back into the input registers of the array;
//      IS    - stream the N second-layer weight rows; the previous psum (or,
//              for h = 0, the scaled residual) enters from OBRAM through SCALE
//              and the new psum is written back to the same address; on the
//              last tile it is requantized to INT8 instead.
// Every stream uses a single address line; the banks delay it per bank, and
// the token-mixing layout (patch p in bank p mod N) is handled by the address
// pattern (s/N)*CH + g*N + s%N plus the transpose units. Weight tiles are
// double-buffered in WBRAM: the host loads tile h into half h%2 and pulses
// w_tile_loaded; the controller pulses w_tile_consumed when it is done with
// a tile, so loading the next tile overlaps computation. The phase order and
// tile loop follow the document; the cycle-exact scheduling, the sequential
// (non-overlapped) phases and the load handshake are this design's choices.
module hmix_controller
  import hmix_pkg::*;
#(
  parameter int unsigned TOKENS    = 196,
  parameter int unsigned CHANNELS  = 768,
  parameter int unsigned TM_HIDDEN = 384,
  parameter int unsigned CM_HIDDEN = 3072,
  // derived sizes
  parameter int unsigned P_PAD    = ((TOKENS + N - 1) / N) * N,
  parameter int unsigned IB_DEPTH = (P_PAD / N) * CHANNELS,
  parameter int unsigned WHALF    = (CHANNELS > P_PAD) ? 2 * CHANNELS : 2 * P_PAD,
  parameter int unsigned IB_AW    = $clog2(IB_DEPTH),
  parameter int unsigned WB_AW    = $clog2(2 * WHALF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  mix_mode_e        mode,
  input  logic             w_tile_loaded,
  output logic             w_tile_consumed,
  output logic             busy,
  output logic             done,
  // LayerNorm lanes
  input  logic             ln_ready_all,
  output logic             ln_start,
  output logic             ln_active,
  // IBRAM
  output logic             ib_rd_en,
  output logic [IB_AW-1:0] ib_rd_addr,
  output logic             ib_wr_en,
  output logic [IB_AW-1:0] ib_wr_addr,
  // OBRAM
  output logic             ob_rd_en,
  output logic [IB_AW-1:0] ob_rd_addr,
  output logic             ob_wr_en,
  output logic [IB_AW-1:0] ob_wr_addr,
  // WBRAM
  output logic             wb_rd_en,
  output logic [WB_AW-1:0] wb_rd_addr,
  // datapath steering
  output logic             tm,             // token mixing: TUs permute
  output logic             tu_ib_sync,
  output logic             tu_obo_sync,
  output logic             tu_obi_sync,
  output pe_ctrl_t         pe_ctrl,
  output logic             gelu_valid,
  output logic             sa_in_hidden,   // array input from REQUANT (hidden)
  output logic             rq_hidden,      // REQUANT takes GELU, hidden params
  output logic             out_final,      // OBRAM takes REQUANT INT8
  output logic             scale_bypass    // SCALE passes the stored psum
);
  localparam int unsigned GP     = P_PAD / N;
  localparam int unsigned GC     = CHANNELS / N;
  localparam int unsigned LN_DLY = MEM_LAT + TU_LAT + LN_LAT;
  localparam int unsigned IS_DLY = MEM_LAT + TU_LAT + SCALE_LAT + N + REQ_LAT + TU_LAT;
  localparam int unsigned OS_END = 2 * N + MEM_LAT + TU_LAT - 1;  // after last issue
  localparam int unsigned DR_END = GELU_LAT + REQ_LAT + N;

  typedef enum logic [3:0] {
    C_IDLE, C_LN1, C_LN1W, C_LN2, C_WAITW, C_OS, C_DRAIN, C_IS
  } ctrl_state_e;

  ctrl_state_e state;
  logic [15:0] cnt;
  logic [15:0] g, h;
  logic [15:0] loaded;
  mix_mode_e   mode_q;

  logic [15:0] len_k, n_groups, n_tiles;
  assign tm       = (mode_q == MIX_TM);
  assign len_k    = tm ? 16'(P_PAD) : 16'(CHANNELS);
  assign n_groups = tm ? 16'(GC) : 16'(GP);
  assign n_tiles  = tm ? 16'(TM_HIDDEN / N) : 16'(CM_HIDDEN / N);

  // Activation address of element s of row group g.
  function automatic logic [IB_AW-1:0] act_addr(input logic is_tm, input logic [15:0] gg,
                                                input logic [15:0] s);
    if (is_tm) return IB_AW'(32'(s / N) * CHANNELS + 32'(gg) * N + 32'(s % N));
    else       return IB_AW'(32'(gg) * CHANNELS + 32'(s));
  endfunction

  logic [WB_AW-1:0] wbase;
  assign wbase = h[0] ? WB_AW'(WHALF) : '0;

  logic issuing;
  assign issuing = (cnt < len_k);

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; cnt <= '0; g <= '0; h <= '0; loaded <= '0;
      mode_q <= MIX_CM; done <= 1'b0; w_tile_consumed <= 1'b0;
    end else begin
      done            <= 1'b0;
      w_tile_consumed <= 1'b0;
      if (start && state == C_IDLE) loaded <= 16'(w_tile_loaded);
      else if (w_tile_loaded)       loaded <= loaded + 1'b1;

      unique case (state)
        C_IDLE: if (start) begin
          mode_q <= mode; state <= C_LN1; cnt <= '0; g <= '0; h <= '0;
        end
        C_LN1: begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(CHANNELS - 1)) begin state <= C_LN1W; cnt <= '0; end
        end
        C_LN1W: if (ln_ready_all) begin state <= C_LN2; cnt <= '0; end
        C_LN2: begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(CHANNELS + LN_DLY + N)) begin
            cnt <= '0;
            if (g == 16'(GP - 1)) begin g <= '0; state <= C_WAITW; end
            else begin g <= g + 1'b1; state <= C_LN1; end
          end
        end
        C_WAITW: if (loaded > h) begin state <= C_OS; cnt <= '0; end
        C_OS: begin
          cnt <= cnt + 1'b1;
          if (cnt == len_k + 16'(OS_END)) begin state <= C_DRAIN; cnt <= '0; end
        end
        C_DRAIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'(DR_END - 1)) begin state <= C_IS; cnt <= '0; end
        end
        C_IS: begin
          cnt <= cnt + 1'b1;
          if (cnt == len_k + 16'(IS_DLY + N)) begin
            cnt <= '0;
            if (g == n_groups - 1'b1) begin
              g <= '0;
              w_tile_consumed <= 1'b1;
              if (h == n_tiles - 1'b1) begin
                h <= '0; state <= C_IDLE; done <= 1'b1;
              end else begin
                h <= h + 1'b1; state <= C_WAITW;
              end
            end else begin
              g <= g + 1'b1; state <= C_OS;
            end
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign busy = (state != C_IDLE);

  // ---------------- address generation and steering ----------------
  logic             ob_wr_en_pre, ib_wr_en_pre;
  logic [IB_AW-1:0] ob_wr_addr_pre, ib_wr_addr_pre;

  always_comb begin
    ib_rd_en = 1'b0; ib_rd_addr = '0;
    ob_rd_en = 1'b0; ob_rd_addr = '0;
    wb_rd_en = 1'b0; wb_rd_addr = '0;
    ob_wr_en_pre = 1'b0; ob_wr_addr_pre = '0;
    ib_wr_en_pre = 1'b0; ib_wr_addr_pre = '0;
    ln_start = 1'b0;
    unique case (state)
      C_LN1: begin
        ln_start   = (cnt == '0);
        ob_rd_en   = 1'b1;
        ob_rd_addr = act_addr(1'b0, g, cnt);
      end
      C_LN2: begin
        ob_rd_en       = (cnt < 16'(CHANNELS));
        ob_rd_addr     = act_addr(1'b0, g, cnt);
        ib_wr_en_pre   = ob_rd_en;
        ib_wr_addr_pre = ob_rd_addr;
      end
      C_OS: begin
        ib_rd_en   = issuing;
        ib_rd_addr = act_addr(tm, g, cnt);
        wb_rd_en   = issuing;
        wb_rd_addr = wbase + WB_AW'(cnt);
      end
      C_IS: begin
        wb_rd_en       = issuing;
        wb_rd_addr     = wbase + WB_AW'(len_k) + WB_AW'(cnt);
        ob_rd_en       = issuing;
        ob_rd_addr     = act_addr(tm, g, cnt);
        ob_wr_en_pre   = issuing;
        ob_wr_addr_pre = ob_rd_addr;
      end
      default: ;
    endcase
  end

  // Write addresses follow the read addresses by the datapath latency.
  hmix_delay #(.W(IB_AW + 1), .DEPTH(IS_DLY)) u_ob_wr_dly (
    .clk, .rst_n, .din({ob_wr_en_pre, ob_wr_addr_pre}), .dout({ob_wr_en, ob_wr_addr}));
  hmix_delay #(.W(IB_AW + 1), .DEPTH(LN_DLY)) u_ib_wr_dly (
    .clk, .rst_n, .din({ib_wr_en_pre, ib_wr_addr_pre}), .dout({ib_wr_en, ib_wr_addr}));

  assign ln_active     = (state == C_LN1) || (state == C_LN1W) || (state == C_LN2);
  assign tu_ib_sync    = (state == C_OS) && (cnt == 16'(MEM_LAT));
  assign tu_obo_sync   = (state == C_IS) && (cnt == 16'(MEM_LAT));
  assign tu_obi_sync   = (state == C_IS) && (cnt == 16'(IS_DLY - 1));
  assign pe_ctrl.is_mode = (state == C_IS);
  assign pe_ctrl.drain   = (state == C_DRAIN) && (cnt < 16'(N));
  assign gelu_valid      = pe_ctrl.drain;
  assign sa_in_hidden    = (state == C_DRAIN);
  assign rq_hidden       = (state == C_DRAIN);
  assign out_final       = (state == C_IS) && (h == n_tiles - 1'b1);
  assign scale_bypass    = (h != '0);
endmodule
