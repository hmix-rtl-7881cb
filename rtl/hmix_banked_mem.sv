// hmix_banked_mem: NB BRAM banks driven by one staggered address line.
//
// This is how HMix reads and writes IBRAM, OBRAM and WBRAM: the controller
// issues a single read address (and a single write address); bank 0 uses it
// at once and bank k uses it k cycles later, through a chain of address
// registers. Reading the banks this way yields exactly the skewed wavefront a
// systolic array needs, without a per-bank address generator.
//   Read:  rd_en/rd_addr in cycle t -> bank k reads in cycle t+k, and
//          rdata[k]/rvalid[k] hold the word in cycle t+k+1. When a bank is not
//          read, rdata[k] is zero, so idle lanes feed zeros into the array.
//   Write: wr_en/wr_addr in cycle t -> bank k writes wdata[k] at the end of
//          cycle t+k.
//   Host:  h_re/h_addr read all banks at one address (data next cycle, no
//          stagger; a staggered read of the same bank in the same cycle
//          loses). h_we_mask/h_addr/h_wdata write the masked banks at once and
//          win over a staggered write. This port stands for the DRAM side.
// The staggering follows the document; the host port is this design's own.
module hmix_banked_mem #(
  parameter int unsigned NB    = 16,
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rdata  [NB],
  output logic          rvalid [NB],
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wdata  [NB],
  input  logic          h_re,
  input  logic [NB-1:0] h_we_mask,
  input  logic [AW-1:0] h_addr,
  input  logic [W-1:0]  h_wdata [NB]
);
  // Address/enable chains: index k is what bank k sees this cycle.
  logic [AW-1:0] ra [NB];
  logic          re [NB];
  logic [AW-1:0] wa [NB];
  logic          we [NB];

  assign ra[0] = rd_addr;
  assign re[0] = rd_en;
  assign wa[0] = wr_addr;
  assign we[0] = wr_en;

  for (genvar k = 1; k < NB; k++) begin : g_chain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ra[k] <= '0; re[k] <= 1'b0; wa[k] <= '0; we[k] <= 1'b0;
      end else begin
        ra[k] <= ra[k-1]; re[k] <= re[k-1];
        wa[k] <= wa[k-1]; we[k] <= we[k-1];
      end
    end
  end

  for (genvar k = 0; k < NB; k++) begin : g_bank
    logic [W-1:0] mem [DEPTH];
    logic [AW-1:0] raddr, waddr;
    logic          ren, wen;
    logic [W-1:0]  wd;

    assign ren   = h_re | re[k];
    assign raddr = h_re ? h_addr : ra[k];
    assign wen   = h_we_mask[k] | we[k];
    assign waddr = h_we_mask[k] ? h_addr : wa[k];
    assign wd    = h_we_mask[k] ? h_wdata[k] : wdata[k];

    always_ff @(posedge clk) begin
      if (wen) mem[waddr] <= wd;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rdata[k]  <= '0;
        rvalid[k] <= 1'b0;
      end else begin
        rdata[k]  <= ren ? mem[raddr] : '0;
        rvalid[k] <= re[k] & ~h_re;
      end
    end
  end
endmodule
