// daisy_chip: the DAISY VLIW processor chip.
//
// A tree-VLIW processor meant to run PowerPC software through dynamic binary
// translation: translation software (outside this RTL) turns PowerPC code
// into tree VLIWs and keeps them in memory; this chip executes them. It
// holds the 8-issue core (daisy_core: 8 ALUs, 8 register-file copies of 64
// GPRs, 16 condition registers, 4 branch units), the 64 KB L1 instruction
// cache, the 32 KB L1 data cache, the 256 KB L2 cache, the controller of
// the 16 MB off-chip L3 cache, and the 60X bus interface. The L3 SRAM chips
// and everything behind the 60X bus (bridge, DRAM, ROM, I/O) are outside
// the chip; their pins are this module's ports.
//
// Data paths between the caches follow the memory hierarchy drawing: L1
// data <-> L2 in 256-bit blocks, L2 -> L1 instruction in 1024-bit lines
// (plus the 256-bit header side band of this design's instruction format),
// L2 <-> L3 <-> 60X interface in whole lines. All caches are direct mapped.
// The core starts fetching at line RESET_LINE after reset.
module daisy_chip
  import daisy_pkg::*;
#(
  parameter int IC_KB  = 64,
  parameter int DC_KB  = 32,
  parameter int L2_KB  = 256,
  parameter int L3_MB  = 16,
  parameter int SRAM_LAT = 3,
  parameter int SRAM_CYC = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  // L3 SRAM
  output logic                  sram_ce,
  output logic                  sram_we,
  output logic                  sram_dir,
  output logic [$clog2(L3_MB*1024*1024/128)+1:0] sram_addr,
  output logic [VLIW_W-1:0]     sram_wdata,
  input  logic [VLIW_W-1:0]     sram_rdata,
  // 60X bus
  output logic                  bus_ts,
  output logic [31:0]           bus_a,
  output logic                  bus_tt_wr,
  output logic                  bus_tt_hdr,
  input  logic                  bus_aack,
  output logic [63:0]           bus_dbo,
  output logic                  bus_dbo_en,
  input  logic [63:0]           bus_dbi,
  input  logic                  bus_ta,
  // status
  output logic [31:0]           epc,
  output exc_e                  cause,
  output logic [31:0]           cnt_cycles,
  output logic [31:0]           cnt_retired,
  output logic [31:0]           cnt_dstall,
  output logic [31:0]           cnt_istall,
  output logic [31:0]           cnt_exc,
  output logic [31:0]           cnt_bri,
  output logic [31:0]           cnt_bypass,
  output logic [31:0]           cnt_multiway
);
  // core <-> L1
  logic                  ic_rd_en, ic_hit, ic_busy;
  logic [LADDR_W-1:0]    ic_rd_line;
  iline_t                ic_line;
  memreq_t [NMEM-1:0]    dc_req;
  logic                  dc_commit, dc_miss, dc_busy;
  logic [NMEM-1:0][31:0] dc_rdata;
  logic [NMEM-1:0]       dc_hit;
  // L1 <-> L2
  logic                  i2_req, i2_ack;
  logic [LADDR_W-1:0]    i2_line;
  iline_t                i2_rdata;
  logic                  d2_req, d2_we, d2_ack;
  logic [26:0]           d2_blk;
  logic [DBLK_W-1:0]     d2_wdata, d2_rdata;
  // L2 <-> L3 <-> bus
  logic                  m_req, m_we, m_ack;
  logic [LADDR_W-1:0]    m_line;
  logic [LINE_W-1:0]     m_wdata, m_rdata;
  logic                  b_req, b_we, b_ack;
  logic [LADDR_W-1:0]    b_line;
  logic [LINE_W-1:0]     b_wdata, b_rdata;

  daisy_core u_core (
    .clk, .rst,
    .ic_rd_en, .ic_rd_line, .ic_line, .ic_hit, .ic_busy,
    .dc_req, .dc_commit, .dc_rdata, .dc_miss, .dc_busy,
    .epc, .cause, .cnt_cycles, .cnt_retired, .cnt_dstall, .cnt_istall,
    .cnt_exc, .cnt_bri, .cnt_bypass, .cnt_multiway);

  icache #(.SIZE_KB(IC_KB)) u_ic (
    .clk, .rst, .rd_en(ic_rd_en), .rd_line(ic_rd_line), .line(ic_line),
    .hit(ic_hit), .busy(ic_busy), .l2_req(i2_req), .l2_line(i2_line),
    .l2_ack(i2_ack), .l2_rdata(i2_rdata));

  dcache #(.SIZE_KB(DC_KB)) u_dc (
    .clk, .rst, .req(dc_req), .commit(dc_commit), .rdata(dc_rdata),
    .hit(dc_hit), .miss(dc_miss), .busy(dc_busy),
    .l2_req(d2_req), .l2_we(d2_we), .l2_blk(d2_blk), .l2_wdata(d2_wdata),
    .l2_ack(d2_ack), .l2_rdata(d2_rdata));

  l2cache #(.SIZE_KB(L2_KB)) u_l2 (
    .clk, .rst,
    .i_req(i2_req), .i_line(i2_line), .i_ack(i2_ack), .i_rdata(i2_rdata),
    .d_req(d2_req), .d_we(d2_we), .d_blk(d2_blk), .d_wdata(d2_wdata),
    .d_ack(d2_ack), .d_rdata(d2_rdata),
    .m_req, .m_we, .m_line, .m_wdata, .m_ack, .m_rdata);

  l3_ctrl #(.SIZE_MB(L3_MB), .SRAM_LAT(SRAM_LAT), .SRAM_CYC(SRAM_CYC)) u_l3 (
    .clk, .rst, .req(m_req), .we(m_we), .line(m_line), .wdata(m_wdata),
    .ack(m_ack), .rdata(m_rdata),
    .sram_ce, .sram_we, .sram_dir, .sram_addr, .sram_wdata, .sram_rdata,
    .bus_req(b_req), .bus_we(b_we), .bus_line(b_line), .bus_wdata(b_wdata),
    .bus_ack(b_ack), .bus_rdata(b_rdata));

  bus60x_if u_bus (
    .clk, .rst, .req(b_req), .we(b_we), .line(b_line), .wdata(b_wdata),
    .ack(b_ack), .rdata(b_rdata),
    .ts(bus_ts), .a(bus_a), .tt_wr(bus_tt_wr), .tt_hdr(bus_tt_hdr),
    .aack(bus_aack), .dbo(bus_dbo), .dbo_en(bus_dbo_en), .dbi(bus_dbi),
    .ta(bus_ta));
endmodule
