// l2cache: unified second-level cache.
//
// 256 KB, direct mapped, 128-byte lines, write-back. It has two read ports
// and one write port: the L1 instruction cache only reads whole lines (1024
// operation bits plus the 256-bit VLIW-header side band, 1280 bits), the L1
// data cache reads and writes 32-byte blocks (256 bits) of a line's 128 data
// bytes. The cache sequences the three ports: one request is looked up at a
// time, and when both L1 caches wait they are served alternately. A miss
// writes a dirty victim back to the L3 controller, then fetches the line
// from it (1280-bit transfers) and retries the lookup.
//
// Handshake on every port: the requester holds `*_req` and its address
// (and write data) until a one-cycle `*_ack`; read data is valid with the
// ack. A hit takes two cycles (select, look up and answer).
// Sizes follow the description; the sequencing policy, write-back and the
// handshake are this design's choices.
module l2cache
  import daisy_pkg::*;
#(
  parameter int SIZE_KB = 256
) (
  input  logic                 clk,
  input  logic                 rst,
  // L1 instruction cache read port
  input  logic                 i_req,
  input  logic [LADDR_W-1:0]   i_line,
  output logic                 i_ack,
  output logic [LINE_W-1:0]    i_rdata,
  // L1 data cache read/write port
  input  logic                 d_req,
  input  logic                 d_we,
  input  logic [26:0]          d_blk,
  input  logic [DBLK_W-1:0]    d_wdata,
  output logic                 d_ack,
  output logic [DBLK_W-1:0]    d_rdata,
  // towards the L3 controller
  output logic                 m_req,
  output logic                 m_we,
  output logic [LADDR_W-1:0]   m_line,
  output logic [LINE_W-1:0]    m_wdata,
  input  logic                 m_ack,
  input  logic [LINE_W-1:0]    m_rdata
);
  localparam int LINES = SIZE_KB * 1024 / 128;
  localparam int IW    = $clog2(LINES);
  localparam int TW    = LADDR_W - IW;

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WBACK, S_FILL, S_DONE} st_e;

  logic [LINE_W-1:0] data [LINES];
  logic [TW-1:0]     tags [LINES];
  logic [LINES-1:0]  valid, dirty;
  st_e               st;
  logic              sel_d, last_d;   // request being served is from D1
  logic [LADDR_W-1:0] line;
  logic [1:0]        blk;
  logic [IW-1:0]     idx;
  logic              hit;
  logic [LINE_W-1:0] cur;

  assign idx = line[IW-1:0];
  assign hit = valid[idx] && tags[idx] == line[LADDR_W-1:IW];
  assign cur = data[idx];

  assign i_ack   = (st == S_DONE) && !sel_d;
  assign d_ack   = (st == S_DONE) && sel_d;
  assign i_rdata = cur;
  assign d_rdata = cur[DBLK_W*blk +: DBLK_W];
  assign m_req   = (st == S_WBACK) || (st == S_FILL);
  assign m_we    = (st == S_WBACK);
  assign m_line  = (st == S_WBACK) ? {tags[idx], idx} : line;
  assign m_wdata = cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= S_IDLE;
      valid  <= '0;
      dirty  <= '0;
      sel_d  <= 1'b0;
      last_d <= 1'b0;
      line   <= '0;
      blk    <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (d_req || i_req) begin
          // alternate between the two L1 caches when both are waiting
          sel_d <= d_req && (!i_req || !last_d);
          line  <= (d_req && (!i_req || !last_d)) ? d_blk[26:2] : i_line;
          blk   <= d_blk[1:0];
          st    <= S_LOOK;
        end
        S_LOOK: begin
          if (hit) begin
            if (sel_d && d_we) begin
              data[idx][DBLK_W*blk +: DBLK_W] <= d_wdata;
              dirty[idx] <= 1'b1;
            end
            st <= S_DONE;
          end else if (valid[idx] && dirty[idx]) st <= S_WBACK;
          else st <= S_FILL;
        end
        S_WBACK: if (m_ack) begin
          dirty[idx] <= 1'b0;
          st <= S_FILL;
        end
        S_FILL: if (m_ack) begin
          data[idx]  <= m_rdata;
          tags[idx]  <= line[LADDR_W-1:IW];
          valid[idx] <= 1'b1;
          dirty[idx] <= 1'b0;
          st <= S_LOOK;
        end
        S_DONE: begin
          last_d <= sel_d;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
