// dcache: L1 data cache.
//
// 32 KB, direct mapped, 32-byte lines, write-back. It serves the four memory
// ports of a VLIW (one per odd issue slot) with four reads and four writes
// per cycle. As described, it is built as two identical copies, each serving
// two read ports (ports 0-1 read copy 0, ports 2-3 copy 1) while every write
// goes to both copies, which keeps loads single-cycle.
//
// Timing: a request is presented in EX and a load gets the aligned 32-bit
// word containing its data combinationally in the same cycle; the load shift
// and select happens in WB. Stores are not written in EX: a store that hits
// is placed in its port's write buffer and written into both copies at the
// end of the following cycle if `commit` is high there, or dropped if the
// core rolls the VLIW back. Loads see buffered stores (byte-wise forwarding),
// so the buffers are invisible to software.
//
// Misses: if any valid request misses, `miss` is high in that cycle, no store
// of that cycle is buffered, and the cache goes `busy`: it writes the dirty
// victim back to the L2 cache if needed, then fetches the line (256-bit
// transfers, `l2_req` held until `l2_ack`). The core recognises the stall a
// cycle later, rolls back and re-executes the VLIW when `busy` falls; a VLIW
// with several misses takes one refill per retry. Being direct mapped, the
// cache cannot serve one VLIW whose accesses need two lines of the same set;
// code must not contain such a VLIW.
//
// Own choices and simplifications: each copy is modelled as one array with
// two read ports instead of the described eight single-ported banks, and
// there is one write buffer per store port rather than one per port and
// bank; write-back with write-allocate; the miss sequencing.
module dcache
  import daisy_pkg::*;
#(
  parameter int SIZE_KB = 32,
  parameter int NP      = NMEM
) (
  input  logic                   clk,
  input  logic                   rst,
  input  memreq_t [NP-1:0]       req,
  input  logic                   commit,
  output logic [NP-1:0][31:0]    rdata,
  output logic [NP-1:0]          hit,
  output logic                   miss,
  output logic                   busy,
  output logic                   l2_req,
  output logic                   l2_we,
  output logic [26:0]            l2_blk,     // 32-byte block address
  output logic [DBLK_W-1:0]      l2_wdata,
  input  logic                   l2_ack,
  input  logic [DBLK_W-1:0]      l2_rdata
);
  localparam int COPIES = 2;
  localparam int LINES  = SIZE_KB * 1024 / 32;
  localparam int IW     = $clog2(LINES);
  localparam int TW     = 27 - IW;

  typedef struct packed {
    logic        valid;
    logic [29:0] waddr;
    logic [31:0] wdata;
    logic [3:0]  be;
  } wbuf_t;

  typedef enum logic [1:0] {S_IDLE, S_VICT, S_WBACK, S_FILL} st_e;

  logic [31:0]      data [COPIES][LINES*8];
  logic [TW-1:0]    tags [COPIES][LINES];
  logic [LINES-1:0] valid, dirty;
  wbuf_t [NP-1:0]   wbuf;
  st_e              st;
  logic [26:0]      miss_blk;
  logic [NP-1:0]    pmiss;
  logic [26:0]      first_blk;
  logic [DBLK_W-1:0] victim;

  function automatic logic [IW-1:0] idx_of(input logic [31:0] a);
    return a[5 +: IW];
  endfunction

  always_comb begin
    miss      = 1'b0;
    first_blk = '0;
    for (int k = NP - 1; k >= 0; k--) begin
      automatic int c = (k * COPIES) / NP;
      automatic logic [IW-1:0] i = idx_of(req[k].addr);
      automatic logic [31:0] w = data[c][{i, req[k].addr[4:2]}];
      hit[k] = valid[i] && tags[c][i] == req[k].addr[31:5+IW];
      // forwarding from the write buffers, older ports first
      for (int q = 0; q < NP; q++)
        if (wbuf[q].valid && wbuf[q].waddr == req[k].addr[31:2])
          for (int j = 0; j < 4; j++)
            if (wbuf[q].be[j]) w[8*j +: 8] = wbuf[q].wdata[8*j +: 8];
      rdata[k] = w;
      pmiss[k] = req[k].valid && !hit[k];
      if (pmiss[k]) begin
        miss = 1'b1;
        first_blk = req[k].addr[31:5];
      end
    end
    for (int j = 0; j < 8; j++) victim[32*j +: 32] = data[0][{miss_blk[IW-1:0], 3'(j)}];
  end

  assign busy     = (st != S_IDLE);
  assign l2_req   = (st == S_WBACK) || (st == S_FILL);
  assign l2_we    = (st == S_WBACK);
  assign l2_blk   = (st == S_WBACK) ? {tags[0][miss_blk[IW-1:0]], miss_blk[IW-1:0]}
                                    : miss_blk;
  assign l2_wdata = victim;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid    <= '0;
      dirty    <= '0;
      wbuf     <= '0;
      st       <= S_IDLE;
      miss_blk <= '0;
    end else begin
      // retire last cycle's stores into both copies
      if (commit) begin
        for (int q = 0; q < NP; q++)
          if (wbuf[q].valid) begin
            for (int c = 0; c < COPIES; c++)
              for (int j = 0; j < 4; j++)
                if (wbuf[q].be[j])
                  data[c][wbuf[q].waddr[IW+2:0]][8*j +: 8] <= wbuf[q].wdata[8*j +: 8];
            dirty[wbuf[q].waddr[IW+2:3]] <= 1'b1;
          end
      end
      for (int k = 0; k < NP; k++) begin
        wbuf[k].valid <= req[k].valid && req[k].we && !miss && st == S_IDLE;
        wbuf[k].waddr <= req[k].addr[31:2];
        wbuf[k].wdata <= req[k].wdata;
        wbuf[k].be    <= req[k].be;
      end

      unique case (st)
        S_IDLE: if (miss) begin
          miss_blk <= first_blk;
          st <= S_VICT;
        end
        // decided one cycle later, once the stores of the previous VLIW
        // have been retired and the dirty bit is final
        S_VICT: st <= (valid[miss_blk[IW-1:0]] && dirty[miss_blk[IW-1:0]]) ? S_WBACK : S_FILL;
        S_WBACK: if (l2_ack) st <= S_FILL;
        S_FILL: if (l2_ack) begin
          for (int c = 0; c < COPIES; c++) begin
            for (int j = 0; j < 8; j++)
              data[c][{miss_blk[IW-1:0], 3'(j)}] <= l2_rdata[32*j +: 32];
            tags[c][miss_blk[IW-1:0]] <= miss_blk[26:IW];
          end
          valid[miss_blk[IW-1:0]] <= 1'b1;
          dirty[miss_blk[IW-1:0]] <= 1'b0;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
