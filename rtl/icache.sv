// icache: L1 instruction cache.
//
// 64 KB of operations, direct mapped, 128-byte lines (512 lines), split into
// four partitions of four banks (icache_partition). One read returns a whole
// line: the four VLIWs that are the possible targets of the VLIW now in EX,
// each with its header. The branch units then select one of them in the same
// cycle, so a branch can be taken every cycle without penalty.
//
// Interface: in the fetch cycle `rd_en` and `rd_line` (line address, byte
// address bits [31:7]) are presented; `line` and `hit` follow
// combinationally from the cache arrays (the line address register is in the
// core's fetch stage). On a miss with `rd_en` set the cache starts a refill:
// it requests the line from the L2 cache (`l2_req` held until `l2_ack`,
// which comes with the 1280-bit line: 1024 operation bits plus the 256-bit
// header side band) and is `busy` until the line is written. The core
// recognises the miss one cycle later (instruction stall) and fetches the
// line again when `busy` falls.
// Own choices: tag/valid organisation, refill protocol, no prefetch.
module icache
  import daisy_pkg::*;
#(
  parameter int SIZE_KB = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                rd_en,
  input  logic [LADDR_W-1:0]  rd_line,
  output iline_t              line,
  output logic                hit,
  output logic                busy,
  output logic                l2_req,
  output logic [LADDR_W-1:0]  l2_line,
  input  logic                l2_ack,
  input  iline_t              l2_rdata
);
  localparam int LINES = SIZE_KB * 1024 / 128;
  localparam int IW    = $clog2(LINES);
  localparam int TW    = LADDR_W - IW;

  logic [TW-1:0]    tags [LINES];
  logic [LINES-1:0] valid;
  logic [IW-1:0]    idx;
  logic             filling;
  logic [LADDR_W-1:0] fill_line;

  assign idx  = rd_line[IW-1:0];
  assign hit  = valid[idx] && tags[idx] == rd_line[LADDR_W-1:IW];
  assign busy = filling;
  assign l2_req  = filling;
  assign l2_line = fill_line;

  for (genvar p = 0; p < NPATH; p++) begin : g_part
    hdr_t [NPATH-1:0]      ph;
    op_t  [NPATH-1:0][1:0] po;
    icache_partition #(.PART(p), .LINES(LINES)) u_part (
      .clk, .rd_idx(idx), .rd_hdr(ph), .rd_ops(po),
      .wr_en(filling && l2_ack), .wr_idx(fill_line[IW-1:0]), .wr_line(l2_rdata));
    always_comb begin
      for (int b = 0; b < NPATH; b++) begin
        line.ops[b][2*p]   = po[b][0];
        line.ops[b][2*p+1] = po[b][1];
      end
    end
    if (p == 0) begin : g_hdr
      assign line.hdr = ph;   // every partition holds the same headers
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid     <= '0;
      filling   <= 1'b0;
      fill_line <= '0;
    end else if (filling) begin
      if (l2_ack) begin
        filling <= 1'b0;
        valid[fill_line[IW-1:0]] <= 1'b1;
        tags[fill_line[IW-1:0]]  <= fill_line[LADDR_W-1:IW];
      end
    end else if (rd_en && !hit) begin
      filling   <= 1'b1;
      fill_line <= rd_line;
    end
  end
endmodule
