// icache_partition: one of the four partitions of the L1 instruction cache.
//
// A partition serves two issue slots (2p and 2p+1). It has four banks; bank
// b holds, for every line, the two operations of this partition's slots and
// the control header of the line's VLIW b, i.e. of one of the four possible
// branch targets. Keeping the header in every partition lets each partition
// run an identical branch unit beside its slots. Reads are combinational
// from a line index (the address register sits in the fetch stage); a fill
// writes all four banks at once.
module icache_partition
  import daisy_pkg::*;
#(
  parameter int PART  = 0,
  parameter int LINES = 512
) (
  input  logic                          clk,
  input  logic [$clog2(LINES)-1:0]      rd_idx,
  output hdr_t [NPATH-1:0]              rd_hdr,
  output op_t  [NPATH-1:0][1:0]         rd_ops,
  input  logic                          wr_en,
  input  logic [$clog2(LINES)-1:0]      wr_idx,
  input  iline_t                        wr_line
);
  localparam int EW = HDR_W + 2*OP_W;
  logic [EW-1:0] bank [NPATH][LINES];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int b = 0; b < NPATH; b++)
        bank[b][wr_idx] <= {wr_line.hdr[b], wr_line.ops[b][2*PART+1],
                            wr_line.ops[b][2*PART]};
  end

  always_comb begin
    for (int b = 0; b < NPATH; b++)
      {rd_hdr[b], rd_ops[b][1], rd_ops[b][0]} = bank[b][rd_idx];
  end
endmodule
