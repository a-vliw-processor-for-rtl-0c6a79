// load_align: load shift and select for one memory port.
//
// The data cache returns the whole aligned 32-bit word that holds the loaded
// item. In the write-back stage this unit shifts the byte or halfword down by
// the address offset and zero- or sign-extends it, producing the 35-bit
// register value (extender bits clear, except the deferred-exception bit of a
// speculative load that could not be performed). The block is named in the
// ALU critical path drawing between the four load results and the bypass
// network; its contents are this design's (little-endian byte order).
// Combinational.
module load_align
  import daisy_pkg::*;
(
  input  logic [31:0]     raw,
  input  ldinfo_t         info,
  output logic [REG_W-1:0] result
);
  logic [31:0] sh;
  logic [31:0] v;
  always_comb begin
    sh = raw >> {info.ofs, 3'b000};
    unique case (info.size)
      2'd0:    v = info.sext ? {{24{sh[7]}},  sh[7:0]}  : {24'b0, sh[7:0]};
      2'd1:    v = info.sext ? {{16{sh[15]}}, sh[15:0]} : {16'b0, sh[15:0]};
      default: v = sh;
    endcase
    if (info.dexc) result = {1'b1, 2'b00, 32'b0};
    else           result = {3'b000, v};
  end
endmodule
