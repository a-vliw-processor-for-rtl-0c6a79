// reg_bypass: register bypassing and operand select for one ALU source.
//
// Compares the source register number with the targets of the 8 ALU results
// and the 4 load results now in the write-back stage (they are written to
// the register files at the end of this cycle). If one matches, its value is
// used instead of the register-file value; the highest-numbered matching slot
// wins, as in the register-file write. A 4:1 multiplexer then picks the
// operand: register file, ALU bypass, load bypass, or the immediate. This
// follows the drawing of the ALU critical path (Rt/Rslt/En per slot,
// LdRslt0..3 through the load shift and select, select_bypass into a 4:1
// mux); the immediate as fourth mux input is this design's choice.
// Load results occupy the write ports of the odd slots 1, 3, 5, 7.
// Combinational.
module reg_bypass
  import daisy_pkg::*;
(
  input  logic [5:0]                   src,
  input  logic                         use_imm,
  input  logic [XLEN-1:0]              imm,
  input  logic [REG_W-1:0]             gpr_data,
  input  logic [NSLOT-1:0]             en,       // ALU result valid
  input  logic [NSLOT-1:0][5:0]        rt,
  input  logic [NSLOT-1:0][REG_W-1:0]  rslt,
  input  logic [NMEM-1:0]              ld_en,    // load result valid
  input  logic [NMEM-1:0][5:0]         ld_rt,
  input  logic [NMEM-1:0][REG_W-1:0]   ld_rslt,
  output logic [1:0]                   select_bypass,
  output logic [REG_W-1:0]             operand
);
  logic [REG_W-1:0] byp_alu, byp_ld;
  always_comb begin
    select_bypass = 2'd0;
    byp_alu = '0;
    byp_ld  = '0;
    for (int s = 0; s < NSLOT; s++) begin
      if (en[s] && rt[s] == src) begin
        select_bypass = 2'd1;
        byp_alu = rslt[s];
      end
      if (s % 2 == 1 && ld_en[s/2] && ld_rt[s/2] == src) begin
        select_bypass = 2'd2;
        byp_ld = ld_rslt[s/2];
      end
    end
    if (use_imm) select_bypass = 2'd3;
    unique case (select_bypass)
      2'd0: operand = gpr_data;
      2'd1: operand = byp_alu;
      2'd2: operand = byp_ld;
      default: operand = {{EXT_W{1'b0}}, imm};
    endcase
  end
endmodule
