// alu_slot: execute unit of one of the 8 issue slots.
//
// Single-cycle integer unit. It executes every operation class of the
// operation table: add/sub, logic, shifts, compare, conditional moves, misc
// (load immediate, sign extension, indirect branch), address generation,
// load/store address and data, load VLIW instruction address (LVIA), commit,
// load verify and extender-bit operations. The slot rules of the table are
// enforced by the SLOT parameter: loads, stores, LVIA, load verify and
// extender operations are legal only in odd slots (at most 4 per VLIW),
// address generation only in even slots; a violation raises an illegal
// operation exception. There is no floating point, multiply or divide.
//
// Speculation support follows the description: results carry extender bits
// {exception, overflow, carry}. A speculative load (LWZS) that cannot be
// performed sets the deferred-exception bit of its target instead of
// trapping; ordinary operations propagate that bit; COMMIT copies a register
// and raises the exception if the bit is set. All encodings, the exact
// operation list and the extender semantics are this design's choices.
//
// Interface: op and its operands arrive in EX; `active` says the VLIW is
// valid and the slot's operation is on the taken path. Every output is
// combinational and gated by `active`. Register results are written in WB.
module alu_slot
  import daisy_pkg::*;
#(
  parameter int SLOT = 0
) (
  input  op_t                   op,
  input  logic                  active,
  input  logic [REG_W-1:0]      opa,       // source A (ra)
  input  logic [REG_W-1:0]      opb,       // source B (rb, rt or immediate)
  input  logic [NCR-1:0][3:0]   cr,
  input  logic [31:0]           vliw_addr, // address of the executing VLIW
  output logic                  wen,
  output logic [REG_W-1:0]      result,
  output logic                  cr_we,
  output logic [3:0]            cr_idx,
  output logic [3:0]            cr_val,
  output memreq_t               mem,
  output ldinfo_t               ld,
  output logic                  verify,    // mem is a load verify
  output exc_e                  exc,
  output logic                  bri,
  output logic [31:0]           bri_tgt
);
  localparam bit ODD = (SLOT % 2) == 1;

  logic [31:0] a, b, immx, ea, sum, diff, shl, shr, sra;
  logic        ca_add, ca_sub, ca_adde, dex, lt_s, lt_u, ccbit;
  logic [32:0] add33, sub33, adde33;
  ccsel_t      csel;
  logic [1:0]  size;

  always_comb begin
    a      = opa[31:0];
    b      = opb[31:0];
    immx   = sext10(op.imm);
    ea     = a + immx;
    add33  = {1'b0, a} + {1'b0, b};
    sub33  = {1'b0, a} + {1'b0, ~b} + 33'd1;
    adde33 = {1'b0, a} + {1'b0, b} + {32'b0, opa[EXT_CA]};
    sum    = add33[31:0];
    diff   = sub33[31:0];
    ca_add = add33[32];
    ca_sub = sub33[32];
    ca_adde= adde33[32];
    shl    = a << b[4:0];
    shr    = a >> b[4:0];
    sra    = $signed(a) >>> b[4:0];
    lt_s   = $signed(a) < $signed(b);
    lt_u   = a < b;
    dex    = opa[EXT_EX] | opb[EXT_EX];
    csel   = op.imm[5:0];
    ccbit  = cr[csel.cr][csel.bit_sel];

    wen     = 1'b0;
    result  = '0;
    cr_we   = 1'b0;
    cr_idx  = op.rt[3:0];
    cr_val  = '0;
    mem     = '0;
    ld      = '0;
    verify  = 1'b0;
    exc     = EXC_NONE;
    bri     = 1'b0;
    bri_tgt = a;
    size    = 2'd2;

    unique case (op.opc)
      OP_NOP: ;
      OP_ADD, OP_ADDI: begin
        wen = 1'b1;
        result = {dex, (a[31] == b[31]) && (sum[31] != a[31]), ca_add, sum};
      end
      OP_SUB: begin
        wen = 1'b1;
        result = {dex, (a[31] != b[31]) && (diff[31] != a[31]), ca_sub, diff};
      end
      OP_AND, OP_ANDI: begin wen = 1'b1; result = {dex, 2'b00, a & b}; end
      OP_OR,  OP_ORI:  begin wen = 1'b1; result = {dex, 2'b00, a | b}; end
      OP_XOR, OP_XORI: begin wen = 1'b1; result = {dex, 2'b00, a ^ b}; end
      OP_SLW,  OP_SLWI:  begin wen = 1'b1; result = {dex, 2'b00, shl}; end
      OP_SRW,  OP_SRWI:  begin wen = 1'b1; result = {dex, 2'b00, shr}; end
      OP_SRAW, OP_SRAWI: begin wen = 1'b1; result = {dex, 2'b00, sra}; end
      OP_CMP, OP_CMPI: begin
        cr_we  = 1'b1;
        cr_val = {opa[EXT_OV], a == b, !lt_s && a != b, lt_s};
      end
      OP_CMPL, OP_CMPLI: begin
        cr_we  = 1'b1;
        cr_val = {opa[EXT_OV], a == b, !lt_u && a != b, lt_u};
      end
      OP_CMOVT, OP_CMOVF: begin
        wen = 1'b1;
        result = (ccbit == (op.opc == OP_CMOVT)) ? opa : opb;
      end
      OP_LI:    begin wen = 1'b1; result = {3'b000, {16{op.ra[5]}}, op.ra, op.imm}; end
      OP_LIS:   begin wen = 1'b1; result = {3'b000, op.ra, op.imm, 16'b0}; end
      OP_EXTSB: begin wen = 1'b1; result = {opa[EXT_EX], 2'b00, {24{a[7]}}, a[7:0]}; end
      OP_EXTSH: begin wen = 1'b1; result = {opa[EXT_EX], 2'b00, {16{a[15]}}, a[15:0]}; end
      OP_BRI:   bri = 1'b1;
      OP_AGEN: begin
        if (ODD) exc = EXC_ILLEGAL;
        else begin wen = 1'b1; result = {opa[EXT_EX], 2'b00, ea}; end
      end
      OP_LWZ, OP_LHZ, OP_LHA, OP_LBZ, OP_LWZS, OP_LVER: begin
        size = (op.opc == OP_LBZ) ? 2'd0 :
               (op.opc inside {OP_LHZ, OP_LHA}) ? 2'd1 : 2'd2;
        if (!ODD) exc = EXC_ILLEGAL;
        else if ((size == 2'd2 && ea[1:0] != 2'b00) ||
                 (size == 2'd1 && ea[0])) begin
          if (op.opc == OP_LWZS) begin
            wen = 1'b1;                       // deferred exception
            ld  = '{en: 1'b1, ofs: 2'b00, size: 2'd2, sext: 1'b0, dexc: 1'b1};
          end else exc = EXC_ALIGN;
        end else begin
          mem.valid = 1'b1;
          mem.addr  = ea;
          verify    = (op.opc == OP_LVER);
          if (!verify) begin
            wen = 1'b1;
            ld  = '{en: 1'b1, ofs: ea[1:0], size: size,
                    sext: op.opc == OP_LHA, dexc: 1'b0};
          end
        end
      end
      OP_STW, OP_STH, OP_STB: begin
        size = (op.opc == OP_STB) ? 2'd0 : (op.opc == OP_STH) ? 2'd1 : 2'd2;
        if (!ODD) exc = EXC_ILLEGAL;
        else if ((size == 2'd2 && ea[1:0] != 2'b00) ||
                 (size == 2'd1 && ea[0])) exc = EXC_ALIGN;
        else begin
          mem.valid = 1'b1;
          mem.we    = 1'b1;
          mem.addr  = ea;
          mem.wdata = b << {ea[1:0], 3'b000};
          mem.be    = (size == 2'd0) ? (4'b0001 << ea[1:0]) :
                      (size == 2'd1) ? (4'b0011 << ea[1:0]) : 4'b1111;
        end
      end
      OP_LVIA: begin
        if (!ODD) exc = EXC_ILLEGAL;
        else begin wen = 1'b1; result = {3'b000, vliw_addr + (immx << 5)}; end
      end
      OP_COMMIT: begin
        if (opa[EXT_EX]) exc = EXC_COMMIT;
        else begin wen = 1'b1; result = {1'b0, opa[EXT_OV:0]}; end
      end
      OP_ADDE: begin
        if (!ODD) exc = EXC_ILLEGAL;
        else begin
          wen = 1'b1;
          result = {dex, (a[31] == b[31]) && (adde33[31] != a[31]), ca_adde,
                    adde33[31:0]};
        end
      end
      OP_MFEXT: begin
        if (!ODD) exc = EXC_ILLEGAL;
        else begin wen = 1'b1; result = {3'b000, 29'b0, opa[EXT_EX:EXT_CA]}; end
      end
      OP_MTEXT: begin
        if (!ODD) exc = EXC_ILLEGAL;
        else begin wen = 1'b1; result = {b[2:0], a}; end
      end
      default: exc = EXC_ILLEGAL;
    endcase

    if (!active || exc != EXC_NONE) begin
      wen = 1'b0; cr_we = 1'b0; mem = '0; ld = '0; verify = 1'b0; bri = 1'b0;
    end
    if (!active) exc = EXC_NONE;
  end
endmodule
