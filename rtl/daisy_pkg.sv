// daisy_pkg: types and constants shared by the DAISY tree-VLIW processor.
//
// The processor issues one tree VLIW per cycle to 8 integer issue slots. A
// tree VLIW is a 64-bit control header plus 8 operations of 32 bits. The
// header names the cache line that holds all (up to four) possible successor
// VLIWs, the shape of the branch tree, the three condition bits the tree
// tests and, for each of the four paths, which bank of that line holds the
// path's target. Each operation carries a 4-bit path mask: it commits only if
// the path the tree selects is in its mask.
//
// From the design description: 8 slots, 64 GPRs, 16 condition registers,
// up to 4 paths per VLIW, 4 memory operations per VLIW (odd slots), extender
// bits carry/overflow/exception, the operation classes and their slot rules,
// 128-byte instruction lines holding four target VLIWs, 32-byte data lines.
// Own choices: all bit encodings (operation and header formats, opcode
// numbers, tree shape numbers), 32-bit data, little-endian byte order, and a
// 256-bit header side band per 128-byte line (the 64-bit header of each of
// the four VLIWs) that travels with the line through L2, L3 and the bus.
package daisy_pkg;

  localparam int XLEN    = 32;   // integer register width
  localparam int EXT_W   = 3;    // extender bits {exception, overflow, carry}
  localparam int REG_W   = XLEN + EXT_W;
  localparam int NSLOT   = 8;    // issue slots (ALUs)
  localparam int NMEM    = 4;    // memory ports, one per odd slot
  localparam int NGPR    = 64;
  localparam int NCR     = 16;
  localparam int NPATH   = 4;    // paths (branch targets) per tree VLIW
  localparam int OP_W    = 32;
  localparam int HDR_W   = 64;
  localparam int VLIW_W  = HDR_W + NSLOT*OP_W;      // 320
  localparam int LOPS_W  = NPATH*NSLOT*OP_W;        // 1024: 128 bytes of data
  localparam int LHDR_W  = NPATH*HDR_W;             // 256: header side band
  localparam int LINE_W  = LOPS_W + LHDR_W;         // 1280
  localparam int LADDR_W = 25;   // line address = byte address [31:7]
  localparam int DBLK_W  = 256;  // L1 data cache line (32 bytes)

  // Extender bit positions inside a 35-bit register value
  localparam int EXT_CA  = XLEN;     // carry
  localparam int EXT_OV  = XLEN + 1; // overflow
  localparam int EXT_EX  = XLEN + 2; // deferred exception (speculation)

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    // add/sub
    OP_ADD   = 6'd1,  OP_ADDI  = 6'd2,  OP_SUB   = 6'd3,  OP_ADDE  = 6'd4,
    // logic
    OP_AND   = 6'd5,  OP_OR    = 6'd6,  OP_XOR   = 6'd7,  OP_ANDI  = 6'd8,
    OP_ORI   = 6'd9,  OP_XORI  = 6'd10,
    // shifts
    OP_SLW   = 6'd11, OP_SRW   = 6'd12, OP_SRAW  = 6'd13, OP_SLWI  = 6'd14,
    OP_SRWI  = 6'd15, OP_SRAWI = 6'd16,
    // compares (write a condition register)
    OP_CMP   = 6'd17, OP_CMPI  = 6'd18, OP_CMPL  = 6'd19, OP_CMPLI = 6'd20,
    // conditional ops
    OP_CMOVT = 6'd21, OP_CMOVF = 6'd22,
    // misc ops
    OP_LI    = 6'd23, OP_LIS   = 6'd24, OP_EXTSB = 6'd25, OP_EXTSH = 6'd26,
    OP_BRI   = 6'd27,
    // address generation (even slots)
    OP_AGEN  = 6'd28,
    // loads and stores (odd slots)
    OP_LWZ   = 6'd29, OP_LHZ   = 6'd30, OP_LHA   = 6'd31, OP_LBZ   = 6'd32,
    OP_LWZS  = 6'd33, OP_STW   = 6'd34, OP_STH   = 6'd35, OP_STB   = 6'd36,
    // load VLIW instruction address (odd slots)
    OP_LVIA  = 6'd37,
    // commit (all slots)
    OP_COMMIT= 6'd38,
    // load verify (odd slots)
    OP_LVER  = 6'd39,
    // extender ops (odd slots)
    OP_MFEXT = 6'd40, OP_MTEXT = 6'd41
  } opc_e;

  // Operation: path mask, opcode, target, source A, 10-bit immediate whose
  // upper 6 bits name source B for register-register forms.
  typedef struct packed {
    logic [NPATH-1:0] path;
    opc_e             opc;
    logic [5:0]       rt;
    logic [5:0]       ra;
    logic [9:0]       imm;
  } op_t;

  // Condition bit select: condition register number and bit (0 LT, 1 GT,
  // 2 EQ, 3 SO).
  typedef struct packed {
    logic [3:0] cr;
    logic [1:0] bit_sel;
  } ccsel_t;

  typedef struct packed {
    logic [LADDR_W-1:0]          next_line; // line holding all targets
    logic [3:0]                  tree_id;   // tree shape
    ccsel_t [2:0]                cc;        // tests A (0), B (1), C (2)
    logic [NPATH-1:0][1:0]       tgt;       // bank of each path's target
    logic [8:0]                  spare;
  } hdr_t;

  typedef struct packed {
    hdr_t                  hdr;
    op_t [NSLOT-1:0]       ops;
  } vliw_t;

  // A 128-byte instruction line: data bytes 0..127 are the operations of the
  // four VLIWs (VLIW b at bytes 32b..32b+31), the side band their headers.
  typedef struct packed {
    hdr_t [NPATH-1:0]              hdr;
    op_t  [NPATH-1:0][NSLOT-1:0]   ops;
  } iline_t;

  typedef enum logic [2:0] {
    EXC_NONE    = 3'd0,
    EXC_ILLEGAL = 3'd1,   // operation not allowed in its slot
    EXC_ALIGN   = 3'd2,   // misaligned non-speculative access
    EXC_COMMIT  = 3'd3,   // commit of a register with a deferred exception
    EXC_VERIFY  = 3'd4    // load verify found a different value
  } exc_e;

  // Memory request of one port, made in EX
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;   // store data placed on its byte lanes
    logic [3:0]  be;
  } memreq_t;

  // Load bookkeeping carried from EX to WB for the load shift and select
  typedef struct packed {
    logic       en;
    logic [1:0] ofs;
    logic [1:0] size;    // 0 byte, 1 half, 2 word
    logic       sext;
    logic       dexc;    // speculative load that faulted
  } ldinfo_t;


  // Second register operand: rt for stores, conditional moves and load
  // verify, otherwise the B field imm[9:4].
  function automatic logic srcb_is_rt(input opc_e o);
    return o inside {OP_STW, OP_STH, OP_STB, OP_CMOVT, OP_CMOVF, OP_LVER};
  endfunction

  function automatic logic uses_imm(input opc_e o);
    return o inside {OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLWI, OP_SRWI,
                     OP_SRAWI, OP_CMPI, OP_CMPLI, OP_LI, OP_LIS};
  endfunction


  // Immediate operand: zero-extended for the logical and unsigned-compare
  // forms, sign-extended otherwise.
  function automatic logic [XLEN-1:0] imm_value(input op_t o);
    if (o.opc inside {OP_ANDI, OP_ORI, OP_XORI, OP_CMPLI})
      return {{(XLEN-10){1'b0}}, o.imm};
    return {{(XLEN-10){o.imm[9]}}, o.imm};
  endfunction

  function automatic logic [XLEN-1:0] sext10(input logic [9:0] v);
    return {{(XLEN-10){v[9]}}, v};
  endfunction

  function automatic op_t mkop(input opc_e o, input logic [5:0] rt,
                               input logic [5:0] ra, input logic [9:0] imm,
                               input logic [NPATH-1:0] path = 4'hF);
    op_t r;
    r.path = path; r.opc = o; r.rt = rt; r.ra = ra; r.imm = imm;
    return r;
  endfunction

endpackage
