// tb_prog_pkg: builds tree-VLIW test programs as an image of instruction
// lines (operations plus header side band), and the reference values the
// testbenches compare against. Memory models return this image for every
// line that has not been written.
package tb_prog_pkg;
  import daisy_pkg::*;

  iline_t img [int];

  function automatic hdr_t hdr(input int next_line, input int tree = 0,
                               input int tg0 = 0, input int tg1 = 0,
                               input int tg2 = 0, input int tg3 = 0,
                               input ccsel_t ca = '0, input ccsel_t cb = '0,
                               input ccsel_t cc = '0);
    hdr_t h;
    h = '0;
    h.next_line = LADDR_W'(next_line);
    h.tree_id   = 4'(tree);
    h.cc[0] = ca; h.cc[1] = cb; h.cc[2] = cc;
    h.tgt[0] = 2'(tg0); h.tgt[1] = 2'(tg1); h.tgt[2] = 2'(tg2); h.tgt[3] = 2'(tg3);
    return h;
  endfunction

  function automatic ccsel_t cc(input int cr, input int b);
    ccsel_t c;
    c.cr = 4'(cr); c.bit_sel = 2'(b);
    return c;
  endfunction

  // put one VLIW at (line, bank); ops not given are NOPs
  function automatic void put(input int line, input int bank, input hdr_t h,
                              input op_t o0 = '0, input op_t o1 = '0,
                              input op_t o2 = '0, input op_t o3 = '0,
                              input op_t o4 = '0, input op_t o5 = '0,
                              input op_t o6 = '0, input op_t o7 = '0);
    iline_t l;
    if (img.exists(line)) l = img[line]; else l = '0;
    l.hdr[bank] = h;
    l.ops[bank][0] = o0; l.ops[bank][1] = o1; l.ops[bank][2] = o2;
    l.ops[bank][3] = o3; l.ops[bank][4] = o4; l.ops[bank][5] = o5;
    l.ops[bank][6] = o6; l.ops[bank][7] = o7;
    img[line] = l;
  endfunction

  function automatic iline_t get_line(input int line);
    if (img.exists(line)) return img[line];
    return '0;
  endfunction

  function automatic logic [9:0] i10(input int v);
    return 10'(v);
  endfunction

  // register-register form: B register in imm[9:4]
  function automatic op_t rr(input opc_e o, input int rt, input int ra,
                             input int rb, input logic [3:0] path = 4'hF);
    return mkop(o, 6'(rt), 6'(ra), {6'(rb), 4'b0}, path);
  endfunction
  function automatic op_t ri(input opc_e o, input int rt, input int ra,
                             input int imm, input logic [3:0] path = 4'hF);
    return mkop(o, 6'(rt), 6'(ra), 10'(imm), path);
  endfunction
  // load immediate (16-bit value split over the ra and imm fields)
  function automatic op_t li(input int rt, input int v, input logic [3:0] path = 4'hF);
    logic [15:0] x;
    x = 16'(v);
    return mkop(OP_LI, 6'(rt), x[15:10], x[9:0], path);
  endfunction

  // ------------------------------------------------------------------
  // The end-to-end program. It is written so that every mechanism of the
  // pipeline occurs: cold instruction and data misses, register and load
  // bypassing, 4 memory ops in one VLIW, a 4-way tree branch (the worked
  // example's tree shape), a counted loop, an indirect branch, a
  // speculative load with a deferred exception, a commit that raises it,
  // the exception handler returning through an indirect branch, a dirty
  // data-cache eviction, lines pushed down through L2 and L3 onto the bus
  // and a self-loop at the end (r31 counts its turns).
  localparam int DBASE = 'h4000;
  localparam int VEND_LINE = 'h1F1;

  function automatic void build_main();
    img.delete();
    // V0: constants
    put('h100, 0, hdr('h101),
        li(1, 5), li(2, 7), li(3, DBASE), li(10, 3),
        li(4, 0), li(20, 'h4100), li(21, 0), ri(OP_LIS, 32, 0, 1));
    // V1: ALU ops reading V0's results through the bypass, 3 stores, LVIA
    put('h101, 0, hdr('h102),
        rr(OP_ADD, 5, 1, 2), ri(OP_STW, 1, 3, 0), rr(OP_SUB, 6, 2, 1),
        ri(OP_STW, 2, 3, 4), ri(OP_SLWI, 7, 1, 3), ri(OP_STB, 1, 3, 9),
        ri(OP_CMPI, 1, 1, 5), ri(OP_LVIA, 22, 0, 0));
    // V2: 4 loads (hit the stores still in the write buffers)
    put('h102, 0, hdr('h103),
        rr(OP_ADD, 13, 5, 6), ri(OP_LWZ, 8, 3, 0), rr(OP_ADD, 14, 7, 1),
        ri(OP_LWZ, 9, 3, 4), rr(OP_CMP, 2, 5, 6), ri(OP_LBZ, 11, 3, 9),
        rr(OP_ADD, 33, 32, 3), ri(OP_LHA, 12, 3, 0));
    // V3: load bypass and the example tree: A = cr1.EQ, B = cr2.LT,
    // C = cr2.GT  ->  A=T, B=F, C=T selects path 2 (P3)
    put('h103, 0, hdr('h104, 5, 0, 1, 2, 1, cc(1, 2), cc(2, 0), cc(2, 1)),
        rr(OP_ADD, 15, 8, 9), '0, rr(OP_ADD, 16, 11, 12), '0,
        li(17, 100, 4'b0001), li(18, 1, 4'b1010), li(17, 200, 4'b0100),
        li(18, 2, 4'b0100));
    // wrong targets
    put('h104, 0, hdr('h1F1), li(30, 'hBAD));
    put('h104, 1, hdr('h1F1), li(30, 'hBAD));
    // V4 (loop body): r10 -= 1, r21 += r1
    put('h104, 2, hdr('h105),
        ri(OP_ADDI, 10, 10, -1), '0, rr(OP_ADD, 21, 21, 1));
    // V5: compare r10 with 0 into cr3
    put('h105, 0, hdr('h106), ri(OP_CMPI, 3, 10, 0));
    // V6: loop back (cr3.EQ false -> path 0 -> V4) or exit (path 1 -> V7)
    put('h106, 0, hdr('h104, 1, 2, 3, 0, 0, cc(3, 2)));
    // V7: speculative misaligned load (deferred), LVIA of V8's address
    put('h104, 3, hdr('h106, 0, 1),
        '0, ri(OP_LWZS, 23, 3, 2), '0, ri(OP_LVIA, 24, 0, 10));
    // V7b: indirect branch to V8, read the extender bits of r23
    put('h106, 1, hdr('h105, 0, 1),
        rr(OP_BRI, 0, 24, 0), rr(OP_MFEXT, 25, 23, 0));
    put('h105, 1, hdr('h1F1), li(30, 'hBAD));
    // V8: commit of r23 raises the deferred exception; nothing commits
    put('h107, 1, hdr('h108), ri(OP_COMMIT, 26, 23, 0), '0, li(27, 'h77));
    // exception handler: mark, return to line 0x1F0 through LVIA + BRI
    put('h200, 0, hdr('h201), li(28, 'h55), ri(OP_LVIA, 29, 0, -64));
    put('h201, 0, hdr('h202), rr(OP_BRI, 0, 29, 0));
    put('h202, 0, hdr('h1F1), li(30, 'hBAD));
    // V10: stores to the data lines, load verify that passes
    put('h1F0, 0, hdr('h1F2),
        '0, ri(OP_STW, 21, 3, 16), '0, ri(OP_STW, 15, 20, 0),
        '0, ri(OP_LVER, 8, 3, 0));
    // V10b: read back; V10c: conflicting line evicts the dirty one;
    // V10d: read the evicted data again
    put('h1F2, 0, hdr('h1F3), '0, ri(OP_LWZ, 19, 3, 16));
    put('h1F3, 0, hdr('h1F4), '0, ri(OP_LWZ, 34, 33, 0));
    put('h1F4, 0, hdr('h1F5), '0, ri(OP_LWZ, 35, 3, 4));
    // V11: addresses 0x44000 and 0x1004000 share the set of 0x4000 in D1
    // and L2, and the second shares its L3 set too: the first load pushes
    // the dirty L2 line of 0x4000 down into L3, the second pushes it out of
    // L3 onto the bus
    put('h1F5, 0, hdr('h1F6), ri(OP_LIS, 36, 0, 4), '0, ri(OP_LIS, 37, 0, 'h100));
    put('h1F6, 0, hdr('h1F7), rr(OP_ADD, 36, 36, 3), '0, rr(OP_ADD, 37, 37, 3));
    put('h1F7, 0, hdr('h1F8), '0, ri(OP_LWZ, 38, 36, 0));
    put('h1F8, 0, hdr('h1F1), '0, ri(OP_LWZ, 39, 37, 0));
    // end: self loop counting in r31
    put('h1F1, 0, hdr('h1F1), ri(OP_ADDI, 31, 31, 1));
  endfunction

  // expected final register values of the main program, extender bits
  // included (r6 and r10 end with the carry bit set: 7-5 borrows nothing,
  // 1 + (-1) carries out)
  function automatic logic [34:0] expect_main(input int r);
    case (r)
      1: return 5;        2: return 7;        3: return DBASE;
      5: return 12;       6: return 35'h1_0000_0002;  7: return 40;
      8: return 5;        9: return 7;        10: return 35'h1_0000_0000;
      11: return 5;       12: return 5;       13: return 14;
      14: return 45;      15: return 12;      16: return 10;
      17: return 200;     18: return 2;       19: return 15;
      20: return 'h4100;  21: return 15;      22: return 'h8080;
      23: return {3'b100, 32'h0};             24: return 'h83A0;
      25: return 4;       26: return 0;       27: return 0;
      28: return 'h55;    29: return 'hF800;  30: return 0;
      32: return 'h10000; 33: return 'h14000; 34: return 0;
      35: return 7;       36: return 'h44000; 37: return 'h100_4000;
      default: return 0;
    endcase
  endfunction
endpackage
