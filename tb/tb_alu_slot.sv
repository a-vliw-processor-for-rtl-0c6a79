// tb_alu_slot: one even and one odd slot. Random operands for every
// arithmetic, logic, shift, compare and conditional operation, checked
// against 64-bit integer arithmetic in the testbench; directed checks for
// loads, stores, LVIA, commit, extender ops and the slot rules.
module tb_alu_slot;
  import daisy_pkg::*;
  op_t op; logic active; logic [34:0] opa, opb; logic [15:0][3:0] cr;
  logic [31:0] vliw_addr;
  logic [1:0] wen, cr_we, verify, bri;
  logic [1:0][34:0] result; logic [1:0][3:0] cr_idx, cr_val;
  memreq_t [1:0] mem; ldinfo_t [1:0] ld; exc_e [1:0] exc; logic [1:0][31:0] bri_tgt;
  int checks = 0, failures = 0;

  for (genvar g = 0; g < 2; g++) begin : g_u
    alu_slot #(.SLOT(g)) u (.op, .active, .opa, .opb, .cr, .vliw_addr,
      .wen(wen[g]), .result(result[g]), .cr_we(cr_we[g]), .cr_idx(cr_idx[g]),
      .cr_val(cr_val[g]), .mem(mem[g]), .ld(ld[g]), .verify(verify[g]),
      .exc(exc[g]), .bri(bri[g]), .bri_tgt(bri_tgt[g]));
  end

  task automatic chk(input string s, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 20) $display("FAIL %s: %h exp %h", s, g, e); end
  endtask

  function automatic logic [63:0] z(input longint v); return {32'b0, v[31:0]}; endfunction
  function automatic logic [9:0] rbf(input int rb); return {6'(rb), 4'b0}; endfunction

  initial begin
    longint a, b, r;
    active = 1; cr = '0; vliw_addr = 32'h8260;
    for (int t = 0; t < 400; t++) begin
      a = longint'($urandom); b = longint'($urandom);
      opa = {3'b000, 32'(a)}; opb = {3'b000, 32'(b)};
      op = mkop(OP_ADD, 6'd5, 6'd1, rbf(2)); #1;
      r = a + b;
      chk("add", 64'(result[0]), 64'({2'b00, r[32], r[31:0]}) | (64'((a[31]==b[31]) && (r[31]!=a[31])) << 33));
      op = mkop(OP_SUB, 6'd5, 6'd1, rbf(2)); #1;
      r = a + (~b & 64'hFFFFFFFF) + 1;
      chk("sub", 64'(result[0][31:0]), z((a - b)));
      chk("sub carry", 64'(result[0][32]), 64'(r[32]));
      op = mkop(OP_AND, 6'd5, 6'd1, rbf(2)); #1; chk("and", 64'(result[1]), z((a & b)));
      op = mkop(OP_OR,  6'd5, 6'd1, rbf(2)); #1; chk("or",  64'(result[1]), z((a | b)));
      op = mkop(OP_XOR, 6'd5, 6'd1, rbf(2)); #1; chk("xor", 64'(result[1]), z((a ^ b)));
      op = mkop(OP_SLW, 6'd5, 6'd1, rbf(2)); #1; chk("slw", 64'(result[0]), z((a << (b % 32))));
      op = mkop(OP_SRW, 6'd5, 6'd1, rbf(2)); #1; chk("srw", 64'(result[0]), z((a >> (b % 32))));
      op = mkop(OP_SRAW, 6'd5, 6'd1, rbf(2)); #1;
      chk("sraw", 64'(result[0]), z((longint'(int'(a)) >>> (b % 32))));
      op = mkop(OP_CMP, 6'd3, 6'd1, rbf(2)); #1;
      chk("cmp", {cr_we[0], cr_idx[0], cr_val[0]},
          {1'b1, 4'd3, 1'b0, a == b, int'(a) > int'(b), int'(a) < int'(b)});
      op = mkop(OP_CMPL, 6'd4, 6'd1, rbf(2)); #1;
      chk("cmpl", {cr_we[1], cr_idx[1], cr_val[1]},
          {1'b1, 4'd4, 1'b0, a == b, a > b, a < b});
      cr[7] = 4'($urandom);
      op = mkop(OP_CMOVT, 6'd5, 6'd1, 10'({4'd7, 2'd2})); #1;
      chk("cmovt", 64'(result[0]), cr[7][2] ? z((a)) : z((b)));
      op = mkop(OP_CMOVF, 6'd5, 6'd1, 10'({4'd7, 2'd2})); #1;
      chk("cmovf", 64'(result[0]), cr[7][2] ? z((b)) : z((a)));
    end
    // immediates, misc
    opa = {3'b000, 32'd1000}; opb = {3'b000, 32'hFFFF_FFF0};  // imm -16 as operand
    op = mkop(OP_ADDI, 6'd5, 6'd1, 10'h3F0); #1; chk("addi", 64'(result[0][31:0]), 64'd984);
    op = mkop(OP_LI, 6'd5, 6'b111111, 10'h3FE); #1; chk("li", 64'(result[0]), 64'h0_FFFF_FFFE);
    op = mkop(OP_LIS, 6'd5, 6'd0, 10'd1); #1; chk("lis", 64'(result[0]), 64'h1_0000);
    opa = {3'b000, 32'h0000_0080};
    op = mkop(OP_EXTSB, 6'd5, 6'd1, 10'd0); #1; chk("extsb", 64'(result[0]), 64'hFFFF_FF80);
    // address generation only in even slots
    opa = {3'b000, 32'h4000};
    op = mkop(OP_AGEN, 6'd5, 6'd1, 10'd12); #1;
    chk("agen even", {wen[0], result[0][31:0]}, {1'b1, 32'h400C});
    chk("agen odd illegal", 64'(exc[1]), 64'(EXC_ILLEGAL));
    // loads: odd slot only, alignment
    op = mkop(OP_LHA, 6'd5, 6'd1, 10'd6); #1;
    chk("lha req", {mem[1].valid, mem[1].we, mem[1].addr}, {2'b10, 32'h4006});
    chk("lha info", 64'(ld[1]), 64'({1'b1, 2'd2, 2'd1, 1'b1, 1'b0}));
    chk("load even illegal", 64'(exc[0]), 64'(EXC_ILLEGAL));
    op = mkop(OP_LWZ, 6'd5, 6'd1, 10'd2); #1;
    chk("lwz misaligned", {64'(exc[1]), 1'(mem[1].valid)}, {64'(EXC_ALIGN), 1'b0});
    op = mkop(OP_LWZS, 6'd5, 6'd1, 10'd2); #1;
    chk("lwzs deferred", {exc[1], mem[1].valid, wen[1], ld[1].dexc}, {EXC_NONE, 1'b0, 1'b1, 1'b1});
    opb = {3'b000, 32'h1234_56AB};
    op = mkop(OP_STB, 6'd5, 6'd1, 10'd3); #1;
    chk("stb", {mem[1].valid, mem[1].we, mem[1].be, mem[1].wdata}, {2'b11, 4'b1000, 32'hAB00_0000});
    op = mkop(OP_STH, 6'd5, 6'd1, 10'd2); #1;
    chk("sth", {mem[1].be, mem[1].wdata}, {4'b1100, 32'h56AB_0000});
    op = mkop(OP_LVER, 6'd5, 6'd1, 10'd0); #1;
    chk("lver", {verify[1], mem[1].valid, wen[1]}, 3'b110);
    // LVIA, commit, extender ops
    op = mkop(OP_LVIA, 6'd5, 6'd0, 10'd10); #1; chk("lvia", 64'(result[1]), 64'h83A0);
    opa = {3'b100, 32'h5};
    op = mkop(OP_COMMIT, 6'd5, 6'd1, 10'd0); #1;
    chk("commit exc", {exc[0], wen[0]}, {EXC_COMMIT, 1'b0});
    op = mkop(OP_MFEXT, 6'd5, 6'd1, 10'd0); #1; chk("mfext", 64'(result[1]), 64'd4);
    opa = {3'b010, 32'h5};
    op = mkop(OP_COMMIT, 6'd5, 6'd1, 10'd0); #1; chk("commit", 64'(result[0]), {29'b0, 3'b010, 32'h5});
    opa = {3'b001, 32'hFFFF_FFFF}; opb = {3'b000, 32'd1};
    op = mkop(OP_ADDE, 6'd5, 6'd1, rbf(2)); #1;
    chk("adde", 64'(result[1]), {29'b0, 3'b001, 32'h1});
    op = mkop(OP_MTEXT, 6'd5, 6'd1, rbf(2)); #1; chk("mtext", 64'(result[1]), {29'b0, 3'b001, 32'hFFFF_FFFF});
    chk("adde even illegal", 64'(exc[0]), 64'(EXC_ILLEGAL));
    op = mkop(OP_BRI, 6'd0, 6'd1, 10'd0); #1; chk("bri", {bri[0], bri_tgt[0]}, {1'b1, 32'hFFFF_FFFF});
    // deferred exception propagates through ordinary ops
    opa = {3'b100, 32'd1}; opb = {3'b000, 32'd1};
    op = mkop(OP_ADD, 6'd5, 6'd1, rbf(2)); #1; chk("propagate", 64'(result[0][34]), 64'd1);
    // inactive (not on the taken path): no effect
    active = 0; #1;
    chk("inactive", {wen, cr_we, mem[1].valid, bri, exc[0]}, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
