// tb_branch_unit: every tree shape with random condition registers, target
// offsets and bank next-line fields. The expected path comes from the trees
// written out as nested if/else (the worked example is shape 5: ccA=F -> P1,
// else ccB=T -> P4, else ccC=F -> P2, else P3). Also checks forced select
// and redirect.
module tb_branch_unit;
  import daisy_pkg::*;
  hdr_t hdr; logic ex_valid; logic [15:0][3:0] cr;
  logic [3:0][24:0] bank_next; logic force_sel; logic [1:0] force_sub;
  logic redirect; logic [24:0] redirect_line;
  logic [3:0] path_taken, subline_sel; logic [1:0] subline; logic [24:0] next_line;
  int checks = 0, failures = 0;

  branch_unit dut (.*);

  function automatic int ref_path(input int tree, input logic A, input logic B, input logic C);
    case (tree)
      1: return A ? 1 : 0;
      2: if (!A) return 0; else return B ? 2 : 1;
      3: if (A) return 2; else return B ? 1 : 0;
      4: if (!A) return B ? 1 : 0; else return C ? 3 : 2;
      5: if (!A) return 0; else if (B) return 3; else if (!C) return 1; else return 2;
      6: if (!A) return 0; else if (!B) return 1; else return C ? 3 : 2;
      7: if (A) return 3; else if (B) return 2; else return C ? 1 : 0;
      8: if (A) return 3; else if (!B) return 0; else return C ? 2 : 1;
      default: return 0;
    endcase
  endfunction

  task automatic chk(input string s, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 20) $display("FAIL %s: %h exp %h", s, g, e); end
  endtask

  initial begin
    ex_valid = 1; force_sel = 0; force_sub = 0; redirect = 0; redirect_line = 0;
    // the worked example, all 8 condition combinations
    for (int v = 0; v < 8; v++) begin
      int p;
      hdr = '0; hdr.tree_id = 5;
      hdr.cc[0] = '{cr: 4'd1, bit_sel: 2'd2}; hdr.cc[1] = '{cr: 4'd2, bit_sel: 2'd0};
      hdr.cc[2] = '{cr: 4'd3, bit_sel: 2'd3};
      hdr.tgt = {2'd3, 2'd2, 2'd1, 2'd0};
      cr = '0; cr[1][2] = v[0]; cr[2][0] = v[1]; cr[3][3] = v[2];
      for (int b = 0; b < 4; b++) bank_next[b] = 25'(100 + b);
      #1;
      // P1..P4 of the example are paths 0..3
      p = !v[0] ? 0 : v[1] ? 3 : !v[2] ? 1 : 2;
      chk("example path", 64'(path_taken), 64'(4'b0001 << p));
      chk("example next", 64'(next_line), 64'(100 + p));
    end
    for (int t = 0; t < 4000; t++) begin
      int p, tree;
      logic A, B, C;
      tree = $urandom_range(0, 15);
      hdr = '0; hdr.tree_id = 4'(tree);
      for (int i = 0; i < 3; i++) hdr.cc[i] = 6'($urandom);
      for (int i = 0; i < 4; i++) hdr.tgt[i] = 2'($urandom);
      for (int i = 0; i < 16; i++) cr[i] = 4'($urandom);
      for (int b = 0; b < 4; b++) bank_next[b] = 25'($urandom);
      force_sel = ($urandom_range(0, 9) == 0); force_sub = 2'($urandom);
      redirect = ($urandom_range(0, 9) == 0); redirect_line = 25'($urandom);
      #1;
      A = cr[hdr.cc[0].cr][hdr.cc[0].bit_sel];
      B = cr[hdr.cc[1].cr][hdr.cc[1].bit_sel];
      C = cr[hdr.cc[2].cr][hdr.cc[2].bit_sel];
      p = ref_path(tree > 8 ? 0 : tree, A, B, C);
      chk("path", 64'(path_taken), 64'(4'b0001 << p));
      chk("subline", 64'(subline), force_sel ? 64'(force_sub) : 64'(hdr.tgt[p]));
      chk("next", 64'(next_line), redirect ? 64'(redirect_line) :
          64'(bank_next[force_sel ? force_sub : hdr.tgt[p]]));
    end
    ex_valid = 0; force_sel = 0; #1;
    chk("no VLIW", 64'(path_taken), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
