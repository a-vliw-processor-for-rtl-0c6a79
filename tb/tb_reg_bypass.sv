// tb_reg_bypass: random write-back contents; the expected operand is found
// by searching the write-back results from the highest slot down.
module tb_reg_bypass;
  import daisy_pkg::*;
  logic [5:0] src; logic use_imm; logic [31:0] imm; logic [34:0] gpr_data;
  logic [7:0] en; logic [7:0][5:0] rt; logic [7:0][34:0] rslt;
  logic [3:0] ld_en; logic [3:0][5:0] ld_rt; logic [3:0][34:0] ld_rslt;
  logic [1:0] select_bypass; logic [34:0] operand, e;
  int checks = 0, failures = 0, nalu = 0, nld = 0;
  reg_bypass dut (.*);
  initial begin
    for (int t = 0; t < 5000; t++) begin
      src = 6'($urandom_range(0, 15)); use_imm = ($urandom_range(0, 7) == 0);
      imm = $urandom; gpr_data = {3'($urandom), 32'($urandom)};
      en = 8'($urandom); ld_en = 4'($urandom);
      for (int s = 0; s < 8; s++) begin rt[s] = 6'($urandom_range(0, 15)); rslt[s] = {3'($urandom), 32'($urandom)}; end
      for (int k = 0; k < 4; k++) begin
        ld_rt[k] = 6'($urandom_range(0, 15)); ld_rslt[k] = {3'($urandom), 32'($urandom)};
        if (ld_en[k]) en[2*k+1] = 1'b0;   // a slot writes either an ALU or a load result
      end
      #1;
      e = gpr_data;
      for (int s = 7; s >= 0; s--) begin
        if (s % 2 == 1 && ld_en[s/2] && ld_rt[s/2] == src) begin e = ld_rslt[s/2]; break; end
        if (en[s] && rt[s] == src) begin e = rslt[s]; break; end
      end
      if (use_imm) e = {3'b0, imm};
      checks++;
      if (operand !== e) begin failures++; if (failures < 10) $display("FAIL src %0d got %h exp %h", src, operand, e); end
      if (select_bypass == 1) nalu++;
      if (select_bypass == 2) nld++;
    end
    checks++; if (nalu == 0 || nld == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
