// tb_load_align: every size, offset and extension against values built
// byte by byte in the testbench.
module tb_load_align;
  import daisy_pkg::*;
  logic [31:0] raw;
  ldinfo_t info;
  logic [34:0] result, e;
  int checks = 0, failures = 0;
  load_align dut (.*);
  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] b [4];
      raw = $urandom;
      for (int i = 0; i < 4; i++) b[i] = raw[8*i +: 8];
      info.en = 1; info.size = 2'($urandom_range(0, 2)); info.sext = 1'($urandom);
      info.dexc = ($urandom_range(0, 9) == 0);
      info.ofs = (info.size == 2) ? 2'd0 : (info.size == 1) ? {1'($urandom), 1'b0} : 2'($urandom);
      #1;
      if (info.dexc) e = {3'b100, 32'b0};
      else if (info.size == 0) e = {3'b0, info.sext && b[info.ofs][7] ? 24'hFFFFFF : 24'h0, b[info.ofs]};
      else if (info.size == 1) e = {3'b0, info.sext && b[info.ofs+1][7] ? 16'hFFFF : 16'h0, b[info.ofs+1], b[info.ofs]};
      else e = {3'b0, b[3], b[2], b[1], b[0]};
      checks++;
      if (result !== e) begin failures++; if (failures < 10) $display("FAIL %h %p -> %h exp %h", raw, info, result, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
