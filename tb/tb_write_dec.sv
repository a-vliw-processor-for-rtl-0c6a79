// tb_write_dec: random write-port patterns against a reference that scans
// the ports from the highest slot down (highest slot wins).
module tb_write_dec;
  import daisy_pkg::*;
  logic [7:0] wen;
  logic [7:0][5:0] wsel;
  logic [63:0] reg_we;
  logic [63:0][2:0] reg_port;
  int checks = 0, failures = 0;

  write_dec dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      wen = 8'($urandom);
      for (int p = 0; p < 8; p++) wsel[p] = (t % 2) ? 6'($urandom_range(0, 7)) : 6'($urandom);
      #1;
      for (int r = 0; r < 64; r++) begin
        logic ew; logic [2:0] ep;
        ew = 1'b0; ep = '0;
        for (int p = 7; p >= 0; p--)
          if (wen[p] && wsel[p] == r) begin ew = 1'b1; ep = 3'(p); break; end
        checks++;
        if (reg_we[r] !== ew || (ew && reg_port[r] !== ep)) begin
          failures++;
          if (failures < 10) $display("FAIL r%0d we %b/%b port %0d/%0d", r, reg_we[r], ew, reg_port[r], ep);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
