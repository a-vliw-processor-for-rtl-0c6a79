// tb_gpr_copy: random 8-port writes (port numbers chosen by the testbench)
// and 2-port reads against a reference array; checks reset clears.
module tb_gpr_copy;
  import daisy_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [63:0] reg_we;
  logic [63:0][2:0] reg_port;
  logic [7:0][34:0] wdata;
  logic [5:0] ra_a, ra_b;
  logic [34:0] rd_a, rd_b;
  logic [34:0] model [64];
  int checks = 0, failures = 0;

  gpr_copy dut (.*);

  task automatic chk(input logic [34:0] g, input logic [34:0] e, input string s);
    checks++;
    if (g !== e) begin failures++; if (failures < 10) $display("FAIL %s %h %h", s, g, e); end
  endtask

  initial begin
    reg_we = '0; reg_port = '0; wdata = '0; ra_a = 0; ra_b = 0;
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 64; r++) begin
      model[r] = '0;
      ra_a = 6'(r); #1 chk(rd_a, '0, "reset");
    end
    for (int t = 0; t < 3000; t++) begin
      for (int r = 0; r < 64; r++) begin
        reg_we[r] = ($urandom_range(0, 3) == 0);
        reg_port[r] = 3'($urandom);
      end
      for (int p = 0; p < 8; p++) wdata[p] = {3'($urandom), 32'($urandom)};
      @(posedge clk);
      for (int r = 0; r < 64; r++) if (reg_we[r]) model[r] = wdata[reg_port[r]];
      #1;
      reg_we = '0;
      ra_a = 6'($urandom); ra_b = 6'($urandom);
      #1 chk(rd_a, model[ra_a], "port a"); chk(rd_b, model[ra_b], "port b");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
