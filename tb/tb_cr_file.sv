// tb_cr_file: random compare-result writes from 8 ports; checks the
// forwarded read (same cycle) and the registered state against a model.
module tb_cr_file;
  import daisy_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] wen;
  logic [7:0][3:0] widx, wval;
  logic [15:0][3:0] rd_q, rd_fwd, model, expf;
  int checks = 0, failures = 0;

  cr_file dut (.*);

  initial begin
    wen = '0; widx = '0; wval = '0;
    @(posedge clk); #1 rst = 0; model = '0;
    checks++; if (rd_q !== '0) failures++;
    for (int t = 0; t < 3000; t++) begin
      wen = 8'($urandom); widx = 32'($urandom); wval = 32'($urandom);
      #1;
      expf = model;
      for (int p = 0; p < 8; p++) if (wen[p]) expf[widx[p]] = wval[p];
      checks++;
      if (rd_fwd !== expf) begin failures++; if (failures < 10) $display("FAIL fwd %h %h", rd_fwd, expf); end
      @(posedge clk); #1;
      model = expf;
      checks++;
      if (rd_q !== model) begin failures++; if (failures < 10) $display("FAIL q %h %h", rd_q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
