// tb_bus60x_if: the 60X bus interface against a bus-level memory model
// (address tenure answered with aack, four data beats with ta). Random
// line writes and reads are compared with a reference; lines never written
// must read as the preloaded memory image. The test checks that each line
// transfer is five bursts (four data quarters and one header burst) and
// that ts is only raised when no tenure is outstanding.
module tb_bus60x_if;
  import daisy_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req, we; logic [24:0] line; logic [LINE_W-1:0] wdata, rdata; logic ack;
  logic ts, tt_wr, tt_hdr, aack, dbo_en, ta; logic [31:0] a; logic [63:0] dbo, dbi;
  int n_rd_bursts, n_wr_bursts;
  logic [LINE_W-1:0] refl [int];
  int checks = 0, failures = 0, outstanding = 0;

  bus60x_if dut (.*);
  bus60x_mem u_mem (.*);

  always @(posedge clk) if (!rst) begin
    if (ts) begin
      checks++;
      if (outstanding != 0) begin failures++; $display("FAIL ts with tenure outstanding"); end
      outstanding = 1;
    end
    if (ta && u_mem.beat == 3) outstanding = 0;
  end

  initial begin
    tb_prog_pkg::build_main();
    req = 0; we = 0; line = 0; wdata = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      int r0, w0;
      line = 25'h100 + 25'($urandom_range(0, 40));
      we = $urandom_range(0, 2) == 0;
      for (int w = 0; w < LINE_W / 32; w++) wdata[32*w +: 32] = $urandom;
      r0 = n_rd_bursts; w0 = n_wr_bursts;
      req = 1;
      do @(posedge clk); while (!ack);
      if (we) refl[int'(line)] = wdata;
      else begin
        logic [LINE_W-1:0] e;
        e = refl.exists(int'(line)) ? refl[int'(line)] : tb_prog_pkg::get_line(int'(line));
        checks++;
        if (rdata !== e) begin failures++; if (failures < 10) $display("FAIL read line %h", line); end
      end
      #1 req = 0;
      @(posedge clk); #1;
      checks++;
      if (we ? (n_wr_bursts - w0 != 5) : (n_rd_bursts - r0 != 5)) begin
        failures++; $display("FAIL bursts rd %0d wr %0d", n_rd_bursts - r0, n_wr_bursts - w0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
