// tb_daisy_chip: end-to-end test of the whole chip at its full sizes.
// Runs the main program of tb_prog_pkg from cold caches: every line comes
// from the 60X bus memory model through L3, L2 and the L1 caches. Checks the
// final register values of every register-file copy, the exception state,
// and that each pipeline mechanism happened (instruction stall, data stall
// with rollback, register and load bypass, multi-way branch, indirect
// branch, exception, dirty eviction, L3 directory and line accesses).
module tb_daisy_chip;
  import daisy_pkg::*;
  import tb_prog_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic sram_ce, sram_we, sram_dir;
  logic [18:0] sram_addr;
  logic [VLIW_W-1:0] sram_wdata, sram_rdata;
  logic bus_ts, bus_tt_wr, bus_tt_hdr, bus_aack, bus_dbo_en, bus_ta;
  logic [31:0] bus_a;
  logic [63:0] bus_dbo, bus_dbi;
  logic [31:0] epc;
  exc_e cause;
  logic [31:0] cnt_cycles, cnt_retired, cnt_dstall, cnt_istall, cnt_exc,
               cnt_bri, cnt_bypass, cnt_multiway;
  int n_rd, n_wr, n_dir, n_data;
  int checks = 0, failures = 0;

  daisy_chip dut (.*);

  bus60x_mem u_mem (.clk, .rst, .ts(bus_ts), .a(bus_a), .tt_wr(bus_tt_wr),
    .tt_hdr(bus_tt_hdr), .aack(bus_aack), .dbo(bus_dbo), .dbo_en(bus_dbo_en),
    .dbi(bus_dbi), .ta(bus_ta), .n_rd_bursts(n_rd), .n_wr_bursts(n_wr));

  l3_sram_model #(.AW(19), .LAT(3)) u_sram (.clk, .ce(sram_ce), .we(sram_we),
    .dir(sram_dir), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata),
    .n_dir(n_dir), .n_data(n_data));

  int d2_wb = 0;
  always @(posedge clk) if (dut.d2_req && dut.d2_we && dut.d2_ack) d2_wb++;
  int l2_wb = 0;
  always @(posedge clk) if (dut.m_req && dut.m_we && dut.m_ack) l2_wb++;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic happened(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    build_main();
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // run until the final self loop has turned a few times
    while (dut.u_core.g_slot[0].u_rf.regs[31][31:0] < 5) @(posedge clk);
    $display("finished after %0d cycles, %0d VLIWs retired", cnt_cycles, cnt_retired);
    for (int c = 0; c < NSLOT; c++)
      for (int r = 1; r < 40; r++) begin
        logic [34:0] v;
        case (c)
          0: v = dut.u_core.g_slot[0].u_rf.regs[r];
          1: v = dut.u_core.g_slot[1].u_rf.regs[r];
          2: v = dut.u_core.g_slot[2].u_rf.regs[r];
          3: v = dut.u_core.g_slot[3].u_rf.regs[r];
          4: v = dut.u_core.g_slot[4].u_rf.regs[r];
          5: v = dut.u_core.g_slot[5].u_rf.regs[r];
          6: v = dut.u_core.g_slot[6].u_rf.regs[r];
          default: v = dut.u_core.g_slot[7].u_rf.regs[r];
        endcase
        if (r != 31) check($sformatf("copy %0d r%0d", c, r), 64'(v), 64'(expect_main(r)));
      end
    check("epc", 64'(epc), 64'h83A0);
    check("cause", 64'(cause), 64'(EXC_COMMIT));
    check("exceptions", 64'(cnt_exc), 64'd1);
    check("cr1", 64'(dut.u_core.u_cr.rd_q[1]), 64'b0100);
    $display("mechanisms:");
    happened("instruction stall", cnt_istall);
    happened("data stall / rollback", cnt_dstall);
    happened("bypass", cnt_bypass);
    happened("multi-way branch", cnt_multiway);
    happened("indirect branch", cnt_bri);
    happened("exception", cnt_exc);
    happened("D1 dirty write-back", d2_wb);
    happened("L2 dirty write-back to L3", l2_wb);
    happened("60X read bursts", n_rd);
    happened("60X write bursts (L3 victim)", n_wr);
    // the data written by the program reached memory behind the bus
    check("memory word 0x4010", 64'(u_mem.dmem[32'h200][4*32 +: 32]), 15);
    happened("L3 directory accesses", n_dir);
    happened("L3 data accesses", n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
