// tb_daisy_core: the core with its L1 instruction and data caches; the
// level behind them is a model in this testbench (instruction lines from
// the program image, data blocks from a sparse memory, random delays).
// Three short programs are run, each from reset, to reach the exceptions
// the end-to-end program does not: an operation in a slot that may not
// hold it, a misaligned non-speculative load, and a load verify that finds
// a different value. Each checks the cause, the recorded VLIW address,
// that the faulting VLIW left no result, that the VLIW before it did, that
// the handler ran, and (first program) that of two slots writing the same
// register in one VLIW the higher-numbered one wins.
module tb_daisy_core;
  import daisy_pkg::*;
  import tb_prog_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ic_rd_en; logic [24:0] ic_rd_line; iline_t ic_line; logic ic_hit, ic_busy;
  memreq_t [3:0] dc_req; logic dc_commit; logic [3:0][31:0] dc_rdata; logic dc_miss, dc_busy;
  logic [31:0] epc; exc_e cause;
  logic [31:0] cnt_cycles, cnt_retired, cnt_dstall, cnt_istall, cnt_exc, cnt_bri, cnt_bypass, cnt_multiway;
  logic i2_req; logic [24:0] i2_line; logic i2_ack; iline_t i2_rdata;
  logic d2_req, d2_we; logic [26:0] d2_blk; logic [255:0] d2_wdata, d2_rdata; logic d2_ack;
  logic [255:0] dmem [int];
  int checks = 0, failures = 0;

  daisy_core dut (.*);
  icache u_ic (.clk, .rst, .rd_en(ic_rd_en), .rd_line(ic_rd_line), .line(ic_line),
               .hit(ic_hit), .busy(ic_busy), .l2_req(i2_req), .l2_line(i2_line),
               .l2_ack(i2_ack), .l2_rdata(i2_rdata));
  dcache u_dc (.clk, .rst, .req(dc_req), .commit(dc_commit), .rdata(dc_rdata), .hit(),
               .miss(dc_miss), .busy(dc_busy), .l2_req(d2_req), .l2_we(d2_we),
               .l2_blk(d2_blk), .l2_wdata(d2_wdata), .l2_ack(d2_ack), .l2_rdata(d2_rdata));

  initial begin
    i2_ack = 0; i2_rdata = '0;
    forever begin
      @(posedge clk);
      if (!rst && i2_req && !i2_ack) begin
        repeat ($urandom_range(1, 4)) @(posedge clk);
        i2_rdata <= get_line(int'(i2_line)); i2_ack <= 1;
        @(posedge clk); i2_ack <= 0;
      end
    end
  end
  initial begin
    d2_ack = 0; d2_rdata = '0;
    forever begin
      @(posedge clk);
      if (!rst && d2_req && !d2_ack) begin
        repeat ($urandom_range(1, 4)) @(posedge clk);
        if (d2_we) dmem[int'(d2_blk)] = d2_wdata;
        else d2_rdata <= dmem.exists(int'(d2_blk)) ? dmem[int'(d2_blk)] : '0;
        d2_ack <= 1;
        @(posedge clk); d2_ack <= 0;
      end
    end
  end

  function automatic logic [34:0] reg_of(input int s, input int r);
    case (s)
      0: return dut.g_slot[0].u_rf.regs[r];
      1: return dut.g_slot[1].u_rf.regs[r];
      2: return dut.g_slot[2].u_rf.regs[r];
      3: return dut.g_slot[3].u_rf.regs[r];
      4: return dut.g_slot[4].u_rf.regs[r];
      5: return dut.g_slot[5].u_rf.regs[r];
      6: return dut.g_slot[6].u_rf.regs[r];
      default: return dut.g_slot[7].u_rf.regs[r];
    endcase
  endfunction

  task automatic chk(input string s, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: %h exp %h", s, g, e); end
  endtask

  // handler at the exception line: mark r28, then loop counting in r31
  function automatic void handler();
    put('h200, 0, hdr('h201), li(28, 'h55));
    put('h201, 0, hdr('h201), ri(OP_ADDI, 31, 31, 1));
  endfunction

  task automatic run(input int t);
    img.delete(); dmem.delete();
    handler();
    case (t)
      0: begin   // two writers of r1; AGEN in an odd slot
        put('h100, 0, hdr('h101), li(1, 1), '0, li(4, 4), '0, '0, '0, '0, li(1, 2));
        put('h101, 0, hdr('h102), li(2, 9), ri(OP_AGEN, 5, 4, 0));
      end
      1: begin   // misaligned word load
        put('h100, 0, hdr('h101), li(3, 'h4001), li(4, 4));
        put('h101, 0, hdr('h102), li(2, 9), ri(OP_LWZ, 5, 3, 0));
      end
      default: begin   // store, then a load verify against another value
        put('h100, 0, hdr('h101), li(3, 'h4000), li(4, 'h1234), li(7, 'h999));
        put('h101, 0, hdr('h102), '0, ri(OP_STW, 4, 3, 0));
        put('h102, 0, hdr('h103), li(2, 9), ri(OP_LVER, 7, 3, 0));
      end
    endcase
    rst = 1;
    repeat (3) @(posedge clk); #1 rst = 0;
    while (reg_of(0, 31)[31:0] < 3) @(posedge clk);
    @(posedge clk); #1;
    chk($sformatf("t%0d exceptions", t), 64'(cnt_exc), 1);
    chk($sformatf("t%0d cause", t), 64'(cause), t == 0 ? EXC_ILLEGAL : t == 1 ? EXC_ALIGN : EXC_VERIFY);
    chk($sformatf("t%0d epc", t), 64'(epc), t == 2 ? 'h8100 : 'h8080);
    for (int s = 0; s < 8; s++) begin
      chk($sformatf("t%0d handler ran s%0d", t, s), 64'(reg_of(s, 28)), 'h55);
      chk($sformatf("t%0d faulting VLIW left nothing s%0d", t, s), 64'(reg_of(s, 2)), 0);
      chk($sformatf("t%0d faulting VLIW left nothing r5 s%0d", t, s), 64'(reg_of(s, 5)), 0);
      if (t != 2) chk($sformatf("t%0d earlier VLIW committed s%0d", t, s), 64'(reg_of(s, 4)), 4);
      if (t == 0) chk($sformatf("higher slot wins s%0d", s), 64'(reg_of(s, 1)), 2);
      if (t == 2) chk($sformatf("t2 store/verify operand s%0d", s), 64'(reg_of(s, 7)), 'h999);
    end
    if (t == 2) chk("t2 store reached memory", 64'(u_dc.data[0]['h1000]), 'h1234);
  endtask

  initial begin
    for (int t = 0; t < 3; t++) run(t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
