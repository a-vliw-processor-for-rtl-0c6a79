// tb_l3_ctrl: the L3 controller with a pipelined SRAM model (SRAM_LAT
// cycles read latency) and a line-level bus-side memory with a random
// delay. Random line reads and writes from a few sets with several tags
// are compared with a reference; the test checks hits, dirty write-backs
// to the bus, the number of SRAM directory and data accesses per request,
// and that SRAM accesses are never closer than SRAM_CYC cycles.
module tb_l3_ctrl;
  import daisy_pkg::*;
  localparam int SRAM_LAT = 3, SRAM_CYC = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req, we; logic [24:0] line; logic [LINE_W-1:0] wdata, rdata; logic ack;
  logic sram_ce, sram_we, sram_dir; logic [18:0] sram_addr; logic [VLIW_W-1:0] sram_wdata, sram_rdata;
  logic bus_req, bus_we; logic [24:0] bus_line; logic [LINE_W-1:0] bus_wdata, bus_rdata; logic bus_ack;
  int n_dir, n_data;
  logic [LINE_W-1:0] mem [int];
  logic [LINE_W-1:0] refl [int];
  int checks = 0, failures = 0, n_brd = 0, n_bwr = 0, last_ce = -100, cyc = 0;

  l3_ctrl dut (.*);
  l3_sram_model #(.AW(19), .LAT(SRAM_LAT)) u_sram (
    .clk, .ce(sram_ce), .we(sram_we), .dir(sram_dir), .addr(sram_addr),
    .wdata(sram_wdata), .rdata(sram_rdata), .n_dir, .n_data);

  function automatic logic [LINE_W-1:0] init_line(input int la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < LINE_W / 32; w++) l[32*w +: 32] = 32'(la * 7919 + w);
    return l;
  endfunction
  function automatic logic [LINE_W-1:0] rd_ref(input int la);
    return refl.exists(la) ? refl[la] : init_line(la);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (!rst && sram_ce) begin
      checks++;
      if (cyc - last_ce < SRAM_CYC) begin failures++; $display("FAIL SRAM accesses %0d cycles apart", cyc - last_ce); end
      last_ce = cyc;
    end
  end

  initial begin
    bus_ack = 0; bus_rdata = '0;
    forever begin
      @(posedge clk);
      if (!rst && bus_req && !bus_ack) begin
        repeat ($urandom_range(2, 8)) @(posedge clk);
        if (bus_we) begin mem[int'(bus_line)] = bus_wdata; n_bwr++; end
        else begin bus_rdata <= mem.exists(int'(bus_line)) ? mem[int'(bus_line)] : init_line(int'(bus_line)); n_brd++; end
        bus_ack <= 1;
        @(posedge clk); bus_ack <= 0;
      end
    end
  end

  initial begin
    int hits = 0;
    req = 0; we = 0; line = 0; wdata = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 500; t++) begin
      int d0, x0, b0;
      line = 25'($urandom_range(0, 3)) << 17 | 25'($urandom_range(0, 5));
      we = $urandom_range(0, 2) == 0;
      for (int w = 0; w < LINE_W / 32; w++) wdata[32*w +: 32] = $urandom;
      d0 = n_dir; x0 = n_data; b0 = n_brd + n_bwr;
      req = 1;
      do @(posedge clk); while (!ack);
      if (we) refl[int'(line)] = wdata;
      else begin
        checks++;
        if (rdata !== rd_ref(int'(line))) begin failures++; if (failures < 10) $display("FAIL read line %h", line); end
      end
      #1 req = 0;
      @(posedge clk); #1;
      // a hit is one directory access plus four data accesses
      if (n_brd + n_bwr == b0) begin
        hits++;
        checks++;
        if (n_dir - d0 != 1 + int'(we) || n_data - x0 != 4) begin
          failures++; $display("FAIL hit accesses dir %0d data %0d", n_dir - d0, n_data - x0);
        end
      end
    end
    checks++;
    if (hits == 0 || n_brd == 0 || n_bwr == 0) begin failures++; $display("FAIL hits %0d bus rd %0d wr %0d", hits, n_brd, n_bwr); end
    $display("hits %0d bus reads %0d writes %0d", hits, n_brd, n_bwr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
