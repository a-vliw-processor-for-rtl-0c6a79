// tb_dcache: random loads and stores on 4 ports against a byte-level
// reference memory. The L2 side is a model with a random delay. Addresses
// are drawn from few sets with several tags so that misses, dirty
// write-backs and refills are frequent. Stores are committed in the next
// cycle (as the core does); a random fraction is rolled back instead and
// must leave no trace (the VLIW after a rolled-back one is squashed, so
// that cycle carries no requests). Loads must see buffered stores of the previous cycle.
module tb_dcache;
  import daisy_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  memreq_t [3:0] req; logic commit;
  logic [3:0][31:0] rdata; logic [3:0] hit; logic miss, busy;
  logic l2_req, l2_we; logic [26:0] l2_blk; logic [255:0] l2_wdata, l2_rdata; logic l2_ack;
  logic [255:0] l2mem [int];
  logic [7:0] refm [int];
  int checks = 0, failures = 0, nwb = 0, nfill = 0, nroll = 0;

  dcache dut (.*);

  initial begin
    l2_ack = 0; l2_rdata = '0;
    forever begin
      @(posedge clk);
      if (!rst && l2_req && !l2_ack) begin
        repeat ($urandom_range(1, 4)) @(posedge clk);
        if (l2_we) begin l2mem[int'(l2_blk)] = l2_wdata; nwb++; end
        else begin l2_rdata <= l2mem.exists(int'(l2_blk)) ? l2mem[int'(l2_blk)] : '0; nfill++; end
        l2_ack <= 1;
        @(posedge clk); l2_ack <= 0;
      end
    end
  end

  function automatic logic [7:0] rb(input int a);
    return refm.exists(a) ? refm[a] : 8'h00;
  endfunction

  initial begin
    logic [31:0] st_addr [4]; logic [31:0] st_data [4]; logic [3:0] st_be [4]; logic st_v [4];
    req = '0; commit = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 3000; t++) begin
      // one VLIW: up to 4 accesses, retried until no miss
      for (int k = 0; k < 4; k++) begin
        req[k].valid = $urandom_range(0, 1);
        req[k].we    = $urandom_range(0, 1);
        req[k].addr  = {15'(0), 2'($urandom), 10'($urandom_range(0, 3)), 3'($urandom), 2'b00};
        req[k].wdata = $urandom;
        req[k].be    = 4'($urandom) | 4'b0001;
        // a direct-mapped cache cannot hold two lines of one set at once:
        // ports of one VLIW that share a set share its tag
        for (int j = 0; j < k; j++)
          if (req[j].addr[14:5] == req[k].addr[14:5]) req[k].addr[31:15] = req[j].addr[31:15];
      end
      #1;
      while (miss) begin
        @(posedge clk); #1; commit = 0;
        while (busy) begin @(posedge clk); #1; end
      end
      // check loads
      for (int k = 0; k < 4; k++) if (req[k].valid && !req[k].we) begin
        logic [31:0] e;
        for (int j = 0; j < 4; j++) e[8*j +: 8] = rb(int'(req[k].addr) + j);
        checks++;
        if (rdata[k] !== e) begin failures++; if (failures < 10) $display("FAIL load %h: %h exp %h", req[k].addr, rdata[k], e); end
      end
      for (int k = 0; k < 4; k++) begin
        st_v[k] = req[k].valid && req[k].we; st_addr[k] = req[k].addr;
        st_data[k] = req[k].wdata; st_be[k] = req[k].be;
      end
      @(posedge clk); #1;
      req = '0;
      commit = ($urandom_range(0, 7) != 0);
      if (commit) begin
        for (int k = 0; k < 4; k++) if (st_v[k])
          for (int j = 0; j < 4; j++) if (st_be[k][j]) refm[int'(st_addr[k]) + j] = st_data[k][8*j +: 8];
      end else begin
        // rollback: the following VLIW is squashed too, so no requests
        nroll++;
        @(posedge clk); #1;
      end
    end
    checks++; if (nwb == 0 || nfill == 0 || nroll == 0) begin failures++; $display("FAIL no wb/fill/rollback"); end
    $display("fills %0d write-backs %0d rollbacks %0d", nfill, nwb, nroll);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
