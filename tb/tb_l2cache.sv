// tb_l2cache: an instruction requester and a data requester issue random
// line reads and 32-byte block reads/writes at the same time; the memory
// side is a line-level model with a random delay. Every returned line or
// block is compared with a reference memory. Addresses come from a few
// sets with several tags so that misses, dirty write-backs and refills are
// frequent; both requesters must be served (no starvation).
module tb_l2cache;
  import daisy_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic i_req; logic [24:0] i_line; logic i_ack; logic [LINE_W-1:0] i_rdata;
  logic d_req, d_we; logic [26:0] d_blk; logic [255:0] d_wdata; logic d_ack; logic [255:0] d_rdata;
  logic m_req, m_we; logic [24:0] m_line; logic [LINE_W-1:0] m_wdata; logic m_ack; logic [LINE_W-1:0] m_rdata;
  logic [LINE_W-1:0] mem [int];    // memory behind the L2
  logic [LINE_W-1:0] refl [int];   // architectural contents
  int checks = 0, failures = 0, n_mrd = 0, n_mwr = 0, n_i = 0, n_d = 0;

  l2cache dut (.*);

  function automatic logic [LINE_W-1:0] init_line(input int la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < LINE_W / 32; w++) l[32*w +: 32] = 32'(la * 4099 + w);
    return l;
  endfunction
  function automatic logic [LINE_W-1:0] rd_ref(input int la);
    return refl.exists(la) ? refl[la] : init_line(la);
  endfunction
  function automatic logic [24:0] rnd_line();
    return {23'($urandom_range(0, 5)), 2'b00} << 9 | 25'($urandom_range(0, 7));
  endfunction

  // memory model
  initial begin
    m_ack = 0; m_rdata = '0;
    forever begin
      @(posedge clk);
      if (!rst && m_req && !m_ack) begin
        repeat ($urandom_range(1, 5)) @(posedge clk);
        if (m_we) begin mem[int'(m_line)] = m_wdata; n_mwr++; end
        else begin m_rdata <= mem.exists(int'(m_line)) ? mem[int'(m_line)] : init_line(int'(m_line)); n_mrd++; end
        m_ack <= 1;
        @(posedge clk); m_ack <= 0;
      end
    end
  end

  // instruction side
  initial begin
    i_req = 0; i_line = 0;
    @(negedge rst);
    repeat (400) begin
      @(posedge clk); #1;
      i_line = rnd_line(); i_req = 1;
      do @(posedge clk); while (!i_ack);
      checks++;
      if (i_rdata !== rd_ref(int'(i_line))) begin failures++; if (failures < 10) $display("FAIL I line %h", i_line); end
      n_i++;
      #1 i_req = 0;
    end
  end

  // data side (the only writer, so its reference updates are ordered)
  initial begin
    d_req = 0; d_we = 0; d_blk = 0; d_wdata = 0;
    @(negedge rst);
    repeat (600) begin
      logic [LINE_W-1:0] l;
      @(posedge clk); #1;
      d_blk = {rnd_line(), 2'($urandom)}; d_we = $urandom_range(0, 1);
      for (int w = 0; w < 8; w++) d_wdata[32*w +: 32] = $urandom;
      d_req = 1;
      do @(posedge clk); while (!d_ack);
      l = rd_ref(int'(d_blk[26:2]));
      if (d_we) begin l[256*d_blk[1:0] +: 256] = d_wdata; refl[int'(d_blk[26:2])] = l; end
      else begin
        checks++;
        if (d_rdata !== l[256*d_blk[1:0] +: 256]) begin failures++; if (failures < 10) $display("FAIL D blk %h", d_blk); end
      end
      n_d++;
      #1 d_req = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (n_i == 400 && n_d == 600);
    checks++;
    if (n_mrd == 0 || n_mwr == 0) begin failures++; $display("FAIL no memory reads/writes"); end
    $display("memory reads %0d writes %0d", n_mrd, n_mwr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
