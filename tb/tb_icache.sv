// tb_icache: the L2 side is a model that answers a line request after a
// random delay with a line whose every field is a function of its address.
// Checks miss -> refill -> hit, the contents of all four VLIWs of a line,
// that conflicting lines replace each other, and the refill latency.
module tb_icache;
  import daisy_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic rd_en; logic [24:0] rd_line; iline_t line; logic hit, busy;
  logic l2_req; logic [24:0] l2_line; logic l2_ack; iline_t l2_rdata;
  int checks = 0, failures = 0, fills = 0;
  logic [15:0] tagpool [4] = '{16'h0000, 16'h0001, 16'h8000, 16'h8001};

  icache dut (.*);

  function automatic iline_t pattern(input logic [24:0] la);
    iline_t l;
    for (int b = 0; b < 4; b++) begin
      l.hdr[b] = {la, 4'(b), 6'h2A ^ 6'(la), 29'(la * 3 + b)};
      for (int s = 0; s < 8; s++) l.ops[b][s] = 32'(la * 1000 + b * 10 + s);
    end
    return l;
  endfunction

  // L2 model
  initial begin
    l2_ack = 0; l2_rdata = '0;
    forever begin
      @(posedge clk);
      if (!rst && l2_req && !l2_ack) begin
        repeat ($urandom_range(2, 6)) @(posedge clk);
        l2_rdata <= pattern(l2_line); l2_ack <= 1;
        fills++;
        @(posedge clk); l2_ack <= 0;
      end
    end
  end

  task automatic chk(input string s, input logic [63:0] g, input logic [63:0] e);
    checks++;
    if (g !== e) begin failures++; if (failures < 20) $display("FAIL %s: %h exp %h", s, g, e); end
  endtask

  task automatic fetch(input logic [24:0] la, output int wait_cycles);
    wait_cycles = 0;
    rd_line = la; rd_en = 1; #1;
    while (!hit) begin
      @(posedge clk); #1; rd_en = 0; wait_cycles++;
      while (busy) begin @(posedge clk); #1; wait_cycles++; end
      rd_en = 1; #1;
    end
    checks++;
    if (line !== pattern(la)) begin failures++; if (failures < 20) $display("FAIL line %h", la); end
    @(posedge clk); #1; rd_en = 0;
  endtask

  initial begin
    int w;
    rd_en = 0; rd_line = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    fetch(25'h100, w); chk("cold miss waited", 64'(w > 2), 1);
    fetch(25'h100, w); chk("hit no wait", 64'(w), 0);
    for (int i = 0; i < 200; i++) begin
      logic [24:0] la;
      // conflicting sets; the tags differ in their lowest and highest bits
      la = {tagpool[$urandom_range(0, 3)], 9'($urandom_range(0, 7))};
      fetch(la, w);
    end
    chk("fills happened", 64'(fills > 8), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
