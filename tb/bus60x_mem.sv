// bus60x_mem: behavioural model of the memory behind the 60X bus (bridge
// and DRAM). Answers each address tenure with aack one cycle later, then
// transfers four 64-bit beats, one per cycle, each with ta. Memory that
// has never been written reads as the test program image. Counts bursts.
module bus60x_mem
  import daisy_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ts,
  input  logic [31:0] a,
  input  logic        tt_wr,
  input  logic        tt_hdr,
  output logic        aack,
  input  logic [63:0] dbo,
  input  logic        dbo_en,
  output logic [63:0] dbi,
  output logic        ta,
  output int          n_rd_bursts,
  output int          n_wr_bursts
);
  logic [255:0] dmem [int];
  logic [255:0] hmem [int];
  logic [31:0]  ca;
  logic         cwr, chdr;
  int           beat;
  logic         active;

  function automatic logic [255:0] burst_of(input logic [31:0] ad, input logic h);
    iline_t l;
    int key;
    key = int'(ad[31:5]);
    if (h) begin
      if (hmem.exists(key)) return hmem[key];
      l = tb_prog_pkg::get_line(int'(ad[31:7]));
      return l.hdr;
    end
    if (dmem.exists(key)) return dmem[key];
    l = tb_prog_pkg::get_line(int'(ad[31:7]));
    return l.ops[ad[6:5]];
  endfunction

  always_comb dbi = burst_of(ca, chdr)[64*beat +: 64];

  always_ff @(posedge clk) begin
    if (rst) begin
      aack <= 1'b0; ta <= 1'b0; active <= 1'b0; beat <= 0;
      n_rd_bursts <= 0; n_wr_bursts <= 0;
    end else begin
      aack <= ts;
      if (ts) begin
        ca <= a; cwr <= tt_wr; chdr <= tt_hdr;
        if (tt_wr) n_wr_bursts <= n_wr_bursts + 1;
        else       n_rd_bursts <= n_rd_bursts + 1;
      end
      if (aack) begin active <= 1'b1; beat <= 0; ta <= 1'b1; end
      else if (active && ta) begin
        if (cwr) begin
          logic [255:0] b;
          b = burst_of(ca, chdr);
          b[64*beat +: 64] = dbo;
          if (chdr) hmem[int'(ca[31:5])] = b; else dmem[int'(ca[31:5])] = b;
        end
        if (beat == 3) begin active <= 1'b0; ta <= 1'b0; end
        else beat <= beat + 1;
      end
    end
  end
endmodule
