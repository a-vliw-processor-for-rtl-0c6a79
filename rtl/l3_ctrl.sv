// l3_ctrl: on-chip controller of the off-chip L3 cache.
//
// The L3 cache is 16 MB, direct mapped, with 128-byte lines, held in external
// synchronous SRAM organised as four banks. A typical access makes one
// directory access and four data accesses per line, as described. Here the
// four data accesses are the four 32-byte quarters of the line, each with
// the 64-bit header of the VLIW stored in that quarter (320-bit SRAM word,
// one word per bank); the directory word holds {valid, dirty, tag} of the
// line. The SRAM is pipelined: read data returns SRAM_LAT cycles after the
// access and a new access can start every SRAM_CYC cycles (8 ns initial
// delay and 5 ns pipelined cycle at the 350 MHz target give 3 and 2).
//
// Requests come from the L2 cache (hold `req` until the one-cycle `ack`;
// read data with the ack): a read hit reads the four words; a write (an L2
// victim) writes them and marks the line dirty; a miss first writes a dirty
// L3 victim to the 60X bus interface and, for a read, fetches the line from
// it and stores it. The L3 is write-back with write-allocate (own choice);
// the placement of the directory in its own SRAM word (`sram_dir`) and all
// encodings are this design's.
module l3_ctrl
  import daisy_pkg::*;
#(
  parameter int SIZE_MB  = 16,
  parameter int SRAM_LAT = 3,
  parameter int SRAM_CYC = 2
) (
  input  logic                      clk,
  input  logic                      rst,
  // from the L2 cache
  input  logic                      req,
  input  logic                      we,
  input  logic [LADDR_W-1:0]        line,
  input  logic [LINE_W-1:0]         wdata,
  output logic                      ack,
  output logic [LINE_W-1:0]         rdata,
  // external synchronous SRAM
  output logic                      sram_ce,
  output logic                      sram_we,
  output logic                      sram_dir,
  output logic [$clog2(SIZE_MB*1024*1024/128)+1:0] sram_addr,
  output logic [VLIW_W-1:0]         sram_wdata,
  input  logic [VLIW_W-1:0]         sram_rdata,
  // towards the 60X bus interface
  output logic                      bus_req,
  output logic                      bus_we,
  output logic [LADDR_W-1:0]        bus_line,
  output logic [LINE_W-1:0]         bus_wdata,
  input  logic                      bus_ack,
  input  logic [LINE_W-1:0]         bus_rdata
);
  localparam int IW = $clog2(SIZE_MB * 1024 * 1024 / 128);
  localparam int TW = LADDR_W - IW;

  typedef enum logic [3:0] {
    S_IDLE, S_DIR, S_CHECK, S_VREAD, S_BUSW, S_BUSR, S_READ, S_WRITE,
    S_DIRW, S_ACK
  } st_e;

  st_e                   st;
  logic                  r_we;
  logic [LADDR_W-1:0]    r_line;
  logic [NPATH-1:0][VLIW_W-1:0] lbuf;    // line as four SRAM words
  logic [TW-1:0]         dir_tag;
  logic                  dir_valid, dir_dirty;
  logic                  new_dirty;
  // access engine
  logic [2:0]            n_acc, issued, returned;
  logic [$clog2(SRAM_CYC+1)-1:0] gap;
  logic [SRAM_LAT-1:0]   pv;                 // read in flight per stage
  logic [SRAM_LAT-1:0][1:0] pb;             // its word number
  logic                  acc_rd, acc_dir, acc_done;

  function automatic logic [LINE_W-1:0] words_to_line(
      input logic [NPATH-1:0][VLIW_W-1:0] w);
    iline_t l;
    for (int b = 0; b < NPATH; b++) {l.hdr[b], l.ops[b]} = w[b];
    return l;
  endfunction

  function automatic logic [NPATH-1:0][VLIW_W-1:0] line_to_words(
      input iline_t l);
    logic [NPATH-1:0][VLIW_W-1:0] w;
    for (int b = 0; b < NPATH; b++) w[b] = {l.hdr[b], l.ops[b]};
    return w;
  endfunction

  assign acc_done = (issued == n_acc) && (!acc_rd || returned == n_acc) && (pv == '0);

  always_comb begin
    sram_ce    = 1'b0;
    sram_we    = 1'b0;
    sram_dir   = acc_dir;
    sram_addr  = {r_line[IW-1:0], issued[1:0]};
    sram_wdata = acc_dir ? VLIW_W'({dir_valid, new_dirty, r_line[LADDR_W-1:IW]})
                         : lbuf[issued[1:0]];
    if ((st inside {S_DIR, S_VREAD, S_READ, S_WRITE, S_DIRW}) &&
        issued < n_acc && gap == '0) begin
      sram_ce = 1'b1;
      sram_we = !acc_rd;
    end
  end

  assign ack       = (st == S_ACK);
  assign rdata     = words_to_line(lbuf);
  assign bus_req   = (st == S_BUSW) || (st == S_BUSR);
  assign bus_we    = (st == S_BUSW);
  assign bus_line  = (st == S_BUSW) ? {dir_tag, r_line[IW-1:0]} : r_line;
  assign bus_wdata = words_to_line(lbuf);

  // start an access sequence of n words
  task automatic start(input logic rd, input logic dir, input logic [2:0] n);
    acc_rd   <= rd;
    acc_dir  <= dir;
    n_acc    <= n;
    issued   <= '0;
    returned <= '0;
    gap      <= '0;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE;
      r_we <= 1'b0; r_line <= '0; lbuf <= '0;
      dir_tag <= '0; dir_valid <= 1'b0; dir_dirty <= 1'b0; new_dirty <= 1'b0;
      n_acc <= '0; issued <= '0; returned <= '0; gap <= '0;
      pv <= '0; pb <= '0; acc_rd <= 1'b0; acc_dir <= 1'b0;
    end else begin
      // access engine: issue, pace, collect read data
      if (sram_ce) begin
        issued <= issued + 3'd1;
        gap    <= ($bits(gap))'(SRAM_CYC - 1);
      end else if (gap != '0) gap <= gap - 1'b1;
      pv <= {pv[SRAM_LAT-2:0], sram_ce && acc_rd};
      pb <= {pb[SRAM_LAT-2:0], issued[1:0]};
      if (pv[SRAM_LAT-1]) begin
        returned <= returned + 3'd1;
        if (acc_dir) begin
          dir_valid <= sram_rdata[TW+1];
          dir_dirty <= sram_rdata[TW];
          dir_tag   <= sram_rdata[TW-1:0];
        end else lbuf[pb[SRAM_LAT-1]] <= sram_rdata;
      end

      unique case (st)
        S_IDLE: if (req) begin
          r_we   <= we;
          r_line <= line;
          lbuf   <= line_to_words(wdata);
          start(1'b1, 1'b1, 3'd1);
          st <= S_DIR;
        end
        S_DIR: if (acc_done) st <= S_CHECK;
        S_CHECK: begin
          if (dir_valid && dir_tag == r_line[LADDR_W-1:IW]) begin
            if (r_we) begin start(1'b0, 1'b0, 3'd4); new_dirty <= 1'b1; st <= S_WRITE; end
            else      begin start(1'b1, 1'b0, 3'd4); st <= S_READ; end
          end else if (dir_valid && dir_dirty) begin
            start(1'b1, 1'b0, 3'd4);
            st <= S_VREAD;
          end else if (r_we) begin
            start(1'b0, 1'b0, 3'd4); new_dirty <= 1'b1; st <= S_WRITE;
          end else st <= S_BUSR;
        end
        S_VREAD: if (acc_done) st <= S_BUSW;
        S_BUSW: if (bus_ack) begin
          if (r_we) begin
            lbuf <= line_to_words(wdata);   // the L2 still holds it
            start(1'b0, 1'b0, 3'd4); new_dirty <= 1'b1; st <= S_WRITE;
          end else st <= S_BUSR;
        end
        S_BUSR: if (bus_ack) begin
          lbuf <= line_to_words(bus_rdata);
          start(1'b0, 1'b0, 3'd4); new_dirty <= 1'b0; st <= S_WRITE;
        end
        S_READ: if (acc_done) st <= S_ACK;
        S_WRITE: if (acc_done) begin
          dir_valid <= 1'b1;
          start(1'b0, 1'b1, 3'd1);
          st <= S_DIRW;
        end
        S_DIRW: if (acc_done) st <= S_ACK;
        S_ACK: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
