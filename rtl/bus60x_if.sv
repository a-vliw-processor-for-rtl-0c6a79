// bus60x_if: 60X system bus interface.
//
// Connects the L3 controller to the processor's external 60X bus, behind
// which a 60X-to-PCI bridge gives access to DRAM (where translated code
// lives), the flash ROM holding the translation software and I/O. The block
// moves whole 1280-bit lines: the 128 data bytes as four 32-byte bursts at
// the line's byte address plus one 32-byte burst carrying the line's VLIW
// headers (flagged by `tt_hdr`, same address). Every burst has an address
// tenure (`ts` for one cycle with address and transfer type, ended by
// `aack`) followed by four 64-bit data beats, each ended by `ta`.
// Signals are active high here. Only the block's name and its place in the
// system appear in the description; the burst protocol is reduced from the
// usual 60x bus (64-bit data, 4-beat bursts) and the side-band burst is this
// design's own.
//
// Upstream handshake: hold `req` (with `we`, `line`, `wdata`) until the
// one-cycle `ack`; read data come with the ack.
module bus60x_if
  import daisy_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 req,
  input  logic                 we,
  input  logic [LADDR_W-1:0]   line,
  input  logic [LINE_W-1:0]    wdata,
  output logic                 ack,
  output logic [LINE_W-1:0]    rdata,
  // 60X bus
  output logic                 ts,
  output logic [31:0]          a,
  output logic                 tt_wr,
  output logic                 tt_hdr,
  input  logic                 aack,
  output logic [63:0]          dbo,
  output logic                 dbo_en,
  input  logic [63:0]          dbi,
  input  logic                 ta
);
  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_AWAIT, S_DATA, S_ACK} st_e;

  st_e         st;
  logic [2:0]  burst;   // 0..3 data, 4 headers
  logic [1:0]  beat;
  logic [LINE_W-1:0] lbuf;
  logic [10:0] bitpos;

  assign bitpos = (burst == 3'd4) ? 11'(LOPS_W + 64*beat)
                                  : 11'(256*burst + 64*beat);
  assign ts     = (st == S_ADDR);
  assign a      = {line, (burst == 3'd4) ? 2'b00 : burst[1:0], 5'b00000};
  assign tt_wr  = we;
  assign tt_hdr = (burst == 3'd4);
  assign dbo    = lbuf[bitpos +: 64];
  assign dbo_en = (st == S_DATA) && we;
  assign ack    = (st == S_ACK);
  assign rdata  = lbuf;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE; burst <= '0; beat <= '0; lbuf <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (req) begin
          lbuf  <= wdata;
          burst <= '0;
          beat  <= '0;
          st    <= S_ADDR;
        end
        S_ADDR:  st <= aack ? S_DATA : S_AWAIT;
        S_AWAIT: if (aack) st <= S_DATA;
        S_DATA: if (ta) begin
          if (!we) lbuf[bitpos +: 64] <= dbi;
          beat <= beat + 2'd1;
          if (beat == 2'd3) begin
            if (burst == 3'd4) st <= S_ACK;
            else begin burst <= burst + 3'd1; st <= S_ADDR; end
          end
        end
        S_ACK: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
