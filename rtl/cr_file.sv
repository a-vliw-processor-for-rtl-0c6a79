// cr_file: the 16 condition registers.
//
// Each condition register is a 4-bit field {SO, EQ, GT, LT} written by the
// compare operations of any slot (8 write ports, higher slot wins). The
// whole file is read every cycle by the branch units, which test up to three
// condition bits per tree VLIW, and by the conditional operations. rd_q is
// the registered state; rd_fwd is the state with this cycle's writes applied,
// which is what the VLIW executing in the same cycle must see (the writes
// come from the write-back stage of the previous VLIW). The number of
// registers follows the description; field width and forwarding are this
// design's own choices.
module cr_file
  import daisy_pkg::*;
#(
  parameter int NPORT = NSLOT,
  parameter int NREG  = NCR
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic [NPORT-1:0]                   wen,
  input  logic [NPORT-1:0][$clog2(NREG)-1:0] widx,
  input  logic [NPORT-1:0][3:0]              wval,
  output logic [NREG-1:0][3:0]               rd_q,
  output logic [NREG-1:0][3:0]               rd_fwd
);
  always_comb begin
    rd_fwd = rd_q;
    for (int p = 0; p < NPORT; p++)
      if (wen[p]) rd_fwd[widx[p]] = wval[p];
  end

  always_ff @(posedge clk) begin
    if (rst) rd_q <= '0;
    else     rd_q <= rd_fwd;
  end
endmodule
