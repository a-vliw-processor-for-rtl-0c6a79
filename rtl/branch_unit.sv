// branch_unit: branch and path select unit (one of four identical copies).
//
// Every cycle the tree VLIW in EX chooses one of up to four paths and so one
// of the four VLIWs of the instruction line being read in the same cycle
// (that line, named by the VLIW's header, holds all its possible targets).
// The unit follows the instruction-cache critical path drawing:
//   * Condition Code Select picks the three condition bits A, B, C the
//     header names out of the 16 condition registers;
//   * Tree ID Decode turns the 4-bit tree shape into, for every path, the
//     value each test must have (false, true, or not tested);
//   * Path Select compares the two and yields path0_taken .. path3_taken;
//   * Decoded Offset Select turns the taken path's target offset (the bank
//     of the line holding its target) into a one-hot subline select;
//   * the next-line address is the selected bank's own header next-line
//     field, or, through the 2:1 multiplexers, a redirect address
//     (reset, exception, indirect branch, stall recovery).
// Paths are numbered left to right as drawn, the left branch of every test
// being its false outcome. Tree shapes (own numbering):
//   0: one path        1: A                      2: A, then B on A=T
//   3: A, B on A=F     4: A, B on A=F, C on A=T  5: A, B on A=T, C on B=F
//   6: A, B on A=T, C on B=T                     7: A, B on A=F, C on B=F
//   8: A, B on A=F, C on B=T              9..15: treated as shape 0.
// Shape 5 is the tree of the worked example. When `force_sel` is set (first
// fetch after a redirect, when no VLIW is in EX) `force_sub` picks the bank.
// Combinational.
module branch_unit
  import daisy_pkg::*;
(
  input  hdr_t                          hdr,        // header of VLIW in EX
  input  logic                          ex_valid,
  input  logic [NCR-1:0][3:0]           cr,
  input  logic [NPATH-1:0][LADDR_W-1:0] bank_next,  // next_line of each bank
  input  logic                          force_sel,
  input  logic [1:0]                    force_sub,
  input  logic                          redirect,
  input  logic [LADDR_W-1:0]            redirect_line,
  output logic [NPATH-1:0]              path_taken,
  output logic [NPATH-1:0]              subline_sel,  // one-hot
  output logic [1:0]                    subline,
  output logic [LADDR_W-1:0]            next_line
);
  logic [2:0] c;                          // condition bits A, B, C
  logic [NPATH-1:0][2:0][1:0] need;       // per path per test: {tested, value}
  logic [NPATH-1:0] exists;
  logic [NPATH-1:0][LADDR_W-1:0] mux_in;

  localparam logic [1:0] X = 2'b00, F = 2'b10, T = 2'b11;

  always_comb begin
    for (int t = 0; t < 3; t++) c[t] = cr[hdr.cc[t].cr][hdr.cc[t].bit_sel];

    need   = '0;
    exists = 4'b0001;
    unique case (hdr.tree_id)
      4'd1: begin exists = 4'b0011; need[0] = '{X, X, F}; need[1] = '{X, X, T}; end
      4'd2: begin exists = 4'b0111; need[0] = '{X, X, F};
                  need[1] = '{X, F, T}; need[2] = '{X, T, T}; end
      4'd3: begin exists = 4'b0111; need[0] = '{X, F, F};
                  need[1] = '{X, T, F}; need[2] = '{X, X, T}; end
      4'd4: begin exists = 4'b1111; need[0] = '{X, F, F}; need[1] = '{X, T, F};
                  need[2] = '{F, X, T}; need[3] = '{T, X, T}; end
      4'd5: begin exists = 4'b1111; need[0] = '{X, X, F}; need[1] = '{F, F, T};
                  need[2] = '{T, F, T}; need[3] = '{X, T, T}; end
      4'd6: begin exists = 4'b1111; need[0] = '{X, X, F}; need[1] = '{X, F, T};
                  need[2] = '{F, T, T}; need[3] = '{T, T, T}; end
      4'd7: begin exists = 4'b1111; need[0] = '{F, F, F}; need[1] = '{T, F, F};
                  need[2] = '{X, T, F}; need[3] = '{X, X, T}; end
      4'd8: begin exists = 4'b1111; need[0] = '{X, F, F}; need[1] = '{F, T, F};
                  need[2] = '{T, T, F}; need[3] = '{X, X, T}; end
      default: ;
    endcase

    // Path Select
    for (int p = 0; p < NPATH; p++) begin
      path_taken[p] = exists[p] & ex_valid;
      for (int t = 0; t < 3; t++)
        if (need[p][t][1] && (c[t] != need[p][t][0])) path_taken[p] = 1'b0;
    end

    // Decoded Offset Select
    subline_sel = '0;
    for (int p = 0; p < NPATH; p++)
      if (path_taken[p]) subline_sel |= 4'b0001 << hdr.tgt[p];
    if (force_sel) subline_sel = 4'b0001 << force_sub;

    // 2:1 (bank next-line or redirect) then 4:1 by decoded subline select
    subline   = '0;
    next_line = '0;
    for (int b = 0; b < NPATH; b++) begin
      mux_in[b] = redirect ? redirect_line : bank_next[b];
      if (subline_sel[b]) begin
        subline   = b[1:0];
        next_line = mux_in[b];
      end
    end
    if (redirect) next_line = redirect_line;
  end
endmodule
