// gpr_copy: one copy of the general-purpose register file.
//
// 64 registers of 32 data bits plus 3 extender bits (carry, overflow,
// deferred exception). The processor keeps 8 identical copies, one next to
// each ALU, so that every copy needs only 2 read ports while still taking all
// 8 writes of a VLIW each cycle (8 write / 2 read ports, as described). Write
// decoding is shared: a write_dec instance provides the per-register enable
// and port number. Reads are combinational (the bypass network covers the
// results being written in the same cycle); writes happen at the clock edge.
// Reset clears every register so that simulation starts from a known state.
module gpr_copy
  import daisy_pkg::*;
#(
  parameter int NPORT = NSLOT,
  parameter int NREG  = NGPR,
  parameter int W     = REG_W
) (
  input  logic                                 clk,
  input  logic                                 rst,
  input  logic [NREG-1:0]                      reg_we,
  input  logic [NREG-1:0][$clog2(NPORT)-1:0]   reg_port,
  input  logic [NPORT-1:0][W-1:0]              wdata,
  input  logic [$clog2(NREG)-1:0]              ra_a,
  input  logic [$clog2(NREG)-1:0]              ra_b,
  output logic [W-1:0]                         rd_a,
  output logic [W-1:0]                         rd_b
);
  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;
    end else begin
      for (int r = 0; r < NREG; r++)
        if (reg_we[r]) regs[r] <= wdata[reg_port[r]];
    end
  end

  assign rd_a = regs[ra_a];
  assign rd_b = regs[ra_b];
endmodule
