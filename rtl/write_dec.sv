// write_dec: register-file write decoder.
//
// Turns the 8 write ports' (enable, target register) pairs into, for every
// one of the 64 GPRs, a write enable and the number of the port whose data
// that register takes. When two slots of one VLIW write the same register
// the higher-numbered slot wins. The floorplan shows two copies of this
// decoder, each placed between and shared by four register-file copies; the
// decoder itself is this design's own, purely combinational, logic.
module write_dec
  import daisy_pkg::*;
#(
  parameter int NPORT = NSLOT,
  parameter int NREG  = NGPR
) (
  input  logic [NPORT-1:0]                     wen,
  input  logic [NPORT-1:0][$clog2(NREG)-1:0]   wsel,
  output logic [NREG-1:0]                      reg_we,
  output logic [NREG-1:0][$clog2(NPORT)-1:0]   reg_port
);
  always_comb begin
    reg_we   = '0;
    reg_port = '0;
    for (int p = 0; p < NPORT; p++) begin
      if (wen[p]) begin
        reg_we[wsel[p]]   = 1'b1;
        reg_port[wsel[p]] = p[$clog2(NPORT)-1:0];
      end
    end
  end
endmodule
