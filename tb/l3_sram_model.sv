// l3_sram_model: behavioural model of the external L3 SRAM (in the real
// system 32 synchronous 128K x 36-bit chips in 4 banks). Pipelined: read
// data appear LAT cycles after the access; one access per cycle at most.
// Words never written read as zero (directory: invalid). Counts accesses.
module l3_sram_model
  import daisy_pkg::*;
#(
  parameter int AW  = 19,
  parameter int LAT = 3
) (
  input  logic              clk,
  input  logic              ce,
  input  logic              we,
  input  logic              dir,
  input  logic [AW-1:0]     addr,
  input  logic [VLIW_W-1:0] wdata,
  output logic [VLIW_W-1:0] rdata,
  output int                n_dir,
  output int                n_data
);
  logic [VLIW_W-1:0] dmem [int];
  logic [VLIW_W-1:0] pipe [LAT];
  initial begin n_dir = 0; n_data = 0; end

  always_ff @(posedge clk) begin
    logic [VLIW_W-1:0] r;
    int key;
    key = int'({dir, addr});
    r = dmem.exists(key) ? dmem[key] : '0;
    if (ce && we) dmem[key] = wdata;
    if (ce) begin
      if (dir) n_dir <= n_dir + 1; else n_data <= n_data + 1;
    end
    pipe[0] <= r;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end
  // pipe[k] holds the data of the access made k+1 cycles ago
  assign rdata = pipe[LAT-1];
endmodule
