// sram_sp: single-port on-chip memory (FMEM and WMEM of the accelerator).
//
// One read or write per cycle; read data appears one cycle after the address
// (synchronous read, as a compiled SRAM macro behaves). Written as an array so that
// synthesis maps it to a memory; the paper gives only the two memories and the
// total on-chip capacity, so the port behaviour and sizes are this design's.
// Contents are not reset.
module sram_sp #(
  parameter int unsigned W     = 26,
  parameter int unsigned DEPTH = 65536
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
