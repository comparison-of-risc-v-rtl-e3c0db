// tta_imem: the instruction memory of the TTA processor.
//
// DEPTH words of IW bits, one instruction per word. The fetch port is read
// synchronously: the word at `raddr_i` appears on `rdata_o` after the next
// clock edge, as in an FPGA block RAM. A second, write-only port loads the
// program (`we_i`, `waddr_i`, `wdata_i`). The memory is not reset: the
// program must be loaded before the processor runs.
module tta_imem #(
  parameter int unsigned IW    = 176,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr_i,
  output logic [IW-1:0] rdata_o,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [IW-1:0] wdata_i
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    rdata_o <= mem[raddr_i];
  end
endmodule
