// tta_dmem: the data memory of the TTA processor.
//
// DEPTH words of 32 bits with two independent ports, one per load-store
// unit. Each port has a request strobe, write enable, word address, four byte
// enables and write data; a read returns the addressed word on the port's
// `rdata` one cycle after the request (synchronous read, as in a true dual
// port FPGA block RAM), and keeps it until the next read. Writes take effect
// at the clock edge with the byte enables. If both ports write the same byte
// in one cycle, port 1 wins. The memory is not reset.
module tta_dmem
  import tta_pkg::*;
#(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [1:0]          req_i,
  input  logic [1:0]          we_i,
  input  logic [1:0][AW-1:0]  addr_i,
  input  logic [1:0][3:0]     be_i,
  input  logic [1:0][DW-1:0]  wdata_i,
  output logic [1:0][DW-1:0]  rdata_o
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (req_i[p]) begin
        if (we_i[p]) begin
          for (int b = 0; b < 4; b++)
            if (be_i[p][b]) mem[addr_i[p]][8*b +: 8] <= wdata_i[p][8*b +: 8];
        end else begin
          rdata_o[p] <= mem[addr_i[p]];
        end
      end
    end
  end
endmodule
