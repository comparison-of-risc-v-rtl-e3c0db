// tta_rf: a general-purpose register file of the TTA processor, 40 entries
// of 32 bits by default.
//
// In a TTA the register files hang on the transport buses like any unit: a
// move whose destination is (this file, index) writes one register, and a
// move whose source is (this file, index) reads one. The file has one write
// port and one read port, as each register file of the processor has one
// input and one output socket. The write happens at the end of the cycle
// (`in_i.t_we`, index `in_i.widx`, data `in_i.t_data`); the read is
// combinational from `ridx_i` to `rdata_o`, so a value written in one
// instruction is readable in the next. Registers reset to zero.
module tta_rf
  import tta_pkg::*;
#(
  parameter int unsigned DEPTH = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  unit_in_t         in_i,
  input  logic [IDX_W-1:0] ridx_i,
  output logic [DW-1:0]    rdata_o
);
  logic [DW-1:0] regs_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) regs_q[i] <= '0;
    end else if (in_i.t_we && int'(in_i.widx) < int'(DEPTH)) begin
      regs_q[in_i.widx] <= in_i.t_data;
    end
  end

  assign rdata_o = (int'(ridx_i) < int'(DEPTH)) ? regs_q[ridx_i] : '0;

  initial assert (DEPTH <= 2**IDX_W) else $error("tta_rf: DEPTH exceeds the index field");
endmodule
