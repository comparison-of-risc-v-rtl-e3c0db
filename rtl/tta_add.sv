// tta_add: the adder function unit (ADD) of the TTA processor.
//
// A single-operation unit added to the larger processors to run more
// additions in parallel with the ART units: every trigger, whatever its
// opcode field, stores trigger value + operand value in the result register,
// readable one cycle later. An operand written in the same instruction as the
// trigger is used at once. The one-cycle latency is this design's choice.
module tta_add
  import tta_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  unit_in_t      in_i,
  output logic [DW-1:0] result_o
);
  logic [DW-1:0] operand_q, operand;

  assign operand = in_i.o_we ? in_i.o_data : operand_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      operand_q <= '0;
      result_o  <= '0;
    end else begin
      if (in_i.o_we) operand_q <= in_i.o_data;
      if (in_i.t_we) result_o <= in_i.t_data + operand;
    end
  end
endmodule
