// tta_art: the arithmetic function unit (ART) of the TTA processor.
//
// Operations: ADD, SUB, EQ (equality) and GT (signed greater-than), the four
// the unit is specified to hold. EQ and GT give 1 or 0, which a program moves
// into the boolean register file to guard later moves.
//
// Interface: the unit has an operand port, a trigger port and a result
// register, all reached over the transport buses through `in_i`. A write to
// the operand port only stores its value. A write to the trigger port starts
// the operation named by `in_i.op` on (trigger value, operand value) and the
// result register holds the answer from the next cycle on (latency 1). An
// operand written in the same instruction as the trigger is used at once.
// SUB computes trigger - operand and GT tests trigger > operand; the operand
// order, the opcode numbers and the one-cycle latency are choices of this
// design.
module tta_art
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
      if (in_i.t_we) begin
        unique case (in_i.op)
          ART_ADD: result_o <= in_i.t_data + operand;
          ART_SUB: result_o <= in_i.t_data - operand;
          ART_EQ:  result_o <= DW'(in_i.t_data == operand);
          ART_GT:  result_o <= DW'($signed(in_i.t_data) > $signed(operand));
          default: result_o <= '0;
        endcase
      end
    end
  end
endmodule
